// tb_abbs_32_avg_delay: measures the average completion delay of the 32-bit
// shifter against the worst case a fixed-delay design must always wait.
//
// Sweeps every shift amount 0..31 once for each shift kind (uniform shift
// amounts) on random words, measures for each handshake the clock edges from
// req to ack, and checks the result. The number of matched delay elements a
// shift uses is stages_used(s) + 1; over one sweep they sum to
//   1*1 + 1*2 + 2*3 + 4*4 + 8*5 + 16*6 = 161,
// an average of 5.03 elements against 6 for the worst case (all five stages
// and the output stage). The measured latency is one register cycle more
// than the element count. Checks the sum per sweep and that every shift
// below 16 completes earlier than the worst case.
module tb_abbs_32_avg_delay;
  import abbs_pkg::*;
  import abbs_ref_pkg::*;

  localparam int N = 32;
  localparam int L = 5;
  localparam int WORST = L + 1;

  logic         clk = 1'b0;
  logic         rst, req, ack;
  logic [N-1:0] inp_data, abbs_op;
  logic [L-1:0] shf_data;
  shift_op_e    shf_type;
  logic [8:0]   sds_op;
  int checks = 0, failures = 0;
  int n_early = 0;

  abbs_32 dut (.clk(clk), .rst(rst), .req(req), .inp_data(inp_data),
               .shf_data(shf_data), .shf_type(shf_type), .abbs_op(abbs_op),
               .ack(ack), .sds_op(sds_op));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst = 1'b1; req = 1'b0; inp_data = '0; shf_data = '0; shf_type = OP_SRL;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int o = 0; o < 6; o++) begin
      int sum_el;
      sum_el = 0;
      for (int s = 0; s < N; s++) begin
        logic [N-1:0] d;
        int n;
        d = $urandom();
        @(posedge clk); #1;
        inp_data = d; shf_data = L'(s); shf_type = shift_op_e'(o);
        req = 1'b1;
        n = 0;
        while (ack !== 1'b1 && n < 20) begin
          @(posedge clk); #1;
          n++;
        end
        check(abbs_op === N'(ref_shift(64'(d), N, s, o)),
              $sformatf("op %0d shift %0d: got %h", o, s, abbs_op));
        sum_el += n - 1;
        if (s < 16) begin
          check(n - 1 < WORST, $sformatf("shift %0d took the worst case", s));
          if (n - 1 < WORST) n_early++;
        end
        req = 1'b0;
        while (ack !== 1'b0) begin
          @(posedge clk); #1;
        end
      end
      $display("shift kind %0d: %0d delay elements over 32 shifts, average %0.3f, worst case %0d",
               o, sum_el, real'(sum_el) / N, WORST);
      check(sum_el == 161, $sformatf("element sum %0d, expected 161", sum_el));
    end
    $display("handshakes completed before the worst case: %0d", n_early);
    check(n_early > 0, "no early completion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
