// tb_dcdc: self-checking test of the completion detection circuit.
//
// Feeds the circuit with stage outputs computed by the reference model, as a
// 32-bit shifter would produce them, for every shift amount and random data.
// Checks that the selected result equals the full shift, that the selector
// entry matches the shift, and that ack rises (and later falls) exactly
// stages_used(shift) * TS + TO cycles after the request changes. The unit is
// built with two-cycle stage elements and a three-cycle output element
// (TS = 2, TO = 3) to check that the element lengths reach the delay path.
module tb_dcdc;
  import abbs_ref_pkg::*;

  localparam int N = 32;
  localparam int L = 5;
  localparam int TS = 2;
  localparam int TO = 3;

  logic         clk = 1'b0;
  logic         rst, req_in, ack;
  logic [L-1:0] shamt;
  logic [N-1:0] stage_data [L+1];
  logic [N-1:0] result;
  logic [8:0]   sds_op;
  int checks = 0, failures = 0;

  dcdc #(.N(N), .TAU_STAGE(TS), .TAU_OSS(TO)) dut (.clk(clk), .rst(rst), .req_in(req_in), .shamt(shamt),
                     .stage_data(stage_data), .result(result), .ack(ack),
                     .sds_op(sds_op));

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

  task automatic wait_ack(input logic level, input int exp, input int s);
    int n;
    n = 0;
    while (ack !== level && n < 20) begin
      @(posedge clk); #1;
      n++;
    end
    check(n == exp, $sformatf("ack=%0b after %0d cycles for shift %0d, exp %0d", level, n, s, exp));
  endtask

  initial begin
    rst = 1'b1; req_in = 1'b0; shamt = '0;
    for (int i = 0; i <= L; i++) stage_data[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int it = 0; it < 8; it++) begin
      for (int s = 0; s < N; s++) begin
        logic [N-1:0] d;
        int o, k;
        d = $urandom();
        o = $urandom_range(0, 5);
        k = stages_used(s);
        @(posedge clk); #1;
        shamt = L'(s);
        for (int i = 0; i <= L; i++)
          stage_data[i] = N'(ref_shift(64'(d), N, s & ((1 << i) - 1), o));
        req_in = 1'b1; #0;
        wait_ack(1'b1, k * TS + TO, s);
        check(result === N'(ref_shift(64'(d), N, s, o)),
              $sformatf("result shift %0d: got %h", s, result));
        check(sds_op[2:0] == 3'(k) && sds_op[3] && sds_op[8:4] == 5'((1 << k) - 1),
              $sformatf("sds entry %b for shift %0d", sds_op, s));
        req_in = 1'b0; #0;
        wait_ack(1'b0, k * TS + TO, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
