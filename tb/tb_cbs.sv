// tb_cbs: self-checking test of the 32-bit conventional barrel shifter.
//
// For random words, every shift amount 0..31 and every shift kind, checks the
// final result and every intermediate stage output: stage i must hold the
// input shifted by the low i bits of the shift amount. Also checks that a
// shift using k stages is already complete at stage k, which the completion
// logic relies on.
module tb_cbs;
  import abbs_pkg::*;
  import abbs_ref_pkg::*;

  localparam int N = 32;
  localparam int L = 5;

  logic [N-1:0] din;
  logic [L-1:0] shamt;
  shift_op_e    op;
  logic [N-1:0] stage_data [L+1];
  int checks = 0, failures = 0;

  cbs #(.N(N)) dut (.in_data(din), .shamt(shamt), .op(op), .stage_data(stage_data));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    for (int it = 0; it < 40; it++) begin
      din = (it == 0) ? 32'hff00_aa93 : $urandom();
      for (int o = 0; o < 6; o++) begin
        op = shift_op_e'(o);
        for (int s = 0; s < N; s++) begin
          shamt = L'(s);
          #1;
          for (int i = 0; i <= L; i++)
            check(stage_data[i], N'(ref_shift(64'(din), N, s & ((1 << i) - 1), o)),
                  $sformatf("stage %0d op %0d s %0d", i, o, s));
          check(stage_data[stages_used(s)], N'(ref_shift(64'(din), N, s, o)),
                $sformatf("early stage op %0d s %0d", o, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
