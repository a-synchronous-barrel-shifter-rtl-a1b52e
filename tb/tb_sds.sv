// tb_sds: self-checking test of the shift-dependent selector table.
//
// Reads all 32 entries and compares each with the rule worked out here: the
// OSS select in bits [2:0] is the number of stages the shift uses, bit 3
// (DOSS) is always set, and bits [8:4] (D0..D4) are set for the stages used.
// Spot checks from the description: shift 0 selects only DOSS, shift 1 D0
// and DOSS, shifts 2 and 3 D0, D1 and DOSS.
module tb_sds;
  import abbs_ref_pkg::*;

  logic [4:0] shamt;
  logic [8:0] sds_op;
  int checks = 0, failures = 0;

  sds #(.N(32)) dut (.shamt(shamt), .sds_op(sds_op));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [8:0] got, input logic [8:0] exp, input int s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL shift %0d: got %b exp %b", s, got, exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 32; s++) begin
      logic [8:0] exp;
      int k;
      k = stages_used(s);
      exp = {5'((1 << k) - 1), 1'b1, 3'(k)};
      shamt = 5'(s);
      #1;
      check(sds_op, exp, s);
    end
    shamt = 0;  #1; check(sds_op, 9'b00000_1_000, 0);
    shamt = 1;  #1; check(sds_op, 9'b00001_1_001, 1);
    shamt = 2;  #1; check(sds_op, 9'b00011_1_010, 2);
    shamt = 3;  #1; check(sds_op, 9'b00011_1_010, 3);
    shamt = 21; #1; check(sds_op, 9'b11111_1_101, 21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
