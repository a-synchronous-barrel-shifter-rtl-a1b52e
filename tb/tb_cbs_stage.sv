// tb_cbs_stage: self-checking test of single barrel shifter stages.
//
// Instantiates one 32-bit stage for each shift distance 1, 2, 4, 8, 16 and
// drives them with random words, every shift kind and both select values.
// Each output is compared with the reference model: the input itself when
// the select is low, the input shifted by the stage's distance when high.
module tb_cbs_stage;
  import abbs_pkg::*;
  import abbs_ref_pkg::*;

  localparam int N = 32;
  localparam int NS = 5;

  logic [N-1:0] din;
  logic         sel;
  shift_op_e    op;
  logic [N-1:0] dout [NS];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NS; i++) begin : g_dut
    cbs_stage #(.N(N), .SHIFT(2 ** i)) dut (
      .in_data(din), .sel(sel), .op(op), .out_data(dout[i])
    );
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      din = $urandom();
      if (it < 6) din = (it % 2) ? 32'h8000_0001 : 32'h7fff_fffe;
      for (int o = 0; o < 6; o++) begin
        op = shift_op_e'(o);
        for (int sv = 0; sv < 2; sv++) begin
          sel = sv[0];
          #1;
          for (int i = 0; i < NS; i++) begin
            logic [N-1:0] exp;
            exp = N'(ref_shift(64'(din), N, sel ? (1 << i) : 0, o));
            checks++;
            if (dout[i] !== exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL stage %0d op %0d sel %0b in %h: got %h exp %h",
                         i, o, sel, din, dout[i], exp);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
