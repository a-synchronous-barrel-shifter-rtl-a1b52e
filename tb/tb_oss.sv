// tb_oss: self-checking test of the output selection stage.
//
// Fills the six inputs with distinct random words and checks that every
// select value 0..5 passes the matching input, and that the unused codes
// 6 and 7 fall back to the last stage.
module tb_oss;
  localparam int N = 32;
  localparam int L = 5;

  logic [N-1:0] stage_data [L+1];
  logic [2:0]   sel;
  logic [N-1:0] out_data;
  int checks = 0, failures = 0;

  oss #(.N(N)) dut (.stage_data(stage_data), .sel(sel), .out_data(out_data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 100; it++) begin
      for (int i = 0; i <= L; i++) stage_data[i] = $urandom();
      for (int s = 0; s < 8; s++) begin
        logic [N-1:0] exp;
        sel = 3'(s);
        #1;
        exp = stage_data[(s > L) ? L : s];
        checks++;
        if (out_data !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL sel %0d: got %h exp %h", s, out_data, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
