// tb_data_reg: self-checking test of the input register.
//
// Checks reset to zero, loading on enable, and holding the value while the
// enable is low and the input changes.
module tb_data_reg;
  localparam int W = 32;

  logic         clk = 1'b0;
  logic         rst, en;
  logic [W-1:0] ip, op;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  data_reg #(.W(W)) dut (.clk(clk), .rst(rst), .en(en), .ip(ip), .op(op));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b1; ip = '1;
    @(posedge clk); #1;
    checks++; if (op !== '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    model = '0;
    for (int it = 0; it < 500; it++) begin
      en = ($urandom() % 3) == 0;
      ip = $urandom();
      @(posedge clk);
      if (en) model = ip;
      #1;
      checks++;
      if (op !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: got %h exp %h", it, op, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
