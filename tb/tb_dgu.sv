// tb_dgu: self-checking test of the delay generating unit.
//
// For random delay-element selections (and all single-element ones), raises
// the request and counts the clock edges until ack rises, then lowers it and
// counts the edges until ack falls. Both counts must equal the summed length
// of the selected elements. Two units run side by side on the same inputs:
// one with the default one-cycle elements, one with 3-cycle stage elements
// and a 2-cycle output-stage element.
module tb_dgu;
  localparam int L = 5;

  logic         clk = 1'b0;
  localparam int TS = 3;
  localparam int TO = 2;

  logic         rst, req_in, doss, ack, ack_long;
  logic [L-1:0] d_sel;
  int checks = 0, failures = 0;

  dgu #(.LAMBDA(L)) dut (.clk(clk), .rst(rst), .req_in(req_in), .d_sel(d_sel),
                         .doss(doss), .ack(ack));

  dgu #(.LAMBDA(L), .TAU_STAGE(TS), .TAU_OSS(TO)) dut_long (
    .clk(clk), .rst(rst), .req_in(req_in), .d_sel(d_sel), .doss(doss), .ack(ack_long));

  int exp_long = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_ack(input logic level, input int exp, input string what);
    int n;
    n = 0;
    while (ack !== level && n < 20) begin
      @(posedge clk); #1;
      n++;
    end
    checks++;
    if (n != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s sel %b%b: %0d cycles, exp %0d", what, d_sel, doss, n, exp);
    end
  endtask

  // Edge-time of the long unit's last ack change, against the time req
  // changed, gives its delay.
  int edges = 0;
  int t_long = 0;
  always @(posedge clk) edges++;
  always @(ack_long) t_long = edges;

  task automatic check_long(input logic level, input int t0, input string what);
    int n;
    n = 0;
    while (ack_long !== level && n < 40) begin
      @(posedge clk); #1;
      n++;
    end
    checks++;
    if (ack_long !== level || t_long - t0 != exp_long) begin
      failures++;
      if (failures < 10) $display("FAIL long %s sel %b%b: %0d cycles, exp %0d", what, d_sel, doss, t_long - t0, exp_long);
    end
  endtask

  task automatic one(input logic [L-1:0] ds, input logic dq);
    int exp, t0;
    d_sel = ds; doss = dq;
    exp = $countones({ds, dq});
    exp_long = TS * $countones(ds) + TO * int'(dq);
    @(posedge clk); #1;
    req_in = 1'b1; #0;
    t0 = edges;
    wait_ack(1'b1, exp, "rise");
    check_long(1'b1, t0, "rise");
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ack !== 1'b1 || ack_long !== 1'b1) begin failures++; $display("FAIL ack not held"); end
    req_in = 1'b0; #0;
    t0 = edges;
    wait_ack(1'b0, exp, "fall");
    check_long(1'b0, t0, "fall");
    repeat (2) @(posedge clk);
  endtask

  initial begin
    rst = 1'b1; req_in = 1'b0; d_sel = '0; doss = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int j = 0; j < L; j++) one(L'(1 << j), 1'b0);
    one('0, 1'b1);
    one('0, 1'b0);
    for (int k = 0; k <= L; k++) one(L'((1 << k) - 1), 1'b1);
    for (int it = 0; it < 100; it++) one(L'($urandom()), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
