// tb_abbs_32: end-to-end test of the 32-bit bundled-data barrel shifter at
// its default size.
//
// Acts as the requester of a four-phase handshake: puts an operand, a shift
// amount and a shift kind on the inputs, raises req, waits for ack, checks
// the result, lowers req and waits for ack to fall. Every shift kind is run
// with every shift amount 0..31 on random words. Checks:
//   - abbs_op equals the reference shift while ack is high;
//   - ack rises exactly stages_used(shift) + 2 clock edges after req is
//     driven high, and falls the same number of edges after req is dropped;
//   - the selector entry seen at the top matches the shift;
//   - the operands are held: changing the inputs while ack is high does not
//     change the result.
// Counts how often each mechanism occurred: the zero-shift path that skips
// the shifter, completion after each number of stages 1..5, each shift kind,
// and operand changes during a handshake; one that never occurred is a
// failure. Also starts with a reset during which req is high.
module tb_abbs_32;
  import abbs_pkg::*;
  import abbs_ref_pkg::*;

  localparam int N = 32;
  localparam int L = 5;

  logic         clk = 1'b0;
  logic         rst, req, ack;
  logic [N-1:0] inp_data, abbs_op;
  logic [L-1:0] shf_data;
  shift_op_e    shf_type;
  logic [8:0]   sds_op;
  int checks = 0, failures = 0;
  int n_stages [L+1];
  int n_op [6];
  int n_held = 0;

  abbs_32 dut (.clk(clk), .rst(rst), .req(req), .inp_data(inp_data),
               .shf_data(shf_data), .shf_type(shf_type), .abbs_op(abbs_op),
               .ack(ack), .sds_op(sds_op));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Counts clock edges until ack reaches `level`.
  task automatic wait_ack(input logic level, output int n);
    n = 0;
    while (ack !== level && n < 20) begin
      @(posedge clk); #1;
      n++;
    end
  endtask

  task automatic shift_once(input logic [N-1:0] d, input int s, input int o);
    int n, k;
    logic [N-1:0] exp;
    k = stages_used(s);
    exp = N'(ref_shift(64'(d), N, s, o));
    @(posedge clk); #1;
    inp_data = d; shf_data = L'(s); shf_type = shift_op_e'(o);
    req = 1'b1;
    wait_ack(1'b1, n);
    check(n == k + 2, $sformatf("ack rise after %0d edges, shift %0d, exp %0d", n, s, k + 2));
    check(abbs_op === exp, $sformatf("op %0d shift %0d in %h: got %h exp %h", o, s, d, abbs_op, exp));
    check(sds_op === {5'((1 << k) - 1), 1'b1, 3'(k)}, $sformatf("sds_op %b shift %0d", sds_op, s));
    // Disturb the inputs while the result is being read.
    inp_data = ~d; shf_data = ~L'(s); shf_type = shift_op_e'((o + 1) % 6);
    @(posedge clk); #1;
    check(abbs_op === exp && ack === 1'b1, $sformatf("result not held, shift %0d", s));
    n_held++;
    req = 1'b0;
    wait_ack(1'b0, n);
    check(n == k + 2, $sformatf("ack fall after %0d edges, shift %0d, exp %0d", n, s, k + 2));
    n_stages[k]++;
    n_op[o]++;
  endtask

  initial begin
    for (int i = 0; i <= L; i++) n_stages[i] = 0;
    for (int i = 0; i < 6; i++) n_op[i] = 0;
    rst = 1'b1; req = 1'b1; inp_data = '1; shf_data = '1; shf_type = OP_SRL;
    repeat (3) @(posedge clk);
    #1;
    check(ack === 1'b0 && abbs_op === '0, "outputs not cleared by reset");
    req = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    repeat (2) @(posedge clk);
    shift_once(32'hff00_aa93, 0, 0);
    shift_once(32'hff00_aa93, 19, 2);
    shift_once(32'hff00_aa93, 21, 2);
    for (int o = 0; o < 6; o++)
      for (int s = 0; s < N; s++)
        for (int r = 0; r < 3; r++)
          shift_once((r == 0) ? 32'h8000_0001 : $urandom(), s, o);
    for (int it = 0; it < 200; it++)
      shift_once($urandom(), $urandom_range(0, N - 1), $urandom_range(0, 5));
    for (int k = 0; k <= L; k++) begin
      $display("completed after %0d shifter stages: %0d", k, n_stages[k]);
      check(n_stages[k] > 0, $sformatf("no shift used %0d stages", k));
    end
    for (int o = 0; o < 6; o++) begin
      $display("shift kind %0d: %0d", o, n_op[o]);
      check(n_op[o] > 0, $sformatf("shift kind %0d never run", o));
    end
    $display("operand changes during a handshake: %0d", n_held);
    check(n_held > 0, "operands never changed during a handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
