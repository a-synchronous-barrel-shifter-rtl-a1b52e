// dgu: delay generating unit, the matched delay path that turns req into ack.
//
// The path is a chain of LAMBDA+1 delay elements, D_0..D_{LAMBDA-1} for the
// shifter stages and DOSS for the output stage, in that order. An element
// whose select is set delays the request by its length in clock cycles
// (TAU_STAGE for a shifter-stage element, TAU_OSS for the output-stage one);
// one whose select is clear is bypassed. The request therefore reaches ack after as many
// cycles as there are selected elements: the delay follows the stages the
// current shift really uses instead of the worst case. Because the path is
// level-sensitive, the falling request of a four-phase handshake returns ack
// to zero with the same delay.
//
// Ports: clk, rst (synchronous, active high), req_in, d_sel (one bit per
// shifter stage), doss (output-stage element), ack. Latency from req_in to
// ack: popcount(d_sel) * TAU_STAGE + doss * TAU_OSS cycles; with no element
// selected ack follows req_in combinationally. An element must be at least as
// slow as the logic it stands for, so TAU_STAGE clock periods must cover one
// multiplexer stage and TAU_OSS periods the output stage. A bypassed element
// is held empty, so that a request level left inside it by an earlier
// handshake cannot reach ack early when the next shift selects it.
// The description builds the elements from gates whose delay is at least that
// of the stage they copy; modelling one element as one clock cycle is this
// design's choice for a clocked implementation (one cycle each by default).
module dgu #(
  parameter int unsigned LAMBDA    = 5,
  parameter int unsigned TAU_STAGE = 1,
  parameter int unsigned TAU_OSS   = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req_in,
  input  logic [LAMBDA-1:0] d_sel,
  input  logic              doss,
  output logic              ack
);

  localparam int unsigned NEL = LAMBDA + 1;

  logic [NEL-1:0] sel;
  logic [NEL:0]   chain;    // chain[j] enters element j

  assign sel      = {doss, d_sel};
  assign chain[0] = req_in;

  for (genvar j = 0; j < NEL; j++) begin : g_el
    localparam int unsigned T = (j == NEL - 1) ? TAU_OSS : TAU_STAGE;
    logic [T-1:0] q;        // the element's flip-flops; q[T-1] is its output
    always_ff @(posedge clk) begin
      if (rst || !sel[j]) q <= '0;                 // bypassed: held empty
      else                q <= T'({q, chain[j]});  // shift in, oldest drops
    end
    assign chain[j+1] = sel[j] ? q[T-1] : chain[j];
  end

  assign ack = chain[NEL];

endmodule
