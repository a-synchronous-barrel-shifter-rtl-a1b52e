// abbs_32: bundled-data barrel shifter with deterministic completion
// detection (N = 32 by default).
//
// A request (req) with stable operands starts a shift. On the first clock
// edge that sees req high, the data (u0), shift amount (u1) and shift kind
// (u2) are captured, and the request enters the matched delay path one cycle
// later than it was sampled (req_q). The conventional barrel shifter (CBS)
// works on the held operands; the completion circuit (DCDC) picks the result
// from the lowest stage that already holds it and raises ack after one delay
// element per stage used plus one for the output stage. Four-phase handshake:
// req up, ack up, req down, ack down; abbs_op is valid while ack is high.
//
// Ports: clk, rst (synchronous, active high), req, inp_data (N), shf_data
// (shift amount, log2 N bits), shf_type (shift kind), abbs_op (N), ack,
// sds_op (the current selector entry, for observation).
// Latency: ack rises k + 1 clock edges after the edge that first samples req
// high, i.e. on the (k + 2)-th edge counting that one, where k is the number
// of shifter stages the shift uses (0 for no shift, 5 for shifts of 16..31).
// ack falls with the same delay after the edge that first samples req low.
// These counts hold for the default one-cycle delay elements; in general
// k + 1 becomes k * TAU_STAGE + TAU_OSS.
// The datapath and completion scheme follow the description; the clocked
// delay elements, the registers' load rule and the shift-kind input are this
// design's choices.
module abbs_32
  import abbs_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned LAMBDA = $clog2(N),
  parameter int unsigned OSS_W  = $clog2(LAMBDA + 1),
  parameter int unsigned SDS_W  = OSS_W + LAMBDA + 1,
  parameter int unsigned TAU_STAGE = 1,   // cycles per shifter-stage delay element
  parameter int unsigned TAU_OSS   = 1    // cycles for the output-stage element
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req,
  input  logic [N-1:0]      inp_data,
  input  logic [LAMBDA-1:0] shf_data,
  input  shift_op_e         shf_type,
  output logic [N-1:0]      abbs_op,
  output logic              ack,
  output logic [SDS_W-1:0]  sds_op
);

  logic              req_q;
  logic              load;
  logic [N-1:0]      reg32_op;
  logic [LAMBDA-1:0] reg5_op;
  logic [2:0]        type_op;
  logic [N-1:0]      b [LAMBDA+1];   // b[0] = held input, b[i] = stage i

  always_ff @(posedge clk) begin
    if (rst) req_q <= 1'b0;
    else     req_q <= req;
  end

  assign load = req && !req_q;

  data_reg #(.W(N)) u0 (
    .clk(clk), .rst(rst), .en(load), .ip(inp_data), .op(reg32_op)
  );

  data_reg #(.W(LAMBDA)) u1 (
    .clk(clk), .rst(rst), .en(load), .ip(shf_data), .op(reg5_op)
  );

  data_reg #(.W(3)) u2 (
    .clk(clk), .rst(rst), .en(load), .ip(shf_type), .op(type_op)
  );

  cbs #(.N(N), .LAMBDA(LAMBDA)) u_cbs (
    .in_data   (reg32_op),
    .shamt     (reg5_op),
    .op        (shift_op_e'(type_op)),
    .stage_data(b)
  );

  dcdc #(.N(N), .LAMBDA(LAMBDA), .OSS_W(OSS_W), .SDS_W(SDS_W),
        .TAU_STAGE(TAU_STAGE), .TAU_OSS(TAU_OSS)) u_dcdc (
    .clk       (clk),
    .rst       (rst),
    .req_in    (req_q),
    .shamt     (reg5_op),
    .stage_data(b),
    .result    (abbs_op),
    .ack       (ack),
    .sds_op    (sds_op)
  );

  // Four-phase handshake rules on the requester's side.
  a_req_rise: assert property (@(posedge clk) disable iff (rst)
                               $rose(req) |-> !ack)
    else $error("req raised while ack still high");
  a_req_fall: assert property (@(posedge clk) disable iff (rst)
                               $fell(req) |-> ack)
    else $error("req dropped before ack");

endmodule
