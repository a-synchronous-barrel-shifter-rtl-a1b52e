// dcdc: deterministic completion detection circuit.
//
// Combines the shift-dependent selector (SDS), the output selection stage
// (OSS) and the delay generating unit (DGU). The SDS entry for the current
// shift amount tells the OSS which shifter stage already holds the final
// result and selects, in the DGU, one delay element per stage actually used
// plus one for the OSS. The acknowledge therefore comes after a delay that
// matches the shift at hand, known in advance from the shift amount alone:
// nothing is speculated and nothing has to be cancelled.
//
// Ports: clk, rst, req_in (request, already aligned with the held operands),
// shamt, stage_data[0..LAMBDA] from the shifter, result (N bits), ack,
// sds_op (the SDS entry, brought out for observation). Timing: result is
// combinational from stage_data and shamt; ack follows req_in after
// active_stages(shamt) * TAU_STAGE + TAU_OSS clock cycles (k + 1 with the
// default one-cycle delay elements).
module dcdc #(
  parameter int unsigned N      = 32,
  parameter int unsigned LAMBDA = $clog2(N),
  parameter int unsigned OSS_W  = $clog2(LAMBDA + 1),
  parameter int unsigned SDS_W  = OSS_W + LAMBDA + 1,
  parameter int unsigned TAU_STAGE = 1,
  parameter int unsigned TAU_OSS   = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req_in,
  input  logic [LAMBDA-1:0] shamt,
  input  logic [N-1:0]      stage_data [LAMBDA+1],
  output logic [N-1:0]      result,
  output logic              ack,
  output logic [SDS_W-1:0]  sds_op
);

  sds #(.N(N), .LAMBDA(LAMBDA), .OSS_W(OSS_W), .SDS_W(SDS_W)) u_sds (
    .shamt (shamt),
    .sds_op(sds_op)
  );

  oss #(.N(N), .LAMBDA(LAMBDA), .OSS_W(OSS_W)) u_oss (
    .stage_data(stage_data),
    .sel       (sds_op[OSS_W-1:0]),
    .out_data  (result)
  );

  dgu #(.LAMBDA(LAMBDA), .TAU_STAGE(TAU_STAGE), .TAU_OSS(TAU_OSS)) u_dgu (
    .clk   (clk),
    .rst   (rst),
    .req_in(req_in),
    .d_sel (sds_op[SDS_W-1 -: LAMBDA]),
    .doss  (sds_op[OSS_W]),
    .ack   (ack)
  );

endmodule
