// oss: output selection stage.
//
// One (LAMBDA+1)-input multiplexer per result bit. Select value 0 takes the
// unshifted input (the shifter is skipped for a zero shift); value k takes
// the output of CBS stage k, the earliest point at which a shift that uses k
// stages is complete. Select values above LAMBDA take the last stage.
// Combinational; its delay is the DOSS element of the matched delay path.
//
// Ports: stage_data[0..LAMBDA] from the shifter, sel (OSS_W bits, from the
// low bits of the SDS entry), out_data (N bits, the shifter result).
module oss #(
  parameter int unsigned N      = 32,
  parameter int unsigned LAMBDA = $clog2(N),
  parameter int unsigned OSS_W  = $clog2(LAMBDA + 1)
) (
  input  logic [N-1:0]     stage_data [LAMBDA+1],
  input  logic [OSS_W-1:0] sel,
  output logic [N-1:0]     out_data
);

  always_comb begin
    if (32'(sel) > LAMBDA) out_data = stage_data[LAMBDA];
    else                   out_data = stage_data[sel];
  end

endmodule
