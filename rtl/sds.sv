// sds: shift-dependent selector, an N-entry table addressed by the shift
// amount.
//
// Each entry tells the rest of the completion logic how many CBS stages the
// shift amount really uses (k = position of its highest set bit + 1, zero
// for no shift). Stages above k have their select line low and only pass the
// data on, so the result is already valid at the output of stage k.
// Entry layout (LSB first), 9 bits for N = 32:
//   [OSS_W-1:0]          OSS select = k (0 picks the unshifted input)
//   [OSS_W]              DOSS, the delay element of the output stage (always 1)
//   [OSS_W+1+j]          D_j, delay element of CBS stage j, set for j < k
// The table size (32 words of 9 bits) and the OSS select in the three least
// significant bits follow the description; the order of the six delay
// selects is this design's choice. The table is built at elaboration from the
// rule above and read combinationally.
module sds
  import abbs_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned LAMBDA = $clog2(N),
  parameter int unsigned OSS_W  = $clog2(LAMBDA + 1),
  parameter int unsigned SDS_W  = OSS_W + LAMBDA + 1
) (
  input  logic [LAMBDA-1:0] shamt,
  output logic [SDS_W-1:0]  sds_op
);

  typedef logic [SDS_W-1:0] rom_t [N];

  function automatic rom_t build_table();
    rom_t t;
    for (int unsigned s = 0; s < N; s++) begin
      int unsigned      k;
      logic [SDS_W-1:0] e;
      k = active_stages(s);
      e = '0;
      e[OSS_W-1:0] = OSS_W'(k);
      e[OSS_W] = 1'b1;
      for (int unsigned j = 0; j < LAMBDA; j++)
        e[OSS_W+1+j] = (j < k);
      t[s] = e;
    end
    return t;
  endfunction

  localparam rom_t TABLE = build_table();

  assign sds_op = TABLE[shamt];

endmodule
