// cbs: conventional barrel shifter of N bits with LAMBDA = log2(N) stages.
//
// Stage i (1..LAMBDA) shifts by 2^(i-1) places when bit i-1 of the shift
// amount is set, else passes its input on. The input is stage 0; every stage
// output is brought out in `stage_data`, because the completion-detection
// logic picks the result from the lowest stage after which nothing more
// changes. `stage_data[LAMBDA]` is the full shifter result. Combinational:
// the worst-case delay is LAMBDA multiplexer delays.
//
// Ports: in_data (N), shamt (LAMBDA bits, 0..N-1), op (shift kind),
// stage_data[0..LAMBDA] (N bits each). N = 32, LAMBDA = 5 as in the
// single-precision shifter described; the stage ordering (smallest shift
// first) is implied by the completion scheme, which counts stages from the
// input.
module cbs
  import abbs_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned LAMBDA = $clog2(N)
) (
  input  logic [N-1:0]      in_data,
  input  logic [LAMBDA-1:0] shamt,
  input  shift_op_e         op,
  output logic [N-1:0]      stage_data [LAMBDA+1]
);

  assign stage_data[0] = in_data;

  for (genvar i = 0; i < LAMBDA; i++) begin : g_stage
    cbs_stage #(.N(N), .SHIFT(2 ** i)) u_stage (
      .in_data (stage_data[i]),
      .sel     (shamt[i]),
      .op      (op),
      .out_data(stage_data[i+1])
    );
  end

endmodule
