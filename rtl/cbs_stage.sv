// cbs_stage: one stage of the conventional (logarithmic) barrel shifter.
//
// A stage is a row of N two-input multiplexers. With its select line low it
// passes its input unchanged; with the select line high it passes the input
// shifted by SHIFT places (SHIFT = 2^i for stage i). The kind of shift, and so
// the bits that enter at the vacated end, comes from `op`: zeros (logical),
// copies of the top bit (right arithmetic) or the bits that leave at the other
// end (circular). Purely combinational.
//
// Ports: in_data/out_data N bits, sel = stage select line S_i, op = shift kind.
// The stage structure follows the description of the shifter; supporting all
// six shift kinds in every stage is this design's choice. Unknown op codes
// behave as a logical right shift.
module cbs_stage
  import abbs_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned SHIFT = 1
) (
  input  logic [N-1:0] in_data,
  input  logic         sel,
  input  shift_op_e    op,
  output logic [N-1:0] out_data
);

  logic [SHIFT-1:0] fill_r;   // bits entering at the top on a right shift
  logic [SHIFT-1:0] fill_l;   // bits entering at the bottom on a left shift
  logic             left;
  logic [N-1:0]     shifted;

  always_comb begin
    unique case (op)
      OP_SRA:  fill_r = {SHIFT{in_data[N-1]}};
      OP_SRC:  fill_r = in_data[SHIFT-1:0];
      default: fill_r = '0;
    endcase
    fill_l  = (op == OP_SLC) ? in_data[N-1 -: SHIFT] : '0;
    left    = (op == OP_SLL) || (op == OP_SLA) || (op == OP_SLC);
    shifted = left ? {in_data[N-SHIFT-1:0], fill_l}
                   : {fill_r, in_data[N-1:SHIFT]};
    out_data = sel ? shifted : in_data;
  end

endmodule
