// abbs_pkg: types and helper functions shared by the barrel shifter blocks.
//
// The shift operations are the six a barrel shifter is normally asked for:
// logical, arithmetic and circular shifts to the right and to the left. The
// 3-bit encoding below is this design's own choice. SLA behaves like SLL
// (zeros enter at the low end), as a left arithmetic shift does.
//
// The helper functions describe the shift-dependent selector (SDS) table: how
// many CBS stages a shift amount really uses, which decides both the output
// stage the result is taken from and the length of the matched delay path.
package abbs_pkg;

  typedef enum logic [2:0] {
    OP_SRL = 3'd0,  // shift right logical: zeros enter at the top
    OP_SRA = 3'd1,  // shift right arithmetic: copies of the sign bit enter
    OP_SRC = 3'd2,  // shift right circular (rotate right)
    OP_SLL = 3'd3,  // shift left logical: zeros enter at the bottom
    OP_SLA = 3'd4,  // shift left arithmetic: zeros enter at the bottom
    OP_SLC = 3'd5   // shift left circular (rotate left)
  } shift_op_e;

  // Number of shifter stages whose select line can be 1 for shift amount s:
  // the stage of the highest set bit and all stages below it. Zero for s = 0.
  function automatic int unsigned active_stages(input int unsigned s);
    int unsigned k;
    k = 0;
    for (int unsigned b = 0; b < 32; b++)
      if (s[b]) k = b + 1;
    return k;
  endfunction

endpackage
