// abbs_ref_pkg: reference model for the barrel shifter testbenches.
//
// Computes the expected result of each shift kind with the language's own
// shift operators on an n-bit word (n <= 64), independently of the
// stage-by-stage structure of the design, and the number of shifter stages a
// shift amount uses. Op codes: 0 SRL, 1 SRA, 2 SRC, 3 SLL, 4 SLA, 5 SLC.
package abbs_ref_pkg;

  function automatic logic [63:0] mask_n(input int n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 64'd1);
  endfunction

  function automatic logic [63:0] ref_shift(input logic [63:0] d_in, input int n,
                                            input int s, input int op);
    logic [63:0] d, r;
    logic        sign;
    d    = d_in & mask_n(n);
    sign = d[n-1];
    case (op)
      0:       r = d >> s;
      1:       r = (d >> s) | (sign ? (mask_n(n) & ~(mask_n(n) >> s)) : 64'd0);
      2:       r = (s == 0) ? d : ((d >> s) | (d << (n - s)));
      3, 4:    r = d << s;
      5:       r = (s == 0) ? d : ((d << s) | (d >> (n - s)));
      default: r = d >> s;
    endcase
    return r & mask_n(n);
  endfunction

  // Stages used by shift amount s: index of its highest set bit plus one.
  function automatic int stages_used(input int s);
    int k, v;
    k = 0;
    v = s;
    while (v != 0) begin
      k++;
      v = v >> 1;
    end
    return k;
  endfunction

endpackage
