// data_reg: W-bit input register with load enable.
//
// Holds the operand of the shifter stable for the whole handshake, as the
// bundled-data protocol requires. Loads `ip` on a clock edge where `en` is
// high; synchronous active-high reset to zero. `op` is the held value.
// The two instances (32-bit data, 5-bit shift amount) follow the shifter's
// simulation trace; the enable and the reset value are this design's choice.
module data_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] ip,
  output logic [W-1:0] op
);

  always_ff @(posedge clk) begin
    if (rst)     op <= '0;
    else if (en) op <= ip;
  end

endmodule
