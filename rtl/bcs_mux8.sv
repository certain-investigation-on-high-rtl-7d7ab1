// bcs_mux8: 8:1 multiplexer that picks one even binary common sub-expression.
//
// The coefficient table drives sel with the three upper bits of a 4-bit
// coefficient nibble, so the output is (2*sel)*x taken from the Shift-and-Add
// unit. The lowest nibble bit is handled after the multiplexer, by adding x.
// Combinational. W is the width of each candidate.
module bcs_mux8 #(
  parameter int unsigned W = 12
) (
  input  logic [7:0][W-1:0] din,
  input  logic [2:0]        sel,
  output logic [W-1:0]      dout
);

  always_comb dout = din[sel];

endmodule
