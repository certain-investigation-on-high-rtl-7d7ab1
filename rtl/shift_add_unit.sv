// shift_add_unit: the Shift-and-Add unit that forms the eight even 4-bit binary
// common sub-expressions (BCSs) of the input x: 0x, 2x, 4x, 6x, 8x, 10x, 12x, 14x.
//
// Only three adders/subtractors are used; every other term is a hardwired shift:
//   2x  = x<<1          4x  = x<<2          8x  = x<<3
//   6x  = (x<<1) + (x<<2)                   12x = 6x<<1
//   14x = (x<<4) - (x<<1)                   10x = (x<<1) + (x<<3)
// This network, its shift amounts and its use of one subtractor are those of the
// reference Shift-and-Add unit. The unit is purely combinational.
//
// Interface: x is a two's-complement sample of XW bits. bcs[i] is (2*i)*x,
// sign-extended to XW+4 bits, so bcs can feed an 8:1 multiplexer indexed by the
// three upper bits of a coefficient nibble.
module shift_add_unit #(
  parameter int unsigned XW = 8
) (
  input  logic signed [XW-1:0]       x,
  output logic signed [7:0][XW+3:0]  bcs
);

  logic signed [XW+3:0] xe;
  logic signed [XW+3:0] x2, x4, x8, x16;
  logic signed [XW+3:0] x6, x10, x14;

  always_comb begin
    xe  = {{4{x[XW-1]}}, x};  // sign extension to XW+4 bits
    x2  = xe <<< 1;
    x4  = xe <<< 2;
    x8  = xe <<< 3;
    x16 = xe <<< 4;
    x6  = x2 + x4;     // adder
    x14 = x16 - x2;    // subtractor
    x10 = x2 + x8;     // adder
    bcs[0] = '0;
    bcs[1] = x2;
    bcs[2] = x4;
    bcs[3] = x6;
    bcs[4] = x8;
    bcs[5] = x10;
    bcs[6] = x6 <<< 1; // 12x, shift of 6x
    bcs[7] = x14;
  end

endmodule
