// csm_multiplier: constant-shift-method multiplier block (PE1 / MB).
//
// Multiplies a two's-complement sample x by an unsigned coefficient c of CW bits
// (CW = 8 by default) without a general multiplier. One Shift-and-Add unit forms
// the even multiples 0x..14x once; they are shared by every coefficient nibble.
// For each 4-bit nibble n of c:
//   - an 8:1 multiplexer selected by n[3:1] picks (n & 4'b1110)*x,
//   - an adder adds x when n[0] is set, giving n*x,
// and the final adder sums the nibble products, the upper nibble shifted left by 4
// (by 4*i for nibble i). Every shift is a constant and hardwired. For CW = 8 this is
// the reference structure exactly: one Shift-and-Add unit, two 8:1 multiplexers,
// two adders and a final adder. Wider CW (a multiple of 4) repeats the nibble
// stage; that generalisation is this design's own.
//
// Combinational: p = x * c, exact, XW+CW bits signed.
module csm_multiplier #(
  parameter int unsigned XW = 8,
  parameter int unsigned CW = 8
) (
  input  logic signed [XW-1:0]    x,
  input  logic        [CW-1:0]    c,
  output logic signed [XW+CW-1:0] p
);

  localparam int unsigned NIB = CW / 4;

  if (CW % 4 != 0 || CW == 0) begin : g_bad_cw
    $error("csm_multiplier: CW must be a non-zero multiple of 4");
  end

  logic signed [7:0][XW+3:0] bcs;
  logic signed [NIB-1:0][XW+3:0] even_p;  // mux outputs
  logic signed [NIB-1:0][XW+3:0] nib_p;   // nibble products n*x

  shift_add_unit #(.XW(XW)) u_sau (.x(x), .bcs(bcs));

  for (genvar i = 0; i < NIB; i++) begin : g_nib
    bcs_mux8 #(.W(XW+4)) u_mux (
      .din  (bcs),
      .sel  (c[4*i+1 +: 3]),
      .dout (even_p[i])
    );
    // odd-bit adder: adds x when the nibble's lowest bit is set
    always_comb begin
      nib_p[i] = even_p[i] + (c[4*i] ? {{4{x[XW-1]}}, x} : '0);
    end
  end

  // final adder: nibble products weighted by 16**i
  always_comb begin
    p = '0;
    for (int i = 0; i < NIB; i++) begin
      p = p + ((XW+CW)'(signed'(nib_p[i])) <<< (4*i));
    end
  end

endmodule
