// coef_lut: the coefficient table (LUT) that drives the multiplexer selects of
// the multiplier block. Writing it reconfigures the filter.
//
// Holds TAPS two's-complement coefficients of CW bits. The write port stores a
// coefficient on a clock edge. The read port is combinational and returns the
// coefficient in sign-magnitude form: mag = |h| (CW bits, so -2**(CW-1) maps to
// 2**(CW-1)) and neg = 1 for a negative coefficient. The multiplier works on the
// magnitude; the sign is applied by a negation in the second processing element.
// The table drives the multiplexers as in the reference multiplier; storage
// format, sign handling and write port are this design's own. Reset clears the
// table to all zeros.
module coef_lut #(
  parameter int unsigned TAPS = 8,
  parameter int unsigned CW   = 8,
  parameter int unsigned AW   = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [CW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [CW-1:0] mag,
  output logic          neg
);

  logic [CW-1:0] tbl [TAPS];
  logic [CW-1:0] h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) tbl[i] <= '0;
    end else if (we) begin
      tbl[waddr] <= wdata;
    end
  end

  always_comb begin
    h   = tbl[raddr];
    neg = h[CW-1];
    mag = neg ? (~h + 1'b1) : h;
  end

endmodule
