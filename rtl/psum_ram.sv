// psum_ram: the RAM of the filter, holding the partial sums of the
// transposed-form filter between input samples.
//
// One synchronous write port, fed from the DEMUX bus, and one synchronous read
// port whose data is loaded into register R1.2 (read data appears the cycle
// after the address). clr sets every word to zero in one cycle so that a new
// signal starts from an empty filter; reset does the same. The RAM and its
// connections are those of the reference architecture; its depth, ports and
// clear are this design's own choices.
module psum_ram #(
  parameter int unsigned W     = 19,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (clr) begin
        for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      end else if (we) begin
        mem[waddr] <= wdata;
      end
      rdata <= mem[raddr];
    end
  end

endmodule
