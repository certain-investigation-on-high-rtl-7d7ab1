// route_demux: the DEMUX between the result registers R3.1/R3.2 and their
// destinations, steered by the select lines S1 and S2.
//
// S1 picks the source (0: R3.1, the PE1 result; 1: R3.2, the PE2 result) and S2
// the destination (0: back to register R2.2; 1: the bus that feeds the RAM and
// the filter output). One route is active per cycle, and only when en is high;
// a valid strobe goes with each destination. The two sources, the two select
// lines and the three destinations (R2.2, RAM, OUTPUT, the last two sharing one
// bus) are those of the reference architecture; the encoding of S1/S2 is this
// design's own. Combinational.
module route_demux
  import fir_pkg::*;
#(
  parameter int unsigned W = 19
) (
  input  logic             en,
  input  route_sel_t       sel,
  input  logic [W-1:0]     r31,
  input  logic [W-1:0]     r32,
  output logic [W-1:0]     fb_data,   // to R2.2
  output logic             fb_valid,
  output logic [W-1:0]     bus_data,  // to RAM and OUTPUT
  output logic             bus_valid
);

  logic [W-1:0] src;

  always_comb begin
    src       = sel.s1 ? r32 : r31;
    fb_valid  = en && !sel.s2;
    bus_valid = en &&  sel.s2;
    fb_data   = fb_valid  ? src : '0;
    bus_data  = bus_valid ? src : '0;
  end

endmodule
