// fir_pkg: types and default sizes shared by the reconfigurable FIR filter.
//
// The filter is built from two processing elements (PEs) that each add with a
// carry, multiply, or negate. A routing switch (the DEMUX) steered by two select
// lines, S1 and S2, sends results back to a PE input or onto the RAM/output bus.
// The tap count (8) and the coefficient width (8) follow the filter this design
// reproduces. The sample width (8) and every encoding below are this design's
// own choices.
package fir_pkg;

  // Default sizes.
  localparam int unsigned TAPS_DEF   = 8;   // 8-tap filter
  localparam int unsigned COEF_W_DEF = 8;   // 8-bit coefficients (two 4-bit nibbles)
  localparam int unsigned DATA_W_DEF = 8;   // input sample width (own choice)

  // Operation of a processing element.
  typedef enum logic [1:0] {
    PE_ADD = 2'd0,   // a + b + cin
    PE_MUL = 2'd1,   // a * b, b taken as an unsigned coefficient magnitude
    PE_NEG = 2'd2    // -b, formed as ~b + 1 on the same adder
  } pe_op_e;

  // DEMUX select: S1 picks the source, S2 the destination.
  //   S1 = 0 : R3.1 (PE1 result)     S1 = 1 : R3.2 (PE2 result)
  //   S2 = 0 : back to R2.2          S2 = 1 : RAM / OUTPUT bus
  typedef struct packed {
    logic s1;
    logic s2;
  } route_sel_t;

endpackage
