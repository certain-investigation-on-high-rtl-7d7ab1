// fir_ctrl: sequencer of the reconfigurable FIR filter.
//
// It drives the select lines S1/S2 of the DEMUX, the load enables of registers
// R1.1, R1.2, R2.1, R2.2, R3.1, R3.2, the operations of PE1 and PE2 and the RAM
// ports, so that the two-PE datapath computes one output of a TAPS-tap
// transposed-form filter per input sample:
//   y(n)    = h0*x(n) + s1(n-1)
//   s_k(n)  = h_k*x(n) + s_{k+1}(n-1),   s_TAPS(n) = 0
// where s_k are the partial sums kept in the RAM (word k).
//
// Per input sample (accepted when x_valid and x_ready are high; R1.1 takes x):
// for each tap k = 0 .. TAPS-1 the states are
//   LOAD : R2.1 <= |h_k| (coefficient table at address k); RAM read of word k+1
//   MUL  : PE1 multiplies, R3.1 <= x*|h_k|;  R1.2 <= s_{k+1} (0 for the last tap)
//   FWD  : DEMUX S1=0,S2=0: R3.1 -> R2.2
//   NEG  : (only if h_k < 0) PE2 negates, R3.2 <= -R2.2
//   NFWD : (only if h_k < 0) DEMUX S1=1,S2=0: R3.2 -> R2.2
//   ADD  : PE2 adds with carry-in 0, R3.2 <= R1.2 + R2.2
//   WB   : DEMUX S1=1,S2=1: R3.2 -> bus; tap 0 raises y_valid, other taps write
//          RAM word k
// so a tap takes 5 cycles (7 with a negative coefficient). The WB state of tap 0
// starts 4 clock edges after the edge that accepts the sample (6 if h0 < 0).
// After the last tap the sequencer returns to IDLE, where the next sample is
// accepted, so samples are taken at most once per 5*TAPS + 2*(negative taps) + 1
// cycles.
// clear, taken only in IDLE, zeroes the RAM (the filter history).
//
// The datapath, the DEMUX with S1/S2 and the RAM are those of the reference
// architecture; this schedule, the transposed form and the state encoding are
// this design's own, as the reference does not describe its controller.
module fir_ctrl
  import fir_pkg::*;
#(
  parameter int unsigned TAPS = TAPS_DEF,
  parameter int unsigned AW   = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // sample handshake and clear
  input  logic          x_valid,
  output logic          x_ready,
  input  logic          clear,
  // coefficient table
  output logic [AW-1:0] tap,        // coefficient address
  input  logic          coef_neg,   // sign of h_tap
  // register loads
  output logic          ld_r11,
  output logic          ld_r21,
  output logic          ld_r12,
  output logic          zero_r12,   // R1.2 <= 0 instead of RAM data
  output logic          ld_r31,
  output logic          ld_r32,
  // processing elements
  output pe_op_e        pe1_op,
  output pe_op_e        pe2_op,
  output logic          pe2_cin,
  // DEMUX
  output logic          route_en,
  output route_sel_t    route_sel,
  // RAM
  output logic          ram_clr,
  output logic [AW-1:0] ram_raddr,
  output logic          ram_we,
  output logic [AW-1:0] ram_waddr,
  // filter output strobe
  output logic          y_valid
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_MUL, S_FWD, S_NEG, S_NFWD, S_ADD, S_WB
  } state_e;

  state_e state, state_nx;
  logic [AW-1:0] k, k_nx;
  logic          last;

  assign last = (k == AW'(TAPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
    end else begin
      state <= state_nx;
      k     <= k_nx;
    end
  end

  always_comb begin
    state_nx  = state;
    k_nx      = k;
    x_ready   = 1'b0;
    ld_r11    = 1'b0;
    ld_r21    = 1'b0;
    ld_r12    = 1'b0;
    zero_r12  = 1'b0;
    ld_r31    = 1'b0;
    ld_r32    = 1'b0;
    pe1_op    = PE_MUL;
    pe2_op    = PE_ADD;
    pe2_cin   = 1'b0;
    route_en  = 1'b0;
    route_sel = '{s1: 1'b0, s2: 1'b0};
    ram_clr   = 1'b0;
    ram_raddr = last ? '0 : AW'(k + 1'b1);
    ram_we    = 1'b0;
    ram_waddr = k;
    y_valid   = 1'b0;

    unique case (state)
      S_IDLE: begin
        x_ready = !clear;
        ram_clr = clear;
        if (x_valid && !clear) begin
          ld_r11   = 1'b1;
          k_nx     = '0;
          state_nx = S_LOAD;
        end
      end
      S_LOAD: begin
        ld_r21   = 1'b1;
        state_nx = S_MUL;
      end
      S_MUL: begin
        pe1_op   = PE_MUL;
        ld_r31   = 1'b1;
        ld_r12   = 1'b1;
        zero_r12 = last;
        state_nx = S_FWD;
      end
      S_FWD: begin
        route_en  = 1'b1;
        route_sel = '{s1: 1'b0, s2: 1'b0};
        state_nx  = coef_neg ? S_NEG : S_ADD;
      end
      S_NEG: begin
        pe2_op   = PE_NEG;
        ld_r32   = 1'b1;
        state_nx = S_NFWD;
      end
      S_NFWD: begin
        route_en  = 1'b1;
        route_sel = '{s1: 1'b1, s2: 1'b0};
        state_nx  = S_ADD;
      end
      S_ADD: begin
        pe2_op   = PE_ADD;
        ld_r32   = 1'b1;
        state_nx = S_WB;
      end
      S_WB: begin
        route_en  = 1'b1;
        route_sel = '{s1: 1'b1, s2: 1'b1};
        ram_we    = (k != '0);
        y_valid   = (k == '0);
        if (last) begin
          state_nx = S_IDLE;
        end else begin
          k_nx     = k + 1'b1;
          state_nx = S_LOAD;
        end
      end
      default: state_nx = S_IDLE;
    endcase
  end

  assign tap = k;

  // a RAM write or an output only ever comes from the bus route of R3.2
  a_we_route: assert property (@(posedge clk) disable iff (!rst_n)
    (ram_we || y_valid) |-> (route_en && route_sel.s1 && route_sel.s2));

endmodule
