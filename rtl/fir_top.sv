// fir_top: reconfigurable FIR filter built from two processing elements.
//
// The filter computes y(n) = sum_{k=0}^{TAPS-1} h_k * x(n-k) with TAPS = 8
// reloadable 8-bit coefficients. Its datapath is a small processing-element
// array:
//   IN1 -> R1.1 ; coefficient table (IN2) -> R2.1 ; RAM -> R1.2 ; DEMUX -> R2.2
//   PE1(R1.1, R2.1) -> R3.1      (multiplication, constant-shift multiplier)
//   PE2(R1.2, R2.2) -> R3.2      (addition with carry, or negation)
//   DEMUX(R3.1, R3.2; S1, S2) -> R2.2, or -> bus -> RAM and OUTPUT
// The multiplier never uses a general multiplier: a Shift-and-Add unit forms
// 0x, 2x, .., 14x with three adders, and each coefficient nibble selects one of
// them through an 8:1 multiplexer, adds x for an odd nibble, and a final adder
// combines the nibbles. The RAM holds the partial sums of a transposed-form
// filter; the controller fir_ctrl sequences one tap per 5 cycles (7 for a
// negative coefficient, whose product is negated by PE2).
//
// Interface
//   x_valid/x_ready/x_in  : sample input (IN1), DATA_W-bit two's complement
//   coef_we/coef_addr/coef_wdata : write one coefficient (reconfiguration)
//   clear                 : zero the filter history (taken when x_ready would be)
//   y_valid/y_out         : one ACC_W-bit output per accepted sample
// Timing: y_valid is high for one cycle, set by the 5th clock edge after the
// edge that accepts a sample (7th if h0 < 0). The next sample can be accepted
// 5*TAPS + 2*(negative taps) + 1 cycles after the previous one (41 to 57
// cycles for 8 taps).
//
// The register names, the two PEs, the DEMUX with S1/S2, the RAM and the
// feedback paths follow the reference architecture; the sample width, the
// filter form, the schedule and the sign handling are this design's own.
module fir_top
  import fir_pkg::*;
#(
  parameter int unsigned TAPS   = TAPS_DEF,
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned AW     = (TAPS > 1) ? $clog2(TAPS) : 1,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + AW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  output logic                     x_ready,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic                     clear,
  input  logic                     coef_we,
  input  logic [AW-1:0]            coef_addr,
  input  logic [COEF_W-1:0]        coef_wdata,
  output logic                     y_valid,
  output logic signed [ACC_W-1:0]  y_out
);

  // control
  logic          ld_r11, ld_r21, ld_r12, zero_r12, ld_r31, ld_r32;
  pe_op_e        pe1_op, pe2_op;
  logic          pe2_cin;
  logic          route_en;
  route_sel_t    route_sel;
  logic          ram_clr, ram_we;
  logic [AW-1:0] ram_raddr, ram_waddr, tap;
  logic          ctrl_y_valid;

  // datapath
  logic signed [ACC_W-1:0] r11, r12, r21, r22, r31, r32;
  logic signed [ACC_W-1:0] pe1_y, pe2_y;
  logic                    pe1_cout, pe2_cout;
  logic [COEF_W-1:0]       coef_mag;
  logic                    coef_neg;
  logic [ACC_W-1:0]        fb_data, bus_data, ram_rdata;
  logic                    fb_valid, bus_valid;

  fir_ctrl #(.TAPS(TAPS), .AW(AW)) u_ctrl (
    .clk, .rst_n,
    .x_valid, .x_ready, .clear,
    .tap, .coef_neg,
    .ld_r11, .ld_r21, .ld_r12, .zero_r12, .ld_r31, .ld_r32,
    .pe1_op, .pe2_op, .pe2_cin,
    .route_en, .route_sel,
    .ram_clr, .ram_raddr, .ram_we, .ram_waddr,
    .y_valid (ctrl_y_valid)
  );

  coef_lut #(.TAPS(TAPS), .CW(COEF_W), .AW(AW)) u_lut (
    .clk, .rst_n,
    .we (coef_we), .waddr (coef_addr), .wdata (coef_wdata),
    .raddr (tap), .mag (coef_mag), .neg (coef_neg)
  );

  // input registers R1.x and R2.x
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r11 <= '0;
      r12 <= '0;
      r21 <= '0;
      r22 <= '0;
    end else begin
      if (ld_r11) r11 <= ACC_W'(x_in);                // IN1, sign-extended
      if (ld_r21) r21 <= ACC_W'(coef_mag);            // IN2, coefficient magnitude
      if (ld_r12) r12 <= zero_r12 ? '0 : ram_rdata;   // RAM -> R1.2
      if (fb_valid) r22 <= fb_data;                   // DEMUX -> R2.2
    end
  end

  pe #(.W(ACC_W), .CW(COEF_W)) u_pe1 (
    .op (pe1_op), .a (r11), .b (r21), .cin (1'b0), .y (pe1_y), .cout (pe1_cout)
  );

  pe #(.W(ACC_W), .CW(COEF_W)) u_pe2 (
    .op (pe2_op), .a (r12), .b (r22), .cin (pe2_cin), .y (pe2_y), .cout (pe2_cout)
  );

  // result registers R3.x
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r31 <= '0;
      r32 <= '0;
    end else begin
      if (ld_r31) r31 <= pe1_y;
      if (ld_r32) r32 <= pe2_y;
    end
  end

  route_demux #(.W(ACC_W)) u_demux (
    .en (route_en), .sel (route_sel), .r31 (r31), .r32 (r32),
    .fb_data, .fb_valid, .bus_data, .bus_valid
  );

  psum_ram #(.W(ACC_W), .DEPTH(TAPS), .AW(AW)) u_ram (
    .clk, .rst_n, .clr (ram_clr),
    .we (ram_we && bus_valid), .waddr (ram_waddr), .wdata (bus_data),
    .raddr (ram_raddr), .rdata (ram_rdata)
  );

  // OUTPUT, registered from the bus
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_out   <= '0;
    end else begin
      y_valid <= ctrl_y_valid && bus_valid;
      if (ctrl_y_valid && bus_valid) y_out <= bus_data;
    end
  end

endmodule
