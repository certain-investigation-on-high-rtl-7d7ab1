// fir_ctrl_tb: runs the sequencer alone for many samples with random coefficient
// signs and checks, per sample: the latency to the output strobe, the sample
// period, the order of RAM reads and writes, the zeroed R1.2 on the last tap,
// the DEMUX routes used and the number of negations; and that clear is honoured
// only in IDLE.
module fir_ctrl_tb;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  localparam int TAPS = 8, AW = 3;

  logic          clk = 0, rst_n = 0;
  logic          x_valid = 0, x_ready, clear = 0;
  logic [AW-1:0] tap;
  logic          coef_neg;
  logic          ld_r11, ld_r21, ld_r12, zero_r12, ld_r31, ld_r32;
  pe_op_e        pe1_op, pe2_op;
  logic          pe2_cin;
  logic          route_en;
  route_sel_t    route_sel;
  logic          ram_clr, ram_we, y_valid;
  logic [AW-1:0] ram_raddr, ram_waddr;

  logic [TAPS-1:0] signs;
  assign coef_neg = signs[tap];

  fir_ctrl #(.TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    int acc_cyc, prev_acc, n_neg_exp, n_neg, n_we, n_y, n_r12, lat;
    int n_fwd, n_nfwd, n_bus, exp_wa, last_raddr, n_clr;
    bit seen_acc;
    signs = '0;
    prev_acc = -1;
    n_clr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      @(negedge clk);
      signs = (s < 2) ? (s == 0 ? '0 : '1) : TAPS'($urandom);
      // occasionally ask for a clear first
      if (s % 17 == 5) begin
        clear = 1;
        #1;
        chk(x_ready == 0 && ram_clr == 1, "clear in idle");
        n_clr++;
        @(negedge clk);
        clear = 0;
      end
      x_valid = 1;
      #1;
      chk(x_ready == 1 && ld_r11 == 1, "ready in idle");
      acc_cyc = cyc + 1;
      if (prev_acc >= 0 && s % 17 != 6)
        ; // period is checked below from the state count
      n_neg_exp = $countones(signs);
      n_neg = 0; n_we = 0; n_y = 0; n_r12 = 0; n_fwd = 0; n_nfwd = 0; n_bus = 0;
      exp_wa = 1; lat = -1; last_raddr = -1;
      @(negedge clk);
      x_valid = 0;
      while (!x_ready) begin
        chk(ram_clr == 0, "no clear while busy");
        if (pe2_op == PE_NEG && ld_r32) n_neg++;
        if (ld_r12) begin
          n_r12++;
          chk(zero_r12 == (tap == AW'(TAPS-1)), "zero_r12 only on last tap");
          if (tap != AW'(TAPS-1))
            chk(last_raddr == int'(tap) + 1, "RAM read of word k+1");
        end
        last_raddr = int'(ram_raddr);
        if (route_en && route_sel == '{1'b0, 1'b0}) n_fwd++;
        if (route_en && route_sel == '{1'b1, 1'b0}) n_nfwd++;
        if (route_en && route_sel == '{1'b1, 1'b1}) n_bus++;
        if (ld_r31) chk(pe1_op == PE_MUL, "PE1 multiplies");
        if (ram_we) begin
          chk(int'(ram_waddr) == exp_wa, "RAM write order");
          exp_wa++;
          n_we++;
        end
        if (y_valid) begin
          n_y++;
          lat = cyc - acc_cyc;
        end
        @(negedge clk);
      end
      chk(n_y == 1, "one output strobe");
      chk(lat == (signs[0] ? 6 : 4), $sformatf("latency %0d", lat));
      chk(n_we == TAPS - 1, "RAM writes");
      chk(n_r12 == TAPS, "R1.2 loads");
      chk(n_neg == n_neg_exp, "negations");
      chk(n_fwd == TAPS && n_nfwd == n_neg_exp && n_bus == TAPS, "routes");
      // the next acceptance edge is cyc+1 at this point
      chk(cyc + 1 - acc_cyc == 5 * TAPS + 2 * n_neg_exp + 1,
          $sformatf("period %0d", cyc + 1 - acc_cyc));
      prev_acc = acc_cyc;
    end
    chk(n_clr > 0, "clear exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
