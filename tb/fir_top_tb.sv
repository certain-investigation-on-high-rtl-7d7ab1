// fir_top_tb: end-to-end test of the 8-tap filter at its default sizes.
//
// Loads coefficient sets through the write port, streams random 8-bit samples
// and compares every output with a direct-form reference,
//   y(n) = sum_k h_k(n-k) * x(n-k),
// where h(m) is the coefficient set in force when sample m was accepted (the
// filter keeps partial sums, so a reload takes effect sample by sample). It
// also checks the output latency and the sample period, and counts each
// mechanism: positive and negative taps (negation in PE2), the three DEMUX
// routes, RAM write-backs, reconfiguration with and without clear, clear
// itself, and extreme coefficients (-128, 127) with extreme samples.
module fir_top_tb;
  import fir_pkg::*;
  localparam int TAPS = 8, DW = 8, CW = 8, AW = 3, ACC_W = DW + CW + AW;

  int checks = 0, failures = 0;
  logic                   clk = 0, rst_n = 0;
  logic                   x_valid = 0, x_ready, clear = 0, coef_we = 0, y_valid;
  logic signed [DW-1:0]   x_in = '0;
  logic [AW-1:0]          coef_addr = '0;
  logic [CW-1:0]          coef_wdata = '0;
  logic signed [ACC_W-1:0] y_out;

  fir_top dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int h_now [TAPS];
  int xh [$];          // past samples, newest first
  int hh [$][TAPS];    // coefficient set in force for each past sample

  // mechanism counters
  int n_pos = 0, n_negtap = 0, n_route_fb1 = 0, n_route_fb2 = 0, n_route_bus = 0;
  int n_ram_wr = 0, n_reconf = 0, n_reconf_live = 0, n_clear = 0, n_extreme = 0;

  always @(negedge clk) if (rst_n) begin
    if (dut.route_en && !dut.route_sel.s1 && !dut.route_sel.s2) n_route_fb1++;
    if (dut.route_en &&  dut.route_sel.s1 && !dut.route_sel.s2) n_route_fb2++;
    if (dut.route_en &&  dut.route_sel.s1 &&  dut.route_sel.s2) n_route_bus++;
    if (dut.u_ram.we) n_ram_wr++;
    if (dut.ld_r31) begin
      if (dut.coef_neg) n_negtap++; else n_pos++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic load_coefs(input int mode);
    for (int i = 0; i < TAPS; i++) begin
      int v;
      case (mode)
        0: v = int'(signed'(CW'($urandom)));
        1: v = (i % 2 != 0) ? -128 : 127;
        2: v = i + 1;
        default: v = -(i + 1);
      endcase
      @(negedge clk);
      coef_we = 1; coef_addr = AW'(i); coef_wdata = CW'(v);
      h_now[i] = v;
    end
    @(negedge clk);
    coef_we = 0;
    n_reconf++;
  endtask

  task automatic do_clear();
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    xh.delete();
    hh.delete();
    n_clear++;
  endtask

  // send one sample and check its output, latency and period
  task automatic run_sample(input int xv);
    int acc, exp_y, lat, hrow [TAPS], nneg;
    @(negedge clk);
    while (!x_ready) @(negedge clk);
    x_valid = 1; x_in = DW'(xv);
    acc = cyc + 1;
    hrow = h_now;
    xh.push_front(xv);
    hh.push_front(hrow);
    if (xh.size() > TAPS) begin
      void'(xh.pop_back());
      void'(hh.pop_back());
    end
    exp_y = 0;
    for (int k = 0; k < xh.size(); k++) exp_y += hh[k][k] * xh[k];
    nneg = 0;
    foreach (hrow[i]) if (hrow[i] < 0) nneg++;
    @(negedge clk);
    x_valid = 0;
    while (!y_valid) @(negedge clk);
    lat = cyc - acc;
    chk(int'(y_out) == exp_y, $sformatf("y=%0d exp %0d", y_out, exp_y));
    chk(lat == (hrow[0] < 0 ? 7 : 5), $sformatf("latency %0d", lat));
    while (!x_ready) @(negedge clk);
    chk(cyc + 1 - acc == 5 * TAPS + 2 * nneg + 1, $sformatf("period %0d", cyc + 1 - acc));
    if ((hrow[0] == -128 || hrow[0] == 127) && (xv == -128 || xv == 127)) n_extreme++;
  endtask

  initial begin
    foreach (h_now[i]) h_now[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // impulse response with positive then negative coefficients
    load_coefs(2);
    run_sample(1);
    for (int i = 1; i < TAPS + 2; i++) run_sample(0);
    do_clear();
    load_coefs(3);
    run_sample(1);
    for (int i = 1; i < TAPS + 2; i++) run_sample(0);
    // extreme values
    do_clear();
    load_coefs(1);
    for (int i = 0; i < 3 * TAPS; i++) run_sample((i % 3 == 0) ? -128 : ((i % 3 == 1) ? 127 : -1));
    // random sets, reloaded with clear and without
    for (int r = 0; r < 12; r++) begin
      if (r % 2 != 0) do_clear(); else if (r > 0) n_reconf_live++;
      load_coefs(0);
      for (int i = 0; i < 40; i++) run_sample(int'(signed'(DW'($urandom))));
    end
    chk(n_pos > 0, "positive taps");
    chk(n_negtap > 0, "negative taps (PE2 negation)");
    chk(n_route_fb1 > 0, "route R3.1 -> R2.2");
    chk(n_route_fb2 > 0, "route R3.2 -> R2.2");
    chk(n_route_bus > 0, "route R3.2 -> bus");
    chk(n_ram_wr > 0, "RAM write-back");
    chk(n_reconf > 0 && n_reconf_live > 0, "reconfiguration");
    chk(n_clear > 0, "clear");
    chk(n_extreme > 0, "extreme values");
    $display("pos=%0d neg=%0d fb1=%0d fb2=%0d bus=%0d ramwr=%0d reconf=%0d live=%0d clear=%0d extreme=%0d",
             n_pos, n_negtap, n_route_fb1, n_route_fb2, n_route_bus, n_ram_wr, n_reconf,
             n_reconf_live, n_clear, n_extreme);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
