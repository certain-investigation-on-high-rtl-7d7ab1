// coef_lut_tb: loads random signed coefficients, then reads every address and
// checks the sign-magnitude output, including the most negative coefficient.
module coef_lut_tb;
  int checks = 0, failures = 0;
  localparam int TAPS = 8, CW = 8, AW = 3;
  logic          clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [CW-1:0] wdata = '0, mag;
  logic          neg;
  int            model [TAPS];

  coef_lut #(.TAPS(TAPS), .CW(CW)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .mag, .neg);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < TAPS; i++) begin
      raddr = AW'(i);
      #1;
      checks++;
      if (int'(mag) !== (model[i] < 0 ? -model[i] : model[i]) || neg !== (model[i] < 0)) begin
        failures++;
        $display("FAIL addr %0d h=%0d mag=%0d neg=%0b", i, model[i], mag, neg);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < TAPS; i++) begin
        @(negedge clk);
        we = 1'b1;
        waddr = AW'(i);
        model[i] = (r == 0 && i == 3) ? -128 : int'(signed'(8'($urandom)));
        wdata = CW'(model[i]);
        @(posedge clk);
        #1 we = 1'b0;
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
