// csm_multiplier_tb: exhaustive check of the 8-bit-coefficient multiplier block
// over all 8-bit signed samples and all 8-bit unsigned coefficients, and a
// random check of a 12-bit-coefficient instance with 16-bit samples.
module csm_multiplier_tb;
  int checks = 0, failures = 0;

  logic signed [7:0]   x;
  logic        [7:0]   c;
  logic signed [15:0]  p;
  logic signed [15:0]  xw;
  logic        [11:0]  cw;
  logic signed [27:0]  pw;

  csm_multiplier #(.XW(8),  .CW(8))  dut  (.x(x),  .c(c),  .p(p));
  csm_multiplier #(.XW(16), .CW(12)) dutw (.x(xw), .c(cw), .p(pw));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = -128; xv < 128; xv++) begin
      for (int cv = 0; cv < 256; cv++) begin
        x = 8'(xv);
        c = 8'(cv);
        #1;
        checks++;
        if (int'(p) !== xv * cv) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", xv, cv, p);
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int xv, cv;
      xv = int'(signed'(16'($urandom)));
      cv = int'(12'($urandom));
      xw = 16'(xv);
      cw = 12'(cv);
      #1;
      checks++;
      if (int'(pw) !== xv * cv) begin
        failures++;
        if (failures < 10) $display("FAIL wide %0d * %0d = %0d", xv, cv, pw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
