// shift_add_unit_tb: exhaustive check of the Shift-and-Add unit for 8-bit
// samples, plus random 12-bit samples: bcs[i] must equal (2*i)*x.
module shift_add_unit_tb;
  int checks = 0, failures = 0;

  logic signed [7:0]         x8;
  logic signed [7:0][11:0]   b8;
  logic signed [11:0]        x12;
  logic signed [7:0][15:0]   b12;

  shift_add_unit #(.XW(8))  dut8  (.x(x8),  .bcs(b8));
  shift_add_unit #(.XW(12)) dut12 (.x(x12), .bcs(b12));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x8 = 8'(v);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (signed'(b8[i]) !== 12'(2 * i * v)) begin
          failures++;
          $display("FAIL x=%0d i=%0d got %0d", v, i, signed'(b8[i]));
        end
      end
    end
    for (int n = 0; n < 500; n++) begin
      int v;
      v = int'(signed'(12'($urandom)));
      x12 = 12'(v);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (signed'(b12[i]) !== 16'(2 * i * v)) begin
          failures++;
          $display("FAIL x12=%0d i=%0d", v, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
