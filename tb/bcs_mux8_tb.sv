// bcs_mux8_tb: random candidate sets, every select value; the output must be
// the selected candidate.
module bcs_mux8_tb;
  int checks = 0, failures = 0;
  logic [7:0][11:0] din;
  logic [2:0]       sel;
  logic [11:0]      dout;
  logic [11:0]      ref_v [8];

  bcs_mux8 #(.W(12)) dut (.din, .sel, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 8; i++) begin
        ref_v[i] = 12'($urandom);
        din[i]   = ref_v[i];
      end
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        checks++;
        if (dout !== ref_v[s]) begin
          failures++;
          $display("FAIL sel=%0d got %h exp %h", s, dout, ref_v[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
