// psum_ram_tb: random writes and reads against a model array, with read data
// checked one cycle after the address, and a clear that must zero all words.
module psum_ram_tb;
  int checks = 0, failures = 0;
  localparam int W = 19, DEPTH = 8, AW = 3;
  logic          clk = 0, rst_n = 0, clr = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  model [DEPTH];
  logic [W-1:0]  exp_rd;
  int n_clr = 0;

  psum_ram #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .clr, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clr   = ($urandom % 100) == 0;
      we    = 1'($urandom);
      waddr = AW'($urandom);
      wdata = W'($urandom);
      raddr = AW'($urandom);
      exp_rd = model[raddr];
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== exp_rd) begin
        failures++;
        $display("FAIL read %0d got %h exp %h", raddr, rdata, exp_rd);
      end
      if (clr) begin
        foreach (model[i]) model[i] = '0;
        n_clr++;
      end else if (we) model[waddr] = wdata;
    end
    if (n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
