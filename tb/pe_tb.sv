// pe_tb: random operands for the three functions of the processing element:
// addition with carry in and carry out, negation, and multiplication by an
// unsigned 8-bit coefficient magnitude.
module pe_tb;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  int n_add = 0, n_neg = 0, n_mul = 0, n_carry = 0;

  localparam int W = 19;
  pe_op_e             op;
  logic signed [W-1:0] a, b, y;
  logic               cin, cout;

  pe #(.W(W), .CW(8)) dut (.op, .a, .b, .cin, .y, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] exp_y, input logic exp_c, input string what);
    checks++;
    if (y !== exp_y || cout !== exp_c) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d cin=%0b: y=%0d cout=%0b exp %0d/%0b",
               what, a, b, cin, y, cout, signed'(exp_y), exp_c);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [W:0] s;
      logic [W-1:0] ua, ub;
      longint pa;
      ua = W'($urandom);
      ub = W'($urandom);
      a  = ua;
      b  = ub;
      cin = 1'($urandom);
      // addition with carry
      op = PE_ADD;
      #1;
      s = {1'b0, ua} + {1'b0, ub} + (W+1)'(cin);
      check(s[W-1:0], s[W], "add");
      n_add++;
      if (s[W]) n_carry++;
      // negation of b
      op = PE_NEG;
      #1;
      s = {1'b0, ~ub} + (W+1)'(1);
      check(W'(-longint'(signed'(ub))), s[W], "neg");
      n_neg++;
      // multiplication: sample in a, magnitude in b[7:0]
      a  = W'(signed'(ua[9:0]));
      op = PE_MUL;
      #1;
      pa = longint'(signed'(ua[9:0])) * longint'(ub[7:0]);
      check(W'(pa), 1'b0, "mul");
      n_mul++;
    end
    if (n_carry == 0) begin
      failures++;
      $display("FAIL no carry out seen");
    end
    $display("add=%0d neg=%0d mul=%0d carries=%0d", n_add, n_neg, n_mul, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
