// pe: processing element with two inputs and one output.
//
// Three functions, chosen by op each cycle:
//   PE_ADD : y = a + b + cin, with the carry out of the W-bit sum on cout
//   PE_NEG : y = -b, formed on the same adder as ~b + 0 + 1 (carry-in forced)
//   PE_MUL : y = a * b[CW-1:0], a two's-complement, the coefficient magnitude
//            b[CW-1:0] unsigned, computed by the constant-shift-method multiplier
// The three functions are those the reference processing element performs; the
// choice of which operand is negated and how negation reuses the adder is this
// design's own. In the filter, PE1 always multiplies and PE2 adds or negates.
//
// Combinational, W-bit operands and result. The product is truncated to W bits;
// the filter sizes W so that no product or sum overflows.
module pe
  import fir_pkg::*;
#(
  parameter int unsigned W  = 19,
  parameter int unsigned CW = COEF_W_DEF
) (
  input  pe_op_e               op,
  input  logic signed [W-1:0]  a,
  input  logic signed [W-1:0]  b,
  input  logic                 cin,
  output logic signed [W-1:0]  y,
  output logic                 cout
);

  logic signed [W+CW-1:0] prod;
  logic        [W:0]      sum;
  logic        [W-1:0]    add_a, add_b;
  logic                   add_c;

  csm_multiplier #(.XW(W), .CW(CW)) u_mul (.x(a), .c(b[CW-1:0]), .p(prod));

  always_comb begin
    add_a = a;
    add_b = b;
    add_c = cin;
    if (op == PE_NEG) begin
      add_a = '0;
      add_b = ~b;
      add_c = 1'b1;
    end
    sum = {1'b0, add_a} + {1'b0, add_b} + (W+1)'(add_c);
    unique case (op)
      PE_MUL:  begin y = prod[W-1:0]; cout = 1'b0;   end
      PE_ADD,
      PE_NEG:  begin y = sum[W-1:0];  cout = sum[W]; end
      default: begin y = '0;          cout = 1'b0;   end
    endcase
  end

endmodule
