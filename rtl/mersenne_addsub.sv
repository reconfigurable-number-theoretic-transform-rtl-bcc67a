// mersenne_addsub: addition or subtraction modulo 2^n - 1.
//
// One n-bit adder forms a + b (or a - b) with its carry (borrow); a second
// add of that carry (subtract of the borrow) folds 2^n back in, since
// 2^n = 1 mod 2^n - 1. Operands and result are n bits; all-ones is a valid
// second code for zero and is accepted on the inputs. SUB selects the
// operation at elaboration. Combinational.
//
// Follows the published two-adder algorithm; one module for both operations
// is this implementation's choice.
module mersenne_addsub #(
  parameter int N   = 19,
  parameter bit SUB = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] r
);
  logic [N-1:0] tmp;
  logic         c;

  always_comb begin
    if (SUB) begin
      {c, tmp} = {1'b0, a} - {1'b0, b};
      r = tmp - N'(c);
    end else begin
      {c, tmp} = {1'b0, a} + {1'b0, b};
      r = tmp + N'(c);
    end
  end
endmodule
