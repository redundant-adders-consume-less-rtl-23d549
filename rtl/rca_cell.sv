// Unsigned digit position of the MHSD adder: a one-bit ripple-carry full
// adder.
//
// The sum is a ^ b ^ ci and the carry out is a&b | ci&(a|b), as the document
// gives them. In the MHSD adder every carry that reaches an unsigned
// position is non-negative (a signed digit cell hands on only its positive
// carry), so a plain full adder suffices. Purely combinational; one cell
// delay from any input to either output.
module rca_cell (
  input  logic a,   // augend bit
  input  logic b,   // addend bit
  input  logic ci,  // carry in from the position below, 0 or 1
  output logic s,   // sum bit
  output logic co   // carry out to the position above, 0 or 1
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a | b));
  end

endmodule
