// Signed digit position of the MHSD adder: adds two radix-2 signed digits x
// and y and an unsigned carry in (0 or 1) from the position below.
//
// The sum is formed in two steps. First x + y = 2*c + t with an intermediate
// digit t in {-1, 0}, so that adding the incoming carry (0 or 1) can never
// leave the digit set; t is non-zero exactly when one input digit is zero
// and the other is not, so its magnitude is x.a ^ y.a. The carry c is carried
// as the difference of two bits, c = v - w:
//   w = x.s | y.s          (an input is negative, so c is in {-1, 0})
//   v = ~(x.s & y.s | ~(x.a | y.a))
//                          (0 only for 0+0 and -1+-1)
// Second, the output digit z = t + v_in: z.a = (x.a ^ y.a) ^ v_in and
// z.s = (x.a ^ y.a) & ~v_in. v and w depend on x and y only, never on the
// incoming carry: this is what stops carry propagation at a signed digit.
//
// The carry-in wire is v_in because in the MHSD adder the carry into a
// signed position is always unsigned (its w would be 0). The digit code,
// the carry rules and the gate equations follow the document; the
// derivation above shows that they add correctly. Purely combinational.
module sd_cell
  import mhsd_pkg::*;
(
  input  sd_digit_t x,     // first operand digit
  input  sd_digit_t y,     // second operand digit
  input  logic      v_in,  // carry in from the position below, 0 or 1
  output sd_digit_t z,     // sum digit
  output logic      v,     // carry = v - w, to the interface logic
  output logic      w
);

  logic t_a;  // magnitude of the intermediate digit (its value is -t_a)

  always_comb begin
    t_a = x.a ^ y.a;
    w   = x.s | y.s;
    v   = ~((x.s & y.s) | ~(x.a | y.a));
    z.a = t_a ^ v_in;
    z.s = t_a & ~v_in;
  end

endmodule
