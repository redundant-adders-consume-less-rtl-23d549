// Interface logic behind a signed digit cell of the MHSD adder.
//
// The signed digit cell delivers its carry as c = v - w in {-1, 0, +1}. Only
// the non-negative part is passed on to the next position, as the unsigned
// carry c = v & ~w. A carry of -1 (v = 0, w = 1) is not propagated: it is
// brought out of the adder as the bit nl = w & ~v, which carries the
// negative weight of that carry (-2^(i+1) for signed position i). Both
// equations are the document's. Purely combinational, one gate level.
module mhsd_interface (
  input  logic v,   // carry bits from the signed digit cell
  input  logic w,
  output logic c,   // unsigned carry to the next position, 0 or 1
  output logic nl   // negatively weighted carry bit, brought out of the adder
);

  always_comb begin
    c  = v & ~w;
    nl = w & ~v;
  end

endmodule
