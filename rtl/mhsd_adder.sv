// MHSD-D adder: an N-digit hybrid signed digit adder in which signed digit
// positions, spaced D+1 positions apart, stop every carry chain.
//
// Between two signed positions sit D unsigned positions, added by a ripple
// of full adders (rca_cell). A signed position (sd_cell) computes its carry
// from its own two digits only, so a carry starts at a signed position (or
// at cin), ripples through at most D unsigned positions and is absorbed by
// the next signed position: the longest path is D full adders plus one
// signed cell, whatever N is. All chains run in parallel.
//
// Each signed cell is followed by mhsd_interface, which passes only a
// positive carry on. A negative carry is not propagated; it leaves the
// adder on nl[i] and weighs -2^(i+1). The result is therefore in a slightly
// wider redundant form than the operands:
//   value(z) - sum_i nl[i]*2^(i+1) + cout*2^N = value(a) + value(b) + cin
// where value(x) = sum_i (x[i].a - 2*x[i].s) * 2^i over all positions.
//
// Interface: operands a and b in the two-wire digit format of mhsd_pkg (sign
// bits of unsigned positions are ignored; the code 10 must not be applied at
// a signed position). z has the same format, with z[i].s = 0 at unsigned
// positions. nl[i] is 0 at unsigned positions. cin and cout are unsigned
// carries into position 0 and out of position N-1; the document does not
// describe the word ends, so both are this design's choice.
//
// Timing: purely combinational, no clock. The structure (signed cell,
// interface, ripple cells), the digit placement for a given distance, and
// the defaults N = 32 and D = 1 follow the document.
module mhsd_adder
  import mhsd_pkg::*;
#(
  parameter int unsigned N = 32,  // word length in digits
  parameter int unsigned D = 1    // distance between consecutive signed digits
) (
  input  sd_digit_t [N-1:0] a,
  input  sd_digit_t [N-1:0] b,
  input  logic              cin,
  output sd_digit_t [N-1:0] z,
  output logic      [N-1:0] nl,
  output logic              cout
);

  logic [N:0] c;  // c[i] is the unsigned carry into position i

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_pos
    if (is_signed_pos(i, D)) begin : g_sd
      logic v, w;
      sd_cell u_sd (
        .x    (a[i]),
        .y    (b[i]),
        .v_in (c[i]),
        .z    (z[i]),
        .v    (v),
        .w    (w)
      );
      mhsd_interface u_if (
        .v  (v),
        .w  (w),
        .c  (c[i+1]),
        .nl (nl[i])
      );
    end else begin : g_us
      rca_cell u_rca (
        .a  (a[i].a),
        .b  (b[i].a),
        .ci (c[i]),
        .s  (z[i].a),
        .co (c[i+1])
      );
      assign z[i].s = 1'b0;
      assign nl[i]  = 1'b0;
    end
  end

  assign cout = c[N];

endmodule
