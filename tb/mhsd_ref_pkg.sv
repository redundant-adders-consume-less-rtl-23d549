// Reference model for the MHSD adder testbenches.
//
// The model works on digit values, not on the adder's equations: at a
// signed position it forms x + y, picks the carry by the rule "both
// operands non-negative -> carry in {0, 1}, else carry in {-1, 0}" with an
// intermediate digit in {-1, 0}, adds the unsigned incoming carry, passes a
// +1 carry on and reports a -1 carry as a negative output bit. Unsigned
// positions add with plain integer arithmetic. Words are up to 62 digits,
// held in 64-bit vectors, one vector for the sign bits and one for the
// magnitude bits.
package mhsd_ref_pkg;

  function automatic bit ref_is_signed(int pos, int d);
    return (pos % (d + 1)) == d;
  endfunction

  // Value of a word for distance d: signed positions count a - 2s, unsigned
  // positions count only a.
  function automatic longint word_value(logic [63:0] s, logic [63:0] a, int n, int d);
    longint v = 0;
    for (int i = 0; i < n; i++) begin
      if (ref_is_signed(i, d)) v += (longint'(a[i]) - 2 * longint'(s[i])) <<< i;
      else v += longint'(a[i]) <<< i;
    end
    return v;
  endfunction

  // Value of the adder's result: digits, negative carry bits, carry out.
  function automatic longint result_value(logic [63:0] zs, logic [63:0] za,
                                          logic [63:0] nl, logic cout, int n, int d);
    longint v = word_value(zs, za, n, d);
    for (int i = 0; i < n; i++) v -= longint'(nl[i]) <<< (i + 1);
    v += longint'(cout) <<< n;
    return v;
  endfunction

  // Digit-exact model. longest returns the longest run of unsigned
  // positions a carry rippled through before it reached a signed position,
  // the top of the word or ended.
  function automatic void model(input int n, input int d,
                                input logic [63:0] as, input logic [63:0] aa,
                                input logic [63:0] bs, input logic [63:0] ba,
                                input logic cin,
                                output logic [63:0] zs, output logic [63:0] za,
                                output logic [63:0] nl, output logic cout,
                                output int longest);
    int c = int'(cin);
    int run = 0;
    zs = '0; za = '0; nl = '0; longest = 0;
    for (int i = 0; i < n; i++) begin
      if (ref_is_signed(i, d)) begin
        int xv = aa[i] ? (as[i] ? -1 : 1) : 0;
        int yv = ba[i] ? (bs[i] ? -1 : 1) : 0;
        int t  = xv + yv;
        int cc, zv;
        if (xv >= 0 && yv >= 0) cc = (t > 0) ? 1 : 0;
        else                    cc = (t == -2) ? -1 : 0;
        zv = t - 2 * cc + c;
        za[i] = (zv != 0);
        zs[i] = (zv < 0);
        nl[i] = (cc == -1);
        c     = (cc == 1) ? 1 : 0;
        run   = 0;
      end else begin
        int sum = int'(aa[i]) + int'(ba[i]) + c;
        if (c == 1) begin
          run++;
          if (run > longest) longest = run;
        end else run = 0;
        za[i] = sum[0];
        c     = sum >> 1;
      end
    end
    cout = c[0];
  endfunction

endpackage
