// End-to-end test of the MHSD adder at its default size (32 digits,
// distance 1 between signed digits), with no parameter overrides.
//
// Operands are random hybrid signed digit words (random junk on the unused
// sign bits of unsigned positions, which the adder must ignore) plus
// directed words that force the extreme cases. Every result is checked
//   * digit by digit against the reference model of mhsd_ref_pkg,
//   * by value: value(result) = value(a) + value(b) + cin,
//   * for bounded carry propagation: replacing every operand digit below a
//     signed position p must leave all outputs above p, the negative carry
//     bits from p up and cout unchanged.
// The test also counts how often each mechanism of the adder occurred and
// counts a failure for any that never did: a negative carry taken out on
// nl, a positive carry handed from a signed cell to the next position, a
// carry rippling through the full run of D unsigned positions, sum digits
// -1 and +1 at signed positions, and a carry out of the word.
module tb_mhsd_adder;
  import mhsd_pkg::*;
  import mhsd_ref_pkg::*;

  localparam int N = 32;   // must equal the adder's default N
  localparam int D = 1;    // must equal the adder's default D
  localparam int RANDOM_VECTORS = 20000;

  sd_digit_t [N-1:0] a, b, z;
  logic      [N-1:0] nl;
  logic              cin, cout;

  mhsd_adder dut (.a(a), .b(b), .cin(cin), .z(z), .nl(nl), .cout(cout));

  int checks = 0, failures = 0;
  int n_neg_carry = 0, n_pos_carry = 0, n_full_chain = 0;
  int n_digit_m1 = 0, n_digit_p1 = 0, n_cout = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] sbits(sd_digit_t [N-1:0] w);
    logic [63:0] r = '0;
    for (int i = 0; i < N; i++) r[i] = w[i].s;
    return r;
  endfunction

  function automatic logic [63:0] abits(sd_digit_t [N-1:0] w);
    logic [63:0] r = '0;
    for (int i = 0; i < N; i++) r[i] = w[i].a;
    return r;
  endfunction

  // Random operand: a random valid digit at signed positions, a random bit
  // (and a random, meaningless sign bit) at unsigned positions.
  function automatic sd_digit_t [N-1:0] rand_word();
    sd_digit_t [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      if (ref_is_signed(i, D)) begin
        case ($urandom_range(2))
          0: r[i] = 2'b00;
          1: r[i] = 2'b01;
          default: r[i] = 2'b11;
        endcase
      end else r[i] = 2'($urandom);
    end
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%h b=%h cin=%0b -> z=%h nl=%h cout=%0b",
                                  what, a, b, cin, z, nl, cout);
    end
  endtask

  task automatic apply_and_check();
    logic [63:0] ezs, eza, enl;
    logic ecout;
    int longest;
    #1;
    model(N, D, sbits(a), abits(a), sbits(b), abits(b), cin, ezs, eza, enl, ecout, longest);
    check(sbits(z) == ezs && abits(z) == eza, "sum digits");
    check(nl == enl[N-1:0], "negative carry bits");
    check(cout == ecout, "carry out");
    check(result_value(sbits(z), abits(z), {32'b0, nl}, cout, N, D)
          == word_value(sbits(a), abits(a), N, D) + word_value(sbits(b), abits(b), N, D)
             + longint'(cin), "value");
    for (int i = 0; i < N; i++) begin
      if (ref_is_signed(i, D)) begin
        check(z[i] != 2'b10, "digit code");
        if (nl[i]) n_neg_carry++;
        if (z[i] == 2'b11) n_digit_m1++;
        if (z[i] == 2'b01) n_digit_p1++;
        if (i + 1 < N && !nl[i]) begin
          // positive carry out of a signed cell: both digits non-negative, sum > 0
          if (!a[i].s && !b[i].s && (a[i].a || b[i].a)) n_pos_carry++;
        end
      end else check(z[i].s == 1'b0, "sign bit of unsigned position");
    end
    if (longest >= D && D > 0) n_full_chain++;
    if (cout) n_cout++;
  endtask

  // Bounded propagation: new digits below signed position p must not change
  // anything from p+1 upward (nor nl from p upward, nor cout).
  task automatic check_locality();
    sd_digit_t [N-1:0] z0;
    logic [N-1:0] nl0;
    logic cout0;
    int p;
    do p = $urandom_range(N - 1); while (!ref_is_signed(p, D));
    #1;
    z0 = z; nl0 = nl; cout0 = cout;
    for (int i = 0; i < p; i++) begin
      a[i] = ~a[i];
      b[i] = ref_is_signed(i, D) ? 2'b11 : 2'($urandom);
    end
    cin = ~cin;
    #1;
    for (int i = p + 1; i < N; i++) check(z[i] == z0[i], "locality of sum digits");
    for (int i = p; i < N; i++) check(nl[i] == nl0[i], "locality of negative carries");
    check(cout == cout0, "locality of carry out");
  endtask

  initial begin
    // directed: all digits -1 at signed positions, ones elsewhere
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = ref_is_signed(i, D) ? 2'b11 : 2'b01;
        b[i] = ref_is_signed(i, D) ? (k[0] ? 2'b01 : 2'b11) : (k[1] ? 2'b01 : 2'b00);
      end
      cin = k[1];
      apply_and_check();
    end
    // directed: long carry from cin through the unsigned run below each signed digit
    for (int i = 0; i < N; i++) begin
      a[i] = 2'b01;
      b[i] = ref_is_signed(i, D) ? 2'b01 : 2'b00;
    end
    cin = 1'b1;
    apply_and_check();
    // random
    for (int k = 0; k < RANDOM_VECTORS; k++) begin
      a = rand_word();
      b = rand_word();
      cin = 1'($urandom);
      apply_and_check();
      if (k % 16 == 0) check_locality();
    end

    $display("mechanisms: negative carry out=%0d positive carry on=%0d full-length ripple=%0d",
             n_neg_carry, n_pos_carry, n_full_chain);
    $display("            digit -1=%0d digit +1=%0d carry out of word=%0d",
             n_digit_m1, n_digit_p1, n_cout);
    checks++; if (n_neg_carry == 0) begin failures++; $display("FAIL no negative carry"); end
    checks++; if (n_pos_carry == 0) begin failures++; $display("FAIL no positive carry"); end
    checks++; if (n_full_chain == 0) begin failures++; $display("FAIL no full-length ripple"); end
    checks++; if (n_digit_m1 == 0) begin failures++; $display("FAIL no digit -1"); end
    checks++; if (n_digit_p1 == 0) begin failures++; $display("FAIL no digit +1"); end
    checks++; if (n_cout == 0) begin failures++; $display("FAIL no carry out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
