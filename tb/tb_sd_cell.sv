// Exhaustive test of the signed digit cell over all valid digit pairs and
// both carry-in values (18 cases). Each case checks
//   * x + y + v_in = 2*(v - w) + z            (the cell adds correctly)
//   * z uses a valid code (never 10)
//   * the carry is in {0, 1} when both digits are non-negative and in
//     {-1, 0} otherwise, and the intermediate digit is -1 or 0
//   * v and w do not change with v_in         (no carry propagation)
module tb_sd_cell;
  import mhsd_pkg::*;

  sd_digit_t x, y, z;
  logic v_in, v, w;
  int checks = 0, failures = 0;

  sd_cell dut (.x(x), .y(y), .v_in(v_in), .z(z), .v(v), .w(w));

  function automatic sd_digit_t enc(int val);
    return (val < 0) ? 2'b11 : (val > 0) ? 2'b01 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return d.a ? (d.s ? -1 : 1) : 0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%0d y=%0d v_in=%0b -> z=%b v=%0b w=%0b",
               what, dec(x), dec(y), v_in, z, v, w);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = -1; xv <= 1; xv++)
      for (int yv = -1; yv <= 1; yv++) begin
        logic v0, w0;
        for (int ci = 0; ci <= 1; ci++) begin
          int carry;
          x = enc(xv); y = enc(yv); v_in = ci[0];
          #1;
          carry = int'(v) - int'(w);
          check(xv + yv + ci == 2 * carry + dec(z), "sum");
          check(z != 2'b10, "digit code");
          if (xv >= 0 && yv >= 0) check(carry == 0 || carry == 1, "carry range (non-negative)");
          else                    check(carry == 0 || carry == -1, "carry range (negative)");
          check((xv + yv - 2 * carry) inside {-1, 0}, "intermediate digit");
          if (ci == 0) begin v0 = v; w0 = w; end
          else check(v == v0 && w == w0, "carry independent of v_in");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
