// Exhaustive test of the unsigned-position full adder: all eight input
// combinations, checked against a + b + ci = 2*co + s.
module tb_rca_cell;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  rca_cell dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {a, b, ci} = 3'(k);
      #1;
      checks++;
      if (2 * int'(co) + int'(s) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> s=%0b co=%0b", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
