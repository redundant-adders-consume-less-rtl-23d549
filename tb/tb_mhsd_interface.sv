// Exhaustive test of the interface logic: for every (v, w) the carry value
// v - w must come out as c = 1 when it is +1, as nl = 1 when it is -1, and
// as neither when it is 0.
module tb_mhsd_interface;
  logic v, w, c, nl;
  int checks = 0, failures = 0;

  mhsd_interface dut (.v(v), .w(w), .c(c), .nl(nl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      int carry;
      {v, w} = 2'(k);
      #1;
      carry = int'(v) - int'(w);
      checks++;
      if (c !== (carry == 1) || nl !== (carry == -1)) begin
        failures++;
        $display("FAIL v=%0b w=%0b -> c=%0b nl=%0b", v, w, c, nl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
