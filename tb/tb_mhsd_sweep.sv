// Distance sweep: the 32-digit MHSD adder built for every distance between
// signed digits from 0 (all digits signed) to 32 (plain ripple-carry
// adder), the range over which such adders are usually compared. Each of
// the 33 instances gets random operands plus one directed word whose carry
// must ripple from cin through the whole run of unsigned digits below the
// first signed digit (the critical path of that distance). Results are
// checked digit by digit against mhsd_ref_pkg and by value.
module tb_mhsd_sweep;
  import mhsd_pkg::*;
  import mhsd_ref_pkg::*;

  localparam int N = 32;
  localparam int DMAX = 32;
  localparam int VECTORS = 2000;

  int checks = 0, failures = 0, done = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gd = 0; gd <= DMAX; gd++) begin : g_d
    localparam int D = gd;
    sd_digit_t [N-1:0] a, b, z;
    logic      [N-1:0] nl;
    logic              cin, cout;

    mhsd_adder #(.N(N), .D(D)) dut (.a(a), .b(b), .cin(cin), .z(z), .nl(nl), .cout(cout));

    function automatic logic [63:0] sb(sd_digit_t [N-1:0] w);
      logic [63:0] r = '0;
      for (int i = 0; i < N; i++) r[i] = w[i].s;
      return r;
    endfunction

    function automatic logic [63:0] ab(sd_digit_t [N-1:0] w);
      logic [63:0] r = '0;
      for (int i = 0; i < N; i++) r[i] = w[i].a;
      return r;
    endfunction

    initial begin
      automatic int max_run = 0;
      for (int k = 0; k <= VECTORS; k++) begin
        logic [63:0] ezs, eza, enl;
        logic ecout;
        int longest;
        bit ok;
        if (k == 0) begin
          for (int i = 0; i < N; i++) begin
            a[i] = 2'b01;
            b[i] = ref_is_signed(i, D) ? 2'b01 : 2'b00;
          end
          cin = 1'b1;
        end else begin
          for (int i = 0; i < N; i++) begin
            if (ref_is_signed(i, D)) begin
              a[i] = ($urandom_range(2) == 0) ? 2'b00 : (($urandom_range(1) != 0) ? 2'b01 : 2'b11);
              b[i] = ($urandom_range(2) == 0) ? 2'b00 : (($urandom_range(1) != 0) ? 2'b01 : 2'b11);
            end else begin
              a[i] = 2'($urandom);
              b[i] = 2'($urandom);
            end
          end
          cin = 1'($urandom);
        end
        #1;
        model(N, D, sb(a), ab(a), sb(b), ab(b), cin, ezs, eza, enl, ecout, longest);
        if (longest > max_run) max_run = longest;
        ok = (sb(z) == ezs) && (ab(z) == eza) && (nl == enl[N-1:0]) && (cout == ecout)
             && (result_value(sb(z), ab(z), {32'b0, nl}, cout, N, D)
                 == word_value(sb(a), ab(a), N, D) + word_value(sb(b), ab(b), N, D)
                    + longint'(cin));
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 20) $display("FAIL d=%0d a=%h b=%h cin=%0b -> z=%h nl=%h cout=%0b",
                                      D, a, b, cin, z, nl, cout);
        end
      end
      // the directed word must have rippled through all min(D, N) unsigned positions
      checks++;
      if (max_run != ((D < N) ? D : N)) begin
        failures++;
        $display("FAIL d=%0d longest ripple %0d", D, max_run);
      end
      done++;
    end
  end

  initial begin
    wait (done == DMAX + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
