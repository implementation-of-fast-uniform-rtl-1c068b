// tb_sum6: exhaustive self-checking test of the 6-input column summing module sum6.
//
// Every one of the 2^6 input patterns is applied. The reference is the population
// count of the pattern, worked out here with $countones; the module is correct when
// y + 2*p + 4*r equals that count, with each output bit checked on its own.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_sum6;
  int checks = 0;
  int failures = 0;

  logic [5:0] v;
  logic y, p, r;

  sum6 dut (.a(v[0]), .b(v[1]), .c(v[2]), .d(v[3]), .e(v[4]), .f(v[5]), .y(y), .p(p), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt;
    for (int i = 0; i < 2**6; i++) begin
      v = 6'(i);
      #1;
      cnt = $countones(v);
      checks++;
      if (y !== cnt[0]) begin
        failures++;
        $display("FAIL sum6 in=%b y=%b expected %b", v, y, cnt[0]);
      end
      checks++;
      if (p !== cnt[1]) begin
        failures++;
        $display("FAIL sum6 in=%b p=%b expected %b", v, p, cnt[1]);
      end
      checks++;
      if (r !== cnt[2]) begin
        failures++;
        $display("FAIL sum6 in=%b r=%b expected %b", v, r, cnt[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
