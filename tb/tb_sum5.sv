// tb_sum5: exhaustive self-checking test of the 5-input column summing module sum5.
//
// Every one of the 2^5 input patterns is applied. The reference is the population
// count of the pattern, worked out here with $countones; the module is correct when
// y + 2*p + 4*r equals that count, with each output bit checked on its own.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_sum5;
  int checks = 0;
  int failures = 0;

  logic [4:0] v;
  logic y, p, r;

  sum5 dut (.a(v[0]), .b(v[1]), .c(v[2]), .d(v[3]), .e(v[4]), .y(y), .p(p), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt;
    for (int i = 0; i < 2**5; i++) begin
      v = 5'(i);
      #1;
      cnt = $countones(v);
      checks++;
      if (y !== cnt[0]) begin
        failures++;
        $display("FAIL sum5 in=%b y=%b expected %b", v, y, cnt[0]);
      end
      checks++;
      if (p !== cnt[1]) begin
        failures++;
        $display("FAIL sum5 in=%b p=%b expected %b", v, p, cnt[1]);
      end
      checks++;
      if (r !== cnt[2]) begin
        failures++;
        $display("FAIL sum5 in=%b r=%b expected %b", v, r, cnt[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
