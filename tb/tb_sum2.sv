// tb_sum2: exhaustive self-checking test of the 2-input column summing module sum2.
//
// Every one of the 2^2 input patterns is applied. The reference is the population
// count of the pattern, worked out here with $countones; the module is correct when
// y + 2*p equals that count, with each output bit checked on its own.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_sum2;
  int checks = 0;
  int failures = 0;

  logic [1:0] v;
  logic y, p;

  sum2 dut (.a(v[0]), .b(v[1]), .y(y), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt;
    for (int i = 0; i < 2**2; i++) begin
      v = 2'(i);
      #1;
      cnt = $countones(v);
      checks++;
      if (y !== cnt[0]) begin
        failures++;
        $display("FAIL sum2 in=%b y=%b expected %b", v, y, cnt[0]);
      end
      checks++;
      if (p !== cnt[1]) begin
        failures++;
        $display("FAIL sum2 in=%b p=%b expected %b", v, p, cnt[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
