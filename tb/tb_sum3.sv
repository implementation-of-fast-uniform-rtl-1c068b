// tb_sum3: exhaustive self-checking test of the 3-input column summing module sum3.
//
// Every one of the 2^3 input patterns is applied. The reference is the population
// count of the pattern, worked out here with $countones; the module is correct when
// y + 2*p equals that count, with each output bit checked on its own.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_sum3;
  int checks = 0;
  int failures = 0;

  logic [2:0] v;
  logic y, p;

  sum3 dut (.a(v[0]), .b(v[1]), .c(v[2]), .y(y), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt;
    for (int i = 0; i < 2**3; i++) begin
      v = 3'(i);
      #1;
      cnt = $countones(v);
      checks++;
      if (y !== cnt[0]) begin
        failures++;
        $display("FAIL sum3 in=%b y=%b expected %b", v, y, cnt[0]);
      end
      checks++;
      if (p !== cnt[1]) begin
        failures++;
        $display("FAIL sum3 in=%b p=%b expected %b", v, p, cnt[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
