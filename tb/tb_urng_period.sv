// tb_urng_period: full-period test of urng_lcg at a reduced width.
//
// A 32-bit generator has period 2^32, too long to simulate, so the same structure is
// run at W = 16 with A = 2^11 + 2^5 + 1 = 2081 and C = 2^3 + 2^2 + 1 = 13. Since
// A mod 4 = 1 and C is odd, the recurrence X(n+1) = (A * X(n) + C) mod 2^16 must
// visit all 65536 states once before it repeats. The test loads seed 0, steps 65536
// times with en held high, and checks that
//   - every number equals the reference recurrence (computed here),
//   - no state is visited twice and the first repeat is the seed, after exactly
//     65536 steps,
//   - a new number appears on every clock.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_urng_period;
  localparam int unsigned W = 16;
  localparam logic [31:0] A = 32'(2**11 + 2**5 + 1);
  localparam logic [31:0] C = 32'(2**3 + 2**2 + 1);

  int checks = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         load = 1'b0;
  logic [W-1:0] seed = '0;
  logic         en = 1'b0;
  logic [W-1:0] rnd;
  logic         rnd_valid;

  always #10 clk = ~clk;

  urng_lcg #(.W(W), .A(A), .C(C), .SEED(32'd0)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .en(en),
    .rnd(rnd), .rnd_valid(rnd_valid)
  );

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit           seen [2**W];
  logic [W-1:0] model;
  int           repeats_early = 0;
  int           mismatches = 0;
  int           stalls = 0;

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    load  <= 1'b1;
    seed  <= '0;
    @(posedge clk);
    #1;
    load  <= 1'b0;
    model = '0;
    seen[0] = 1'b1;
    en <= 1'b1;
    for (int n = 1; n <= 2**W; n++) begin
      @(posedge clk);
      #1;
      model = W'((longint'(A) * longint'(model) + longint'(C)) & ((64'd1 << W) - 1));
      if (rnd !== model) mismatches++;
      if (rnd_valid !== 1'b1) stalls++;
      if (n < 2**W) begin
        if (seen[rnd]) repeats_early++;
        seen[rnd] = 1'b1;
      end
    end
    checks++;
    if (mismatches != 0) begin
      failures++;
      $display("FAIL %0d numbers differ from the reference", mismatches);
    end
    checks++;
    if (repeats_early != 0) begin
      failures++;
      $display("FAIL %0d states repeated before 2^%0d steps", repeats_early, W);
    end
    checks++;
    if (rnd !== '0) begin
      failures++;
      $display("FAIL state after 2^%0d steps is %h, not the seed", W, rnd);
    end
    checks++;
    if (stalls != 0) begin
      failures++;
      $display("FAIL %0d clocks without a new number", stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
