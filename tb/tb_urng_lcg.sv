// tb_urng_lcg: end-to-end self-checking test of the generator urng_lcg at its default
// parameters (32 bits, A = 136314881, C = 18433).
//
// The reference model is the recurrence X(n+1) = (A * X(n) + C) mod 2^32 computed with
// 64-bit integer arithmetic in this file. The test
//   - checks the reset value (the default seed 1) and that rnd_valid is low after reset,
//   - loads a seed and runs 1000 consecutive numbers with en held high, checking every
//     number and that a new one appears on every clock (one number per cycle),
//   - drops en at random for stretches and checks that the state holds,
//   - raises load together with en and checks that load wins,
//   - restarts from several seeds, including 0 and all ones,
// and counts how often each mechanism happened: reset, seed load, load-over-enable,
// hold, step, and steps in which a weight-4 carry (a column of the adder summing to
// four or more) occurs, found with a small column-sum model of its own. A mechanism that never happened is a failure.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_urng_lcg;
  import urng_pkg::*;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  logic [31:0] seed = '0;
  logic        en = 1'b0;
  logic [31:0] rnd;
  logic        rnd_valid;

  always #10 clk = ~clk;  // 20 ns clock, 50 MHz

  urng_lcg dut (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .en(en),
    .rnd(rnd), .rnd_valid(rnd_valid)
  );

  int n_reset = 0, n_load = 0, n_load_over_en = 0, n_hold = 0, n_step = 0, n_r_carry = 0;
  logic [31:0] model;

  function automatic logic [31:0] ref_step(logic [31:0] x);
    longint unsigned full = longint'(LCG_A) * longint'(x) + longint'(LCG_C);
    return full[31:0];
  endfunction

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Column-sum model of one step, used only to see whether a weight-4 carry occurs:
  // column j adds the bits of x, x << 21, x << 27 and C that fall in it, plus the
  // weight-2 carry of column j-1 and the weight-4 carry of column j-2.
  function automatic int r_carries(logic [31:0] x);
    int p_prev = 0, r_prev = 0, r_prev2 = 0, n = 0;
    for (int j = 0; j < 32; j++) begin
      int cnt = int'(x[j]) + int'(LCG_C[j]) + p_prev + r_prev2;
      if (j >= 21) cnt += int'(x[j-21]);
      if (j >= 27) cnt += int'(x[j-27]);
      r_prev2 = r_prev;
      p_prev  = (cnt >> 1) & 1;
      r_prev  = (cnt >> 2) & 1;
      if (r_prev != 0) n++;
    end
    return n;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock edge with the given controls; the model follows the same rule.
  task automatic cycle(logic l, logic e, logic [31:0] s);
    load <= l;
    en   <= e;
    seed <= s;
    @(posedge clk);
    #1;
    if (l) begin
      model = s;
      n_load++;
      if (e) n_load_over_en++;
    end else if (e) begin
      model = ref_step(model);
      n_step++;
    end else begin
      n_hold++;
    end
    expect_eq("rnd", rnd, model);
    checks++;
    if (rnd_valid !== (e && !l)) begin
      failures++;
      $display("FAIL rnd_valid=%b after load=%b en=%b", rnd_valid, l, e);
    end
  endtask

  initial begin
    logic [31:0] prev;
    int          changed;
    automatic logic [31:0] seeds [4] = '{32'd0, 32'hFFFF_FFFF, 32'h1234_5678, 32'hDEAD_BEEF};

    // Reset: state returns to the default seed 1.
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    n_reset++;
    model = 32'd1;
    expect_eq("reset value", rnd, 32'd1);
    checks++;
    if (rnd_valid !== 1'b0) begin
      failures++;
      $display("FAIL rnd_valid high in reset");
    end
    rst_n = 1'b1;

    // 1000 consecutive numbers from seed 1, one per clock.
    changed = 0;
    for (int i = 0; i < 1000; i++) begin
      prev = rnd;
      if (r_carries(model) != 0) n_r_carry++;
      cycle(1'b0, 1'b1, '0);
      if (rnd != prev) changed++;
    end
    checks++;
    if (changed != 1000) begin
      failures++;
      $display("FAIL rate: %0d new numbers in 1000 clocks", changed);
    end

    // Seeds, random enable and load patterns.
    foreach (seeds[k]) begin
      cycle(1'b1, 1'b0, seeds[k]);
      for (int i = 0; i < 500; i++) begin
        automatic logic e = ($urandom_range(0, 3) != 0);
        automatic logic l = ($urandom_range(0, 99) == 0);
        if (e && !l && r_carries(model) != 0) n_r_carry++;
        cycle(l, e, $urandom);
      end
      cycle(1'b1, 1'b1, seeds[k] ^ 32'h5A5A_5A5A);  // load together with enable
    end

    // Reset in the middle of a run returns to the default seed.
    cycle(1'b0, 1'b1, '0);
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    n_reset++;
    model = 32'd1;
    expect_eq("reset value mid-run", rnd, 32'd1);

    $display("mechanisms: reset=%0d load=%0d load_over_en=%0d hold=%0d step=%0d r_carry=%0d",
             n_reset, n_load, n_load_over_en, n_hold, n_step, n_r_carry);
    checks++; if (n_reset < 2)         begin failures++; $display("FAIL reset never exercised"); end
    checks++; if (n_load == 0)         begin failures++; $display("FAIL load never exercised"); end
    checks++; if (n_load_over_en == 0) begin failures++; $display("FAIL load+en never exercised"); end
    checks++; if (n_hold == 0)         begin failures++; $display("FAIL hold never exercised"); end
    checks++; if (n_step == 0)         begin failures++; $display("FAIL step never exercised"); end
    checks++; if (n_r_carry == 0)      begin failures++; $display("FAIL weight-4 carry never set"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
