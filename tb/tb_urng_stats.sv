// tb_urng_stats: statistical workload for urng_lcg: the parameter-search table.
//
// Nine generators run side by side, one per (a, c) pair of the constant search; the
// ninth is the default configuration, instantiated without a parameter list. For
// each pair the test repeats RUNS = 100 times: load a random seed, draw N = 100000
// consecutive numbers (one per clock), and score the sequence with the two quality
// measures used to pick the constants:
//   h2   = sum over M = 100 equal intervals of ((O_j - E_j) / E_j)^2, where O_j is
//          the number of samples in interval j and E_j = N / M;
//   c_rl = sum over lags i = 1..100 of rho(i)^2, where rho(i) is the autocorrelation
//          of the mean-removed samples u = rnd / 2^32 at lag i, divided by its value
//          at lag 0.
// For independent uniform samples these have expectations of about 0.1 and 0.001.
// Every number is compared with the recurrence computed here in 64-bit arithmetic.
// The mean and standard deviation of both measures are printed per pair next to the
// published values (REF_H2, REF_CRL). The run fails if a mean falls more than
// TOL_H2 / TOL_CRL (relative) away from the published mean; the tolerances
// cover seeds drawn differently from the original study.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_urng_stats;
  import urng_pkg::*;

  localparam int RUNS   = 100;
  localparam int N      = 100000;
  localparam int M      = 100;
  localparam int LAGS   = 100;
  localparam int NPAIRS = 9;
  localparam real TOL_H2  = 0.15;
  localparam real TOL_CRL = 0.15;

  localparam logic [31:0] TA [NPAIRS] = '{
    32'(2**11 + 2**5  + 1), 32'(2**19 + 2**9  + 1), 32'(2**18 + 2**9  + 1),
    32'(2**30 + 2**13 + 1), 32'(2**21 + 2**12 + 1), 32'(2**29 + 2**15 + 1),
    32'(2**30 + 2**13 + 1), 32'(2**30 + 2**19 + 1), 32'(2**27 + 2**21 + 1)};
  localparam logic [31:0] TC [NPAIRS] = '{
    32'(2**3  + 2**2  + 1), 32'(2**18 + 2**1  + 1), 32'(2**19 + 2**6  + 1),
    32'(2**12 + 2**1  + 1), 32'(2**19 + 2**6  + 1), 32'(2**30 + 2**13 + 1),
    32'(2**20 + 2**17 + 1), 32'(2**20 + 2**17 + 1), 32'(2**14 + 2**11 + 1)};
  // Published means of h2 and c_rl for the same pairs.
  localparam real REF_H2 [NPAIRS] = '{
    0.0994, 0.0994, 0.0992, 0.1278, 0.0945, 0.0815, 0.0900, 0.0017, 0.0488};
  localparam real REF_CRL [NPAIRS] = '{
    0.000989, 0.001343, 0.000963, 0.001877, 0.000795, 0.000738, 0.007080, 0.001390,
    0.000563};

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  logic [31:0] seed = '0;
  logic        en = 1'b0;
  logic [31:0] rnd [NPAIRS];
  logic        rnd_valid [NPAIRS];

  always #10 clk = ~clk;

  for (genvar g = 0; g < NPAIRS - 1; g++) begin : g_pair
    urng_lcg #(.A(TA[g]), .C(TC[g])) dut (
      .clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .en(en),
      .rnd(rnd[g]), .rnd_valid(rnd_valid[g])
    );
  end
  urng_lcg dut_default (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .en(en),
    .rnd(rnd[NPAIRS-1]), .rnd_valid(rnd_valid[NPAIRS-1])
  );

  initial begin
    repeat (RUNS * (N + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real         u [NPAIRS][N];
  int          hist [NPAIRS][M];
  real         h2_sum [NPAIRS], h2_sq [NPAIRS], c_sum [NPAIRS], c_sq [NPAIRS];
  real         mean, r0, ri, h2, c_rl, e;
  real         h2_mean, c_mean, h2_sd, c_sd;
  int          mismatches = 0;
  logic [31:0] model [NPAIRS];
  logic [31:0] next_seed;

  initial begin
    for (int g = 0; g < NPAIRS; g++) begin
      h2_sum[g] = 0.0; h2_sq[g] = 0.0; c_sum[g] = 0.0; c_sq[g] = 0.0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < RUNS; run++) begin
      next_seed = $urandom;
      load <= 1'b1;
      seed <= next_seed;
      en   <= 1'b0;
      @(posedge clk);
      #1;
      for (int g = 0; g < NPAIRS; g++) begin
        model[g] = next_seed;
        for (int j = 0; j < M; j++) hist[g][j] = 0;
      end
      load <= 1'b0;
      en   <= 1'b1;
      for (int n = 0; n < N; n++) begin
        @(posedge clk);
        #1;
        for (int g = 0; g < NPAIRS; g++) begin
          model[g] = 32'(longint'(TA[g]) * longint'(model[g]) + longint'(TC[g]));
          if (rnd[g] !== model[g] || rnd_valid[g] !== 1'b1) mismatches++;
          u[g][n] = real'(rnd[g]) / 4294967296.0;
          hist[g][7'((longint'(rnd[g]) * M) >> 32)]++;
        end
      end
      en <= 1'b0;

      for (int g = 0; g < NPAIRS; g++) begin
        e  = real'(N) / real'(M);
        h2 = 0.0;
        for (int j = 0; j < M; j++) h2 += ((real'(hist[g][j]) - e) / e) ** 2;
        mean = 0.0;
        for (int n = 0; n < N; n++) mean += u[g][n];
        mean /= N;
        for (int n = 0; n < N; n++) u[g][n] -= mean;
        r0 = 0.0;
        for (int n = 0; n < N; n++) r0 += u[g][n] * u[g][n];
        c_rl = 0.0;
        for (int i = 1; i <= LAGS; i++) begin
          ri = 0.0;
          for (int n = i; n < N; n++) ri += u[g][n] * u[g][n-i];
          c_rl += (ri / r0) ** 2;
        end
        h2_sum[g] += h2;  h2_sq[g] += h2 * h2;
        c_sum[g]  += c_rl; c_sq[g] += c_rl * c_rl;
      end
    end

    checks++;
    if (mismatches != 0) begin
      failures++;
      $display("FAIL %0d samples differ from the reference recurrence", mismatches);
    end
    for (int g = 0; g < NPAIRS; g++) begin
      h2_mean = h2_sum[g] / RUNS;
      c_mean  = c_sum[g] / RUNS;
      h2_sd   = $sqrt(h2_sq[g] / RUNS - h2_mean * h2_mean);
      c_sd    = $sqrt(c_sq[g] / RUNS - c_mean * c_mean);
      $display("a=%9d c=%9d  h2 %f (sd %f, published %f)  c_rl %f (sd %f, published %f)",
               TA[g], TC[g], h2_mean, h2_sd, REF_H2[g], c_mean, c_sd, REF_CRL[g]);
      checks++;
      if (!(h2_mean > REF_H2[g] * (1.0 - TOL_H2) && h2_mean < REF_H2[g] * (1.0 + TOL_H2))) begin
        failures++;
        $display("FAIL pair %0d: mean h2 %f too far from %f", g, h2_mean, REF_H2[g]);
      end
      checks++;
      if (!(c_mean > REF_CRL[g] * (1.0 - TOL_CRL) && c_mean < REF_CRL[g] * (1.0 + TOL_CRL))) begin
        failures++;
        $display("FAIL pair %0d: mean c_rl %f too far from %f", g, c_mean, REF_CRL[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
