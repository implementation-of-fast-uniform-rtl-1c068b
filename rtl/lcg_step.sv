// lcg_step: combinational next state of the linear congruential generator,
//   x_next = (A * x + C) mod 2^WIDTH.
//
// No multiplier and no carry-propagate adder are used. Because A has only a few
// non-zero bits, A * x is the sum of copies of x shifted left by the positions of
// those bits, and C adds a constant 1 in each column where it has a set bit. The
// sum is formed column by column, from bit 0 upwards. Each column collects:
//   - one bit of every shifted copy of x that reaches it,
//   - a constant 1 where C has a set bit,
//   - the weight-2 carry p of the column below,
//   - the weight-4 carry r of the column two below,
// and feeds them to a summing module of exactly that many inputs (sum2 .. sum6; a
// column with one input is a plain wire). The module's y bit is the result bit of the
// column, its p and r bits are passed up. Carries out of the top column are dropped,
// which is the mod 2^WIDTH. Which module sits in which column is decided at
// elaboration from A and C, so any odd A and C whose columns never need more than six
// inputs can be used (three set bits in A and any C always fit). With the default
// pair the widest column needs five inputs.
//
// The p and r outputs of the top columns have nowhere to go (they are the dropped
// carries), so a linter reports them as unused; that is intended.
//
// Interface: x in, x_next out, both W bits. No clock; the depth is one level of
// summing logic per column, rippling up through the p and r carries.
//
// The column-wise structure and the summing-module equations follow the design; the
// rule for which carries enter which column and the generic selection of module size
// per column are this implementation's own.
module lcg_step
  import urng_pkg::*;
#(
  parameter int unsigned           W = WIDTH,
  parameter logic [WIDTH-1:0]      A = LCG_A,
  parameter logic [WIDTH-1:0]      C = LCG_C
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] x_next
);

  // Number of shifted copies of x that reach column j (set bits of A at or below j).
  function automatic int x_terms(int j);
    int n = 0;
    for (int i = 0; i <= j; i++) if (A[i]) n++;
    return n;
  endfunction

  // Shift of the k-th shifted copy (k-th set bit of A, counting from bit 0).
  function automatic int nth_shift(int k);
    int n = 0;
    for (int i = 0; i < W; i++) begin
      if (A[i]) begin
        if (n == k) return i;
        n++;
      end
    end
    return 0;
  endfunction

  // Number of inputs of column j, including the carries that arrive from below.
  function automatic int col_inputs(int j);
    int cnt [W];
    for (int i = 0; i <= j; i++) begin
      cnt[i] = x_terms(i) + int'(C[i]);
      if (i >= 1 && cnt[i-1] >= 2) cnt[i]++;
      if (i >= 2 && cnt[i-2] >= 4) cnt[i]++;
    end
    return cnt[j];
  endfunction

  for (genvar j = 0; j < W; j++) begin : col
    localparam int NX    = x_terms(j);
    localparam int HAS_C = int'(C[j]);
    localparam int HAS_P = (j >= 1) ? int'(col_inputs(j - 1) >= 2) : 0;
    localparam int HAS_R = (j >= 2) ? int'(col_inputs(j - 2) >= 4) : 0;
    localparam int N     = NX + HAS_C + HAS_P + HAS_R;

    if (N > MAX_COL_INPUTS) begin : g_too_wide
      $error("lcg_step: column %0d needs %0d inputs, more than %0d", j, N, MAX_COL_INPUTS);
    end

    localparam int NI    = (N > 0) ? N : 1;

    logic [NI-1:0] in;
    logic y, p, r;

    for (genvar k = 0; k < NX; k++) begin : g_x
      assign in[k] = x[j - nth_shift(k)];
    end
    if (HAS_C != 0) begin : g_c
      assign in[NX] = 1'b1;
    end
    if (HAS_P != 0) begin : g_p
      assign in[NX + HAS_C] = col[j-1].p;
    end
    if (HAS_R != 0) begin : g_r
      assign in[NX + HAS_C + HAS_P] = col[j-2].r;
    end
    if (N == 0) begin : g_pad
      assign in = 1'b0;
    end

    if (N == 0) begin : g_s0
      assign y = in[0];
      assign p = 1'b0;
      assign r = 1'b0;
    end else if (N == 1) begin : g_s1
      assign y = in[0];
      assign p = 1'b0;
      assign r = 1'b0;
    end else if (N == 2) begin : g_s2
      sum2 u_sum (.a(in[0]), .b(in[1]), .y(y), .p(p));
      assign r = 1'b0;
    end else if (N == 3) begin : g_s3
      sum3 u_sum (.a(in[0]), .b(in[1]), .c(in[2]), .y(y), .p(p));
      assign r = 1'b0;
    end else if (N == 4) begin : g_s4
      sum4 u_sum (.a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .y(y), .p(p), .r(r));
    end else if (N == 5) begin : g_s5
      sum5 u_sum (.a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .e(in[4]),
                  .y(y), .p(p), .r(r));
    end else begin : g_s6
      sum6 u_sum (.a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .e(in[4]), .f(in[5]),
                  .y(y), .p(p), .r(r));
    end

    assign x_next[j] = y;
  end

endmodule
