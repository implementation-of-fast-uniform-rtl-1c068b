// urng_lcg: fast uniform pseudo-random number generator, one 32-bit number per clock.
//
// A WIDTH-bit state register X is advanced every enabled clock by lcg_step, which
// computes (A * X + C) mod 2^WIDTH in plain gates: the shifted copies of X selected by
// the set bits of A, and the set bits of C, are added column by column with small
// summing modules (sum2 .. sum6). There is no multiplier and no pipeline, so the whole
// update fits in one clock cycle (the design targets a 20 ns, 50 MHz clock).
// With A = 136314881 (A mod 4 = 1) and odd C = 18433 the sequence has the full
// period 2^32.
//
// Interface:
//   clk, rst_n  rising-edge clock, active-low synchronous reset; reset loads SEED.
//   load, seed  load the state with seed on the next edge (takes precedence over en).
//   en          advance the state by one step on the next edge.
//   rnd         the current number (the state register itself, so it is registered).
//   rnd_valid   high for the cycle after an edge that produced a new number by en.
// Timing: with en held high a new number appears on rnd every clock, zero latency
// beyond the register. Load, enable, reset, the seed value at reset and the valid
// flag are this implementation's choices; the recurrence, the constants and the
// gate-level column adder follow the design.
module urng_lcg
  import urng_pkg::*;
#(
  parameter int unsigned      W    = WIDTH,
  parameter logic [WIDTH-1:0] A    = LCG_A,
  parameter logic [WIDTH-1:0] C    = LCG_C,
  parameter logic [WIDTH-1:0] SEED = WIDTH'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         en,
  output logic [W-1:0] rnd,
  output logic         rnd_valid
);

  logic [W-1:0] x_q;
  logic [W-1:0] x_next;

  lcg_step #(.W(W), .A(A), .C(C)) u_step (
    .x     (x_q),
    .x_next(x_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q       <= SEED[W-1:0];
      rnd_valid <= 1'b0;
    end else begin
      if (load)    x_q <= seed;
      else if (en) x_q <= x_next;
      rnd_valid <= en && !load;
    end
  end

  assign rnd = x_q;

endmodule
