// tb_lcg_step: self-checking test of the combinational LCG step lcg_step.
//
// Several instances with different (A, C, W) are checked against a reference model
// computed here with ordinary 64-bit arithmetic, (A * x + C) mod 2^W:
//   - the default 32-bit pair A = 136314881, C = 18433, on corner values and on
//     20000 random states;
//   - all nine (a, c) pairs of the parameter search, 32 bits, 2000 random states each;
//   - W = 16, A = 193 (1100_0001b), C = 0, exhaustive: the full 16-bit product of an
//     8-bit operand by 193, the three-term example of multiplying by a sparse constant;
//   - W = 16, A = 21, C = 0x41, exhaustive: a pair for which one column needs the
//     six-input summing module, so sum6 is exercised inside the adder as well.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_lcg_step;
  import urng_pkg::*;

  int checks = 0;
  int failures = 0;

  localparam int NPAIRS = 9;
  localparam logic [31:0] TA [NPAIRS] = '{
    32'(2**11 + 2**5  + 1), 32'(2**19 + 2**9  + 1), 32'(2**18 + 2**9  + 1),
    32'(2**30 + 2**13 + 1), 32'(2**21 + 2**12 + 1), 32'(2**29 + 2**15 + 1),
    32'(2**30 + 2**13 + 1), 32'(2**30 + 2**19 + 1), 32'(2**27 + 2**21 + 1)};
  localparam logic [31:0] TC [NPAIRS] = '{
    32'(2**3  + 2**2  + 1), 32'(2**18 + 2**1  + 1), 32'(2**19 + 2**6  + 1),
    32'(2**12 + 2**1  + 1), 32'(2**19 + 2**6  + 1), 32'(2**30 + 2**13 + 1),
    32'(2**20 + 2**17 + 1), 32'(2**20 + 2**17 + 1), 32'(2**14 + 2**11 + 1)};

  // Default instance.
  logic [31:0] x_def, y_def;
  lcg_step dut_def (.x(x_def), .x_next(y_def));

  // One instance per pair of the parameter search.
  logic [31:0] x_tab;
  logic [31:0] y_tab [NPAIRS];
  for (genvar g = 0; g < NPAIRS; g++) begin : g_tab
    lcg_step #(.W(32), .A(TA[g]), .C(TC[g])) dut (.x(x_tab), .x_next(y_tab[g]));
  end

  // Small-width instances, checked exhaustively.
  logic [15:0] x16, y193, y21;
  lcg_step #(.W(16), .A(32'd193), .C(32'd0))    dut_193 (.x(x16), .x_next(y193));
  lcg_step #(.W(16), .A(32'd21),  .C(32'h41))   dut_21  (.x(x16), .x_next(y21));

  function automatic logic [31:0] ref_step(logic [31:0] a, logic [31:0] c, logic [31:0] x,
                                           int w);
    longint unsigned full = longint'(a) * longint'(x) + longint'(c);
    return 32'(full & ((64'd1 << w) - 1));
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp, logic [31:0] x);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s x=%h got %h expected %h", what, x, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
                                32'hAAAA_5555};
    foreach (corner[i]) begin
      x_def = corner[i];
      #1;
      check("default", y_def, ref_step(LCG_A, LCG_C, x_def, 32), x_def);
    end
    for (int i = 0; i < 20000; i++) begin
      x_def = $urandom;
      #1;
      check("default", y_def, ref_step(LCG_A, LCG_C, x_def, 32), x_def);
    end
    for (int i = 0; i < 2000; i++) begin
      x_tab = $urandom;
      #1;
      for (int g = 0; g < NPAIRS; g++)
        check($sformatf("pair%0d", g), y_tab[g], ref_step(TA[g], TC[g], x_tab, 32), x_tab);
    end
    for (int i = 0; i < 65536; i++) begin
      x16 = 16'(i);
      #1;
      check("a=193", {16'd0, y193}, ref_step(32'd193, 32'd0, {16'd0, x16}, 16), {16'd0, x16});
      check("a=21",  {16'd0, y21},  ref_step(32'd21, 32'h41, {16'd0, x16}, 16), {16'd0, x16});
      if (i < 256) begin
        // 8-bit operand: the 16-bit result is the complete product 193 * x.
        checks++;
        if (int'(y193) != 193 * i) begin
          failures++;
          $display("FAIL 8-bit product 193*%0d got %0d", i, y193);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
