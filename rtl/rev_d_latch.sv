// rev_d_latch: reversible D latch.
//
// Four lines (Qn, D, CLK, constant 0) pass through a cascade of three
// reversible controlled-XOR gates (see rev_lfsr_pkg::latch_cascade). The
// resulting line outputs are
//   line 1  Qn+1    = Qn*CLK ^ D*CLK ^ Qn   (= CLK ? D : Qn)
//   line 2  garbage = Qn*CLK ^ D
//   line 3  CLK     (passed through)
//   line 4  copy of Qn+1
// and line 4 is looped back onto the Qn input, which is what makes the
// circuit store a bit. The gate cascade and the output expressions follow the
// published reversible latch; the loop is the only storage.
//
// Storage: the loop is closed through a level-sensitive element that is open
// while CLK is 1. While CLK is 0 the cascade returns Qn on line 4 unchanged,
// so holding the value is exactly what the loop does; this keeps the loop
// free of a zero-delay combinational cycle and maps it onto an ordinary
// latch. A tool therefore reports a latch on q_fb: that is intended, the
// block is a latch. When latches are chained into a ring (the LFSR), lint
// also reports a circular path through this block's lines; see rev_lfsr for
// why that ring is always cut in operation. There is no reset; a reversible
// circuit has none, and the surrounding design loads its state through D.
//
// Interface and timing: transparent while clk = 1 (q follows d), holds while
// clk = 0. garbage is 0 while transparent and equals d while holding.
// clk_out repeats clk so that the clock line can continue to the next gate.
module rev_d_latch
  import rev_lfsr_pkg::*;
(
  input  logic d,
  input  logic clk,
  output logic q,
  output logic garbage,
  output logic clk_out
);

  logic         q_fb;    // line 4 looped back to the Qn input
  latch_lines_t lines;

  // While the latch is open (CLK = 1) line 4 of the cascade equals D whatever
  // Qn is (Qn*CLK ^ D*CLK ^ Qn = D), so the stored value is taken from the
  // cascade evaluated with CLK = 1 and no Qn: the same value, without a
  // zero-delay loop from q_fb back to itself.
  always_latch begin
    if (clk) q_fb = latch_cascade('{q: 1'b0, d: d, clk: 1'b1, z: 1'b0}).z;
  end

  always_comb lines = latch_cascade('{q: q_fb, d: d, clk: clk, z: 1'b0});

  // Line 4 is the copy that closes the loop; it must always equal line 1.
  always_comb begin
    assert (lines.z == lines.q) else $error("rev_d_latch: line 4 differs from line 1");
  end

  assign q       = lines.q;
  assign garbage = lines.d;
  assign clk_out = lines.clk;

endmodule
