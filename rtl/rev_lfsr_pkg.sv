// rev_lfsr_pkg: shared constants, types and gate functions of the reversible
// LFSR pattern generator.
//
// The generator is built only from reversible gates drawn as a target line
// (marked with an XOR symbol) and zero or more control lines: the target line
// is inverted when every control line is 1, and the control lines pass
// through unchanged. cx1 and cx2 below are those gates with one and two
// controls. They are written as functions so that the line-by-line cascades
// in the latch and the feedback line read like the gate drawings.
//
// DEF_N and DEF_POLY are the default configuration: a 4-bit register with
// characteristic polynomial phi(x) = x^4 + x + 1. POLY bit i holds the
// coefficient phi_i of x^i.
package rev_lfsr_pkg;

  localparam int unsigned DEF_N    = 4;
  localparam logic [4:0]  DEF_POLY = 5'b10011;   // x^4 + x + 1

  // The four lines of one reversible D latch, in the drawing's order.
  typedef struct packed {
    logic q;    // line 1: Qn in, Qn+1 out
    logic d;    // line 2: D in, garbage Qn*CLK ^ D out
    logic clk;  // line 3: CLK in, CLK out
    logic z;    // line 4: constant 0 in, copy of Qn+1 out
  } latch_lines_t;

  // Target inverted under one control.
  function automatic logic cx1(input logic c, input logic t);
    return t ^ c;
  endfunction

  // Target inverted under two controls.
  function automatic logic cx2(input logic c0, input logic c1, input logic t);
    return t ^ (c0 & c1);
  endfunction

  // The latch cascade: three gates applied left to right to the four lines.
  //   gate 1: line 2 ^= line 1 & line 3   ->  D' = Qn*CLK ^ D
  //   gate 2: line 1 ^= line 2 & line 3   ->  Qn+1 = Qn*CLK ^ D*CLK ^ Qn
  //   gate 3: line 4 ^= line 1            ->  copy of Qn+1 on the 0 line
  // Qn+1 reduces to CLK ? D : Qn.
  function automatic latch_lines_t latch_cascade(input latch_lines_t in);
    latch_lines_t l;
    l   = in;
    l.d = cx2(l.q, l.clk, l.d);
    l.q = cx2(l.d, l.clk, l.q);
    l.z = cx1(l.q, l.z);
    return l;
  endfunction

endpackage
