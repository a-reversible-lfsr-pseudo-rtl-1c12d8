// rev_lfsr: reversible pseudo-random pattern generator (external-XOR LFSR).
//
// N reversible master-slave D flip-flops (rev_dff) form a shift register
// Q0 -> Q1 -> ... -> Q(N-1). The feedback line (rev_lfsr_feedback) XORs the
// stage outputs selected by the characteristic polynomial POLY and drives D
// of Q0. The clock line runs through the flip-flops one after another, as a
// reversible line does. With a primitive polynomial the register steps
// through all 2^N - 1 non-zero states before repeating. The default is the
// published four-bit generator, phi(x) = x^4 + x + 1, i.e. Q0 <= Q2 ^ Q3;
// from seed 0001 (Q0 = 1) it gives 1000, 0100, 0010, 1001, ... (Q0 Q1 Q2 Q3)
// and returns to 1000 after 15 clocks.
//
// Seed loading is this design's own addition: the published circuit starts
// from its seed but does not show how the seed gets there. While seed_load is
// 1, every flip-flop's D input takes seed[i] instead of its shift input, so
// one clock cycle with seed_load = 1 sets the register to seed. This selector
// is ordinary logic, not part of the reversible netlist.
//
// Timing: a new vector appears after every falling edge of clk (see
// rev_dff), one vector per clock period. q carries fan-out copies of the
// flip-flop outputs; garbage carries each flip-flop's two latch garbage
// lines; clk_out is the clock line after the last flip-flop. An all-zero
// register stays all-zero, as in any XOR LFSR.
//
// Lint and synthesis report a combinational loop through the latches: it is
// the shift-and-feedback ring itself, made of latches rather than
// edge-triggered flip-flops. In operation it is always cut, because each
// master latch (open while clk = 1) and the slave latch feeding it (open
// while clk = 0) are never open together.
module rev_lfsr
  import rev_lfsr_pkg::*;
#(
  parameter int unsigned N    = DEF_N,
  parameter logic [N:0]  POLY = DEF_POLY
) (
  input  logic           clk,
  input  logic           seed_load,
  input  logic [N-1:0]   seed,
  output logic [N-1:0]   q,
  output logic           clk_out,
  output logic [2*N-1:0] garbage
);

  logic [N-1:0] stage_q;   // flip-flop outputs Q0..Q(N-1)
  logic [N-1:0] d;         // flip-flop D inputs
  logic [N:0]   clk_line;  // clock line between flip-flops
  logic         fb;

  assign clk_line[0] = clk;

  rev_lfsr_feedback #(.N(N), .POLY(POLY)) u_feedback (
    .stage_q (stage_q),
    .fb      (fb),
    .q_copy  (q)
  );

  always_comb begin
    d[0] = seed_load ? seed[0] : fb;
    for (int unsigned i = 1; i < N; i++) d[i] = seed_load ? seed[i] : stage_q[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_dff u_dff (
      .d       (d[i]),
      .clk     (clk_line[i]),
      .q       (stage_q[i]),
      .garbage (garbage[2*i +: 2]),
      .clk_out (clk_line[i+1])
    );
  end

  assign clk_out = clk_line[N];

endmodule
