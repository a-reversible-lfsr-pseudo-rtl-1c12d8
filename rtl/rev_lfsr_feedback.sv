// rev_lfsr_feedback: feedback line and output fan-out of the external-XOR LFSR.
//
// Stage i of the register holds Qi; the shift runs Q0 -> Q1 -> ... -> Q(N-1)
// and the feedback line drives D of stage 0. Numbering the stages the other
// way, S_i = Q(N-1-i), the characteristic polynomial
//   phi(x) = phi_N x^N + ... + phi_1 x + phi_0
// gives the new first-stage bit as XOR over i < N of phi_i * S_i. In the
// reversible circuit this is a single line: it leaves the last stage carrying
// Q(N-1) (the phi_0 term), and a one-control XOR gate adds each further
// tapped stage output onto it. With phi(x) = x^4 + x + 1 the line carries
// Q3 ^ Q2.
//
// The outputs q_copy are the register outputs copied onto constant-0 lines by
// one-control XOR gates, because a reversible line cannot simply fan out.
//
// Purely combinational. POLY[N] (phi_N) must be 1.
module rev_lfsr_feedback
  import rev_lfsr_pkg::*;
#(
  parameter int unsigned N    = DEF_N,
  parameter logic [N:0]  POLY = DEF_POLY
) (
  input  logic [N-1:0] stage_q,   // Q0..Q(N-1), flip-flop outputs
  output logic         fb,        // to D of stage 0
  output logic [N-1:0] q_copy     // fan-out copies of Q0..Q(N-1)
);

  always_comb begin
    // phi_0 selects whether the line starts from the last stage or from 0.
    fb = POLY[0] ? stage_q[N-1] : 1'b0;
    for (int unsigned i = 1; i < N; i++) begin
      if (POLY[i]) fb = cx1(stage_q[N-1-i], fb);
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) q_copy[i] = cx1(stage_q[i], 1'b0);
  end

  if (POLY[N] != 1'b1) begin : g_bad_poly
    $error("rev_lfsr_feedback: phi_N (POLY[N]) must be 1");
  end

endmodule
