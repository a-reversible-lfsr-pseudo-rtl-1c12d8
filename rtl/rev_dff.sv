// rev_dff: reversible master-slave D flip-flop.
//
// Two rev_d_latch instances in series. The master latch is clocked by the
// CLK line; a gate with no controls on the clock line then inverts it, and
// the slave latch is clocked by the inverted CLK. A second inverting gate
// restores CLK so the same clock line can run on to the next flip-flop.
// Line 1 (Qn+1) of the master is the D input of the slave.
//
// Timing: the master is open while clk = 1 and the slave while clk = 0, so q
// takes the value d had at the falling edge of clk and keeps it until the
// next falling edge. Nothing changes at the rising edge.
//
// The latch pairing, the clock-line inversions and the CLK / inverted-CLK
// labels follow the published four-bit generator schematic; the falling-edge
// behaviour follows from them. There is no reset (see rev_d_latch). Each
// latch is reported as a latch by synthesis; that is intended.
module rev_dff (
  input  logic       d,
  input  logic       clk,
  output logic       q,
  output logic [1:0] garbage,   // [0]: master line 2, [1]: slave line 2
  output logic       clk_out
);

  logic master_q, clk_a, clk_n, clk_b;
  logic garbage_m, garbage_s;

  rev_d_latch u_master (
    .d       (d),
    .clk     (clk),
    .q       (master_q),
    .garbage (garbage_m),
    .clk_out (clk_a)
  );

  assign clk_n = ~clk_a;        // inverting gate on the clock line

  rev_d_latch u_slave (
    .d       (master_q),
    .clk     (clk_n),
    .q       (q),
    .garbage (garbage_s),
    .clk_out (clk_b)
  );

  assign garbage = {garbage_s, garbage_m};
  assign clk_out = ~clk_b;      // second inverting gate restores CLK

endmodule
