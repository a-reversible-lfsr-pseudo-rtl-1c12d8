// tb_rev_lfsr: end-to-end test of the reversible LFSR generator at its
// default configuration (4 stages, phi(x) = x^4 + x + 1).
//
// 1. Loads seed 0001 (Q0 = 1) and compares 16 consecutive vectors with the
//    published test-pattern table, held here as a literal list.
// 2. Checks the period: the seed comes back after exactly 15 clocks, the 15
//    vectors are all different and none is zero.
// 3. Loads every non-zero seed in turn and compares 20 steps with a reference
//    next-state rule written independently (Q0 <= Q2 ^ Q3, Qi <= Q(i-1)).
// 4. Loads the all-zero seed and checks that the register stays at zero.
// 5. Checks the timing on every step: the vector changes only after the
//    falling clock edge (not at the rising edge), one vector per period.
// Mechanisms counted, each must occur: seed loads, shift steps that inject a
// 1 through the feedback line, shift steps that inject a 0, and wrap-arounds
// of the full 15-state cycle.
module tb_rev_lfsr;

  localparam int N = 4;

  logic         clk, seed_load, clk_out;
  logic [N-1:0] seed, q;
  logic [2*N-1:0] garbage;
  int checks = 0, failures = 0, cycles = 0;
  int n_load = 0, n_fb1 = 0, n_fb0 = 0, n_wrap = 0;

  // Published table, rows written as Q0 Q1 Q2 Q3 (leftmost character = Q0).
  string table_rows [16] = '{"1000", "0100", "0010", "1001", "1100", "0110",
                             "1011", "0101", "1010", "1101", "1110", "1111",
                             "0111", "0011", "0001", "1000"};

  rev_lfsr dut (.clk(clk), .seed_load(seed_load), .seed(seed), .q(q),
                .clk_out(clk_out), .garbage(garbage));

  task automatic check(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got Q3..Q0=%b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [N-1:0] row_to_vec(input string r);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = (r[i] == "1");
    return v;
  endfunction

  function automatic logic [N-1:0] ref_next(input logic [N-1:0] s);
    return {s[2], s[1], s[0], s[2] ^ s[3]};
  endfunction

  initial begin
    clk = 1'b1;
    forever #5 clk = ~clk;
  end

  always @(negedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock period: from just after a falling edge to just after the next.
  // Checks that q does not move at the rising edge in between.
  task automatic step(output logic [N-1:0] after);
    logic [N-1:0] prev_q;
    prev_q = q;
    @(posedge clk); #1;
    check("no change at rising edge", q, prev_q);
    check("clk_out follows clk", {3'b0, clk_out}, {3'b0, clk});
    @(negedge clk); #1;
    after = q;
  endtask

  task automatic load(input logic [N-1:0] s);
    logic [N-1:0] v;
    seed = s; seed_load = 1'b1;
    step(v);
    seed_load = 1'b0;
    n_load++;
    check("seed loaded", v, s);
  endtask

  initial begin
    logic [N-1:0] v, prev, first;
    bit seen [logic [N-1:0]];
    seed_load = 1'b0; seed = '0;
    @(negedge clk); #1;

    // 1. published table
    load(4'b0001);
    check("table row 0", q, row_to_vec(table_rows[0]));
    for (int r = 1; r < 16; r++) begin
      prev = q;
      step(v);
      if (prev[2] ^ prev[3]) n_fb1++; else n_fb0++;
      check($sformatf("table row %0d", r), v, row_to_vec(table_rows[r]));
    end

    // 2. period of the default seed
    load(4'b0001);
    first = q;
    seen.delete();
    for (int k = 1; k <= 15; k++) begin
      seen[q] = 1'b1;
      checks++;
      if (q == '0) begin failures++; $display("FAIL zero state"); end
      step(v);
      if (k < 15) begin
        checks++;
        if (v == first) begin failures++; $display("FAIL period shorter than 15 (%0d)", k); end
      end
    end
    check("seed returns after 15 clocks", q, first);
    if (q == first) n_wrap++;
    checks++;
    if (seen.num() != 15) begin failures++; $display("FAIL %0d distinct states", seen.num()); end

    // 3. every non-zero seed against the reference rule
    for (int s = 1; s < 16; s++) begin
      load(N'(s));
      for (int k = 0; k < 20; k++) begin
        prev = q;
        step(v);
        if (prev[2] ^ prev[3]) n_fb1++; else n_fb0++;
        if (k == 14) begin
          check("wrap to seed after 15", v, N'(s));
          if (v == N'(s)) n_wrap++;
        end
        check("next state", v, ref_next(prev));
      end
    end

    // 4. all-zero seed locks up
    load('0);
    repeat (5) begin
      step(v);
      check("zero state stays zero", v, '0);
    end

    $display("mechanisms: seed loads=%0d feedback-1 steps=%0d feedback-0 steps=%0d wraps=%0d",
             n_load, n_fb1, n_fb0, n_wrap);
    checks += 4;
    if (n_load == 0) begin failures++; $display("FAIL no seed load"); end
    if (n_fb1 == 0)  begin failures++; $display("FAIL feedback never injected 1"); end
    if (n_fb0 == 0)  begin failures++; $display("FAIL feedback never injected 0"); end
    if (n_wrap == 0) begin failures++; $display("FAIL no full-period wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
