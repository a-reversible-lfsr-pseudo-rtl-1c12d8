// tb_rev_lfsr_lengths: the generator at the register lengths of the
// pseudo-random testing results (5, 36 and 41 stages).
//
// Each length uses a primitive trinomial (x^5 + x^2 + 1, x^36 + x^11 + 1,
// x^41 + x^3 + 1), seed Q0 = 1, and runs for a number of vectors:
//   5 stages:  31 vectors, the full period (2^5 - 1); the seed must then
//              return, and the first 15 vectors must be distinct;
//   36 stages: 850 vectors, all distinct;
//   41 stages: 2550 vectors, all distinct (the 1200-vector run is its prefix).
// Every step is also compared with a reference next-state rule computed here
// from the polynomial coefficients: new Q0 = XOR of phi_i * Q(N-1-i), i < N.
// The three generators share one clock and run side by side.
module tb_rev_lfsr_lengths;

  localparam logic [5:0]  POLY5  = 6'b100101;            // x^5 + x^2 + 1
  localparam logic [36:0] POLY36 = 37'h10_0000_0801;     // x^36 + x^11 + 1
  localparam logic [41:0] POLY41 = 42'h200_0000_0009;    // x^41 + x^3 + 1

  logic clk, seed_load;
  logic [4:0]  q5;
  logic [35:0] q36;
  logic [40:0] q41;
  logic        co5, co36, co41;
  logic [9:0]  g5;
  logic [71:0] g36;
  logic [81:0] g41;
  int checks = 0, failures = 0, cycles = 0;

  rev_lfsr #(.N(5),  .POLY(POLY5))  u5  (.clk(clk), .seed_load(seed_load), .seed(5'd1),  .q(q5),  .clk_out(co5),  .garbage(g5));
  rev_lfsr #(.N(36), .POLY(POLY36)) u36 (.clk(clk), .seed_load(seed_load), .seed(36'd1), .q(q36), .clk_out(co36), .garbage(g36));
  rev_lfsr #(.N(41), .POLY(POLY41)) u41 (.clk(clk), .seed_load(seed_load), .seed(41'd1), .q(q41), .clk_out(co41), .garbage(g41));

  function automatic logic [63:0] ref_next(input logic [63:0] s, input int n, input logic [63:0] poly);
    logic b = 1'b0;
    for (int i = 0; i < n; i++) b ^= poly[i] & s[n-1-i];
    return ((s << 1) | 64'(b)) & ((64'd1 << n) - 1);
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  initial begin
    clk = 1'b1;
    forever #5 clk = ~clk;
  end

  always @(negedge clk) cycles++;

  initial begin
    wait (cycles == 4000);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e5, e36, e41;
    bit seen5 [logic [63:0]];
    bit seen36 [logic [63:0]];
    bit seen41 [logic [63:0]];
    seed_load = 1'b1;
    @(negedge clk); #1;
    seed_load = 1'b0;
    e5 = 1; e36 = 1; e41 = 1;
    for (int k = 0; k < 2550; k++) begin
      // compare the current vectors, record them, then step
      if (k < 31) begin
        checks++; if (64'(q5) != e5) fail($sformatf("5 stages, vector %0d", k));
        if (k < 15) begin
          checks++; if (seen5.exists(64'(q5))) fail("5 stages: repeat within 15 vectors");
        end
        seen5[64'(q5)] = 1'b1;
      end
      if (k < 850) begin
        checks++; if (64'(q36) != e36) fail($sformatf("36 stages, vector %0d", k));
        checks++; if (seen36.exists(64'(q36)) || q36 == '0) fail("36 stages: repeat or zero");
        seen36[64'(q36)] = 1'b1;
      end
      checks++; if (64'(q41) != e41) fail($sformatf("41 stages, vector %0d", k));
      checks++; if (seen41.exists(64'(q41)) || q41 == '0) fail("41 stages: repeat or zero");
      seen41[64'(q41)] = 1'b1;
      @(negedge clk); #1;
      e5  = ref_next(e5, 5, 64'(POLY5));
      e36 = ref_next(e36, 36, 64'(POLY36));
      e41 = ref_next(e41, 41, 64'(POLY41));
      if (k == 30) begin
        checks++; if (q5 != 5'd1) fail("5 stages: seed does not return after 31 clocks");
        checks++; if (seen5.num() != 31) fail("5 stages: fewer than 31 distinct vectors");
      end
    end
    checks++; if (seen36.num() != 850)  fail("36 stages: not 850 distinct vectors");
    checks++; if (seen41.num() != 2550) fail("41 stages: not 2550 distinct vectors");
    $display("distinct vectors: 5 stages %0d, 36 stages %0d, 41 stages %0d",
             seen5.num(), seen36.num(), seen41.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
