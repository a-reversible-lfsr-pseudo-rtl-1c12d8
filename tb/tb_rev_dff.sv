// tb_rev_dff: self-checking test of the reversible master-slave D flip-flop.
//
// A 10-unit clock; d is changed at random times in both clock phases. The
// reference model captures d at every falling clock edge. Checks: q equals
// the reference one unit after every falling edge and just before it (so q
// never moves at the rising edge or when d moves), clk_out repeats clk, and
// the two garbage lines equal their expressions (master: clk ? 0 : d;
// slave: clk ? d : 0 with the master open while clk = 1). The cycle count
// of one clock period from d to q is checked as part of the same comparison.
module tb_rev_dff;

  logic       d, clk, q, clk_out;
  logic [1:0] garbage;
  logic       q_ref;
  int         checks = 0, failures = 0;
  int         cycles = 0;

  rev_dff dut (.d(d), .clk(clk), .q(q), .garbage(garbage), .clk_out(clk_out));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    clk = 1'b1;
    forever #5 clk = ~clk;
  end

  always @(negedge clk) cycles++;

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: value of d at each falling edge
  always @(negedge clk) q_ref <= d;

  initial begin
    d = 1'b0;
    @(negedge clk); #1;   // first capture makes q known
    check("q after first edge", q, 1'b0);
    repeat (300) begin
      // change d somewhere in the low phase and somewhere in the high phase
      #($urandom_range(1, 2)); d = 1'($urandom);
      #1;
      check("q steady in low phase", q, q_ref);
      check("garbage master, clk=0", garbage[0], d);
      check("garbage slave, clk=0", garbage[1], 1'b0);
      @(posedge clk); #1;
      check("q unchanged by rising edge", q, q_ref);
      #($urandom_range(1, 2)); d = 1'($urandom);
      #1;
      check("q steady in high phase", q, q_ref);
      check("garbage master, clk=1", garbage[0], 1'b0);
      check("garbage slave, clk=1", garbage[1], d);
      check("clk_out", clk_out, clk);
      @(negedge clk); #1;
      check("q after falling edge", q, q_ref);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
