// tb_rev_d_latch: self-checking test of the reversible D latch.
//
// Drives random d and clk values and checks, after each change, the four
// line outputs against a reference written directly from the latch's
// definition: q follows d while clk = 1 and holds while clk = 0; the garbage
// line carries Qn*CLK ^ D with Qn the stored value; clk_out repeats clk.
// Also checks that d changes while clk = 0 do not reach q.
module tb_rev_d_latch;

  logic d, clk, q, garbage, clk_out;
  logic q_ref;
  int   checks = 0, failures = 0;

  rev_d_latch dut (.d(d), .clk(clk), .q(q), .garbage(garbage), .clk_out(clk_out));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (d=%0b clk=%0b) at %0t", what, got, exp, d, clk, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // open the latch once so the stored value is known
    clk = 1'b1; d = 1'b0; #1;
    q_ref = 1'b0;
    check("q after first write", q, q_ref);
    // directed: hold 0 while d toggles, then write 1 and hold it
    clk = 1'b0; #1; d = 1'b1; #1;
    check("q holds 0", q, 1'b0);
    check("garbage while holding", garbage, 1'b1);
    clk = 1'b1; #1; q_ref = 1'b1;
    check("q written 1", q, 1'b1);
    check("garbage while open", garbage, 1'b0);
    clk = 1'b0; #1; d = 1'b0; #1;
    check("q holds 1", q, 1'b1);
    check("garbage while holding 0", garbage, 1'b0);
    // random
    repeat (400) begin
      if ($urandom_range(0, 1) == 0) d = 1'($urandom);
      else clk = 1'($urandom);
      #1;
      if (clk) q_ref = d;
      check("q", q, q_ref);
      check("garbage", garbage, (q_ref & clk) ^ d);
      check("clk_out", clk_out, clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
