// tb_rev_lfsr_feedback: self-checking test of the LFSR feedback line.
//
// Two instances: the default (x^4 + x + 1, expected fb = Q3 ^ Q2) and a
// 5-stage one with x^5 + x^2 + 1 (expected fb = Q4 ^ Q2). All input values
// are applied exhaustively; the expected feedback bits are written out by
// hand, not computed from the polynomial. The fan-out copies must equal the
// inputs.
module tb_rev_lfsr_feedback;

  logic [3:0] sq4, cp4;
  logic [4:0] sq5, cp5;
  logic       fb4, fb5;
  int         checks = 0, failures = 0;

  rev_lfsr_feedback u4 (.stage_q(sq4), .fb(fb4), .q_copy(cp4));
  rev_lfsr_feedback #(.N(5), .POLY(6'b100101)) u5 (.stage_q(sq5), .fb(fb5), .q_copy(cp5));

  task automatic check(input string what, input logic [4:0] got, input logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      sq4 = v[3:0];
      sq5 = v[4:0];
      #1;
      check("fb, 4 stages", {4'b0, fb4}, {4'b0, sq4[3] ^ sq4[2]});
      check("fb, 5 stages", {4'b0, fb5}, {4'b0, sq5[4] ^ sq5[2]});
      check("copies, 4 stages", {1'b0, cp4}, {1'b0, sq4});
      check("copies, 5 stages", cp5, sq5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
