// ca_cb_tb: one compute block on random planes, Life (k=16) and HPP (k=4),
// including a non-zero boundary state.  See engine_harness for the checks.
module ca_cb_tb;
  import ca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c0, f0, c1, f1, c2, f2;
  bit d0, d1, d2;

  engine_harness #(.RULE(RULE_LIFE), .K(16), .N(1), .W(4), .C(9), .USE_CB(1), .BC(4'h1))
    h0 (.clk, .rst_n, .checks(c0), .failures(f0), .finished(d0));
  engine_harness #(.RULE(RULE_HPP), .K(4), .N(1), .W(5), .C(10), .USE_CB(1), .BC(4'h0))
    h1 (.clk, .rst_n, .checks(c1), .failures(f1), .finished(d1));
  engine_harness #(.RULE(RULE_HPP), .K(4), .N(1), .W(3), .C(7), .USE_CB(1), .BC(4'hf))
    h2 (.clk, .rst_n, .checks(c2), .failures(f2), .finished(d2));

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    #23 rst_n = 1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
