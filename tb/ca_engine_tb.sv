// ca_engine_tb: pipelines of compute blocks on random planes, Life and HPP.
// See engine_harness for the checks (data of n generations, latency
// n*(w+2)-1 advances, 2n columns lost per stream).
module ca_engine_tb;
  import ca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c0, f0, c1, f1;
  bit d0, d1;

  engine_harness #(.RULE(RULE_LIFE), .K(16), .N(4), .W(3), .C(14), .USE_CB(0))
    h0 (.clk, .rst_n, .checks(c0), .failures(f0), .finished(d0));
  engine_harness #(.RULE(RULE_HPP), .K(4), .N(3), .W(4), .C(12), .USE_CB(0))
    h1 (.clk, .rst_n, .checks(c1), .failures(f1), .finished(d1));

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    #23 rst_n = 1;
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
