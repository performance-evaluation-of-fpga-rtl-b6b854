// ca_accel_top_tb: end-to-end runs at reduced lattice sizes.
//   Life: k=16, 40 x 80 lattice, n=3, w=4 (5 planes with wrap), 3 sweeps.
//   HPP : k=4,  24 x 40 lattice, n=5, w=7 (4 planes with wrap), 2 sweeps.
// See top_harness for what is checked.
module ca_accel_top_tb;
  import ca_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int c0, f0, c1, f1;
  bit d0, d1;

  top_harness #(.RULE(RULE_LIFE), .K(16), .X(40), .Y(80), .N(3), .W(4), .SWEEPS(3))
    h_life (.clk, .checks(c0), .failures(f0), .finished(d0));
  top_harness #(.RULE(RULE_HPP), .K(4), .X(24), .Y(40), .N(5), .W(7), .SWEEPS(2))
    h_hpp (.clk, .checks(c1), .failures(f1), .finished(d1));

  initial begin
    #50ms;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
