// life_points_tb: the Game of Life on a 1024 x 1024 torus with smaller plane
// buffers, n = 16 compute blocks and w = 3 or w = 6 words per plane column,
// one sweep (16 generations) each.  Together with the default build (w = 9)
// these are the three buffer sizes measured on the original board.  Checks as
// in top_harness: every word of the result, the cycle count, each mechanism.
module life_points_tb;
  import ca_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int c0, f0, c1, f1;
  bit d0, d1;

  top_harness #(.RULE(RULE_LIFE), .K(16), .X(1024), .Y(1024), .N(16), .W(3), .SWEEPS(1))
    h_w3 (.clk, .checks(c0), .failures(f0), .finished(d0));
  top_harness #(.RULE(RULE_LIFE), .K(16), .X(1024), .Y(1024), .N(16), .W(6), .SWEEPS(1))
    h_w6 (.clk, .checks(c1), .failures(f1), .finished(d1));

  initial begin
    #100ms;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
