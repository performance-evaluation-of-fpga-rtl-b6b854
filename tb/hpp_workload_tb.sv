// hpp_workload_tb: the HPP lattice gas on a 1024 x 1024 torus for 512
// generations, in the engine configuration that is fastest for it on the
// original board: k = 4 sites per word, n = 8 compute blocks, w = 16 words
// per plane column (64 sweeps of 8 generations).  Checks as in top_harness:
// every word of the result, the cycle count and each mechanism.
// A second run uses the largest engine that fit the original board,
// n = 16 and w = 9, for 2 of its 32 sweeps (32 generations): with k = 4 its
// margins leave one written word per plane, 256 planes per sweep.
module hpp_workload_tb;
  import ca_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int c0, f0, c1, f1;
  bit d0, d1;

  top_harness #(.RULE(RULE_HPP), .K(4), .X(1024), .Y(1024), .N(8), .W(16), .SWEEPS(64))
    h_best (.clk, .checks(c0), .failures(f0), .finished(d0));
  top_harness #(.RULE(RULE_HPP), .K(4), .X(1024), .Y(1024), .N(16), .W(9), .SWEEPS(2))
    h_max (.clk, .checks(c1), .failures(f1), .finished(d1));

  initial begin
    #2s;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
