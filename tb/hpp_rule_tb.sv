// hpp_rule_tb: exhaustive check of the HPP site update.
// All 2**16 combinations of the four neighbouring sites are applied.  Each
// result is checked against an independently written particle model
// (arrivals by direction, then the two head-on collisions), and for
// conservation of particle count and momentum.
module hpp_rule_tb;
  int checks = 0, failures = 0;
  logic [3:0] up, down, left, right, next;

  hpp_rule dut (.up, .down, .left, .right, .next);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int collisions = 0;
    for (int v = 0; v < 65536; v++) begin
      bit w_in, s_in, e_in, n_in;
      logic [3:0] exp;
      int px, py, qx, qy;
      {up, down, left, right} = 16'(v);
      #1;
      // arrivals: left-mover from the right site, right-mover from the left
      // site, down-mover from the site above, up-mover from the site below
      w_in = right[0]; e_in = left[2]; s_in = up[1]; n_in = down[3];
      if (w_in && e_in && !s_in && !n_in)      begin exp = 4'b1010; collisions++; end
      else if (s_in && n_in && !w_in && !e_in) begin exp = 4'b0101; collisions++; end
      else exp = {n_in, e_in, s_in, w_in};
      checks++;
      if (next !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch in=%h got %b exp %b", v, next, exp);
      end
      // conservation
      px = int'(e_in) - int'(w_in);  py = int'(n_in) - int'(s_in);
      qx = int'(next[2]) - int'(next[0]);  qy = int'(next[3]) - int'(next[1]);
      checks++;
      if ($countones(next) != int'(w_in) + int'(e_in) + int'(s_in) + int'(n_in)
          || px != qx || py != qy) failures++;
    end
    checks++; if (collisions != 2 * 4096) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
