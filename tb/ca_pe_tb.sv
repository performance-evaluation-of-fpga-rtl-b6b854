// ca_pe_tb: processing element, both rules.
// Random words are shifted in on random adv strobes while random rows are
// applied from above and below.  A reference history of the shifted values
// gives the expected taps; the expected next state comes from a neighbour
// count (Life) or a particle model (HPP) written here.
module ca_pe_tb;
  import ca_pkg::*;
  localparam int W = 4;
  localparam int D = 2 * W + 3;
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic adv;
  logic [3:0] din;
  logic [2:0][0:0] lp, lc, ln, lu, ld;
  logic [0:0] lout;
  logic [2:0][3:0] hp, hc, hn, hu, hd;
  logic [3:0] hout;

  ca_pe #(.RULE(RULE_LIFE), .W(W)) dut_life (
    .clk, .adv, .din(din[0:0]), .tap_prev(lp), .tap_cur(lc), .tap_next(ln),
    .up(lu), .dn(ld), .dout(lout));
  ca_pe #(.RULE(RULE_HPP), .W(W)) dut_hpp (
    .clk, .adv, .din(din), .tap_prev(hp), .tap_cur(hc), .tap_next(hn),
    .up(hu), .dn(hd), .dout(hout));

  logic [3:0] hist [D];
  int filled = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic life_ref(logic [2:0] u, logic [2:0] m, logic [2:0] d);
    int n = $countones(u) + $countones(d) + int'(m[0]) + int'(m[2]);
    return m[1] ? (n == 2 || n == 3) : (n == 3);
  endfunction

  function automatic logic [3:0] hpp_ref(logic [3:0] u, logic [3:0] d, logic [3:0] l, logic [3:0] r);
    logic [3:0] g = {d[3], l[2], u[1], r[0]};
    if (g == 4'b0101) return 4'b1010;
    if (g == 4'b1010) return 4'b0101;
    return g;
  endfunction

  initial begin
    adv = 0; din = 0; lu = '0; ld = '0; hu = '0; hd = '0;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      adv = ($urandom % 4) != 0;
      din = 4'($urandom);
      lu = 3'($urandom); ld = 3'($urandom);
      hu = 12'($urandom); hd = 12'($urandom);
      @(posedge clk);
      if (adv) begin
        for (int i = D - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = din;
        if (filled < D) filled++;
      end
      #1;
      if (filled == D) begin
        logic [2:0][3:0] ep, ec, en;
        en = {hist[0], hist[W], hist[2*W]};
        ec = {hist[1], hist[W+1], hist[2*W+1]};
        ep = {hist[2], hist[W+2], hist[2*W+2]};
        checks++;
        if (hc !== ec || hp !== ep || hn !== en) failures++;
        checks++;
        if (lc !== {ec[2][0], ec[1][0], ec[0][0]} || lp !== {ep[2][0], ep[1][0], ep[0][0]}
            || ln !== {en[2][0], en[1][0], en[0][0]}) failures++;
        checks++;
        if (lout !== life_ref({lu[2], lu[1], lu[0]}, {ec[2][0], ec[1][0], ec[0][0]},
                              {ld[2], ld[1], ld[0]})) failures++;
        checks++;
        if (hout !== hpp_ref(hu[1], hd[1], ec[0], ec[2])) begin
          failures++;
          if (failures < 10) $display("hpp mismatch t=%0d got %b", t, hout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
