// life_rule_tb: exhaustive check of the Game of Life cell rule.
// All 512 neighbourhoods are applied; the expected state is worked out from a
// neighbour count with the B3/S23 rule.
module life_rule_tb;
  int checks = 0, failures = 0;
  logic [2:0] up_row, mid_row, dn_row;
  logic       next;

  life_rule dut (.up_row, .mid_row, .dn_row, .next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int births = 0, survivals = 0;
    for (int v = 0; v < 512; v++) begin
      int n;
      logic self, exp;
      {up_row, mid_row, dn_row} = 9'(v);
      #1;
      self = mid_row[1];
      n = $countones(up_row) + $countones(dn_row) + int'(mid_row[0]) + int'(mid_row[2]);
      if (self) exp = (n == 2 || n == 3);
      else      exp = (n == 3);
      if (!self && exp) births++;
      if (self && exp) survivals++;
      checks++;
      if (next !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch nbh=%b got %b exp %b", v[8:0], next, exp);
      end
    end
    // 8 choose 3 births; 8C2 + 8C3 survivals.
    checks++; if (births != 56) failures++;
    checks++; if (survivals != 28 + 56) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
