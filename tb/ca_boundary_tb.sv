// ca_boundary_tb: random check of the plane-edge substitution.
module ca_boundary_tb;
  localparam int SW = 4;
  int checks = 0, failures = 0;
  logic top, bot;
  logic [SW-1:0] bc_state;
  logic [2:0][SW-1:0] above_in, below_in, above_out, below_out;

  ca_boundary #(.SW(SW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [2:0][SW-1:0] ea, eb;
      top = 1'($urandom); bot = 1'($urandom);
      bc_state = SW'($urandom);
      above_in = 12'($urandom); below_in = 12'($urandom);
      #1;
      for (int c = 0; c < 3; c++) begin
        ea[c] = top ? bc_state : above_in[c];
        eb[c] = bot ? bc_state : below_in[c];
      end
      checks++;
      if (above_out !== ea || below_out !== eb) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
