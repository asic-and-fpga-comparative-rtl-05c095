// tb_ascon_round: compares one round of ascon_round with the table-driven
// reference permutation of ascon_ref_pkg on random states, for the last
// round constant (0x4b) and for the first one (0xf0, checked through the
// identity that 12 reference rounds equal 12 chained DUT rounds).
module tb_ascon_round;
  import ascon_ref_pkg::*;
  logic [319:0] x_in, x_out;
  logic [7:0] rc;
  int checks = 0, failures = 0;

  ascon_round dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w64_t s[5];
    logic [319:0] v;
    for (int it = 0; it < 200; it++) begin
      for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
      x_in = {s[0], s[1], s[2], s[3], s[4]};
      rc = 8'h4b;
      #1;
      perm(s, 1);
      checks++;
      if (x_out !== {s[0], s[1], s[2], s[3], s[4]}) begin failures++; $display("FAIL round"); end
    end
    // full 12-round permutation through the DUT
    for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
    v = {s[0], s[1], s[2], s[3], s[4]};
    for (int r = 0; r < 12; r++) begin
      x_in = v; rc = {4'(15 - r), 4'(r)};
      #1 v = x_out;
    end
    perm(s, 12);
    checks++;
    if (v !== {s[0], s[1], s[2], s[3], s[4]}) begin failures++; $display("FAIL p12"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
