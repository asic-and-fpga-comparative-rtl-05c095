// tb_aes128_enc: checks the AES-128 engine against the FIPS-197 known-answer
// vectors (Appendix B and Appendix C.1) and the latency (one load cycle plus ten rounds = 11 cycles), then runs
// back-to-back blocks to check that a new start after done works. It then
// encrypts 40 random key/plaintext pairs and compares each result, and its
// latency, with the byte-level model of aes_ref_pkg.
module tb_aes128_enc;
  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] key, pt, ct;
  logic done, busy;
  int checks = 0, failures = 0;

  aes128_enc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (ct !== exp) begin failures++; $display("FAIL ct=%h exp=%h", ct, exp); end
    checks++;
    if (cyc != 11) begin failures++; $display("FAIL latency %0d cycles, expected 11", cyc); end
  endtask

  initial begin
    key = '0; pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    // the model itself must reproduce the Appendix C.1 vector
    checks++;
    if (aes_ref_pkg::encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL reference model"); end
    for (int i = 0; i < 40; i++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, aes_ref_pkg::encrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
