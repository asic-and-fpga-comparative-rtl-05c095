// tb_ascon_core: self-checking test of the ASCON-128 cipher core.
//
// Random keys, nonces, AD and message lengths (0..27 bytes, so empty
// segments, partial and exactly full last blocks all occur) in both
// directions. Output blocks and tags are compared with ascon_ref_pkg, and the
// cycle count from start to tag_valid is compared with the schedule
// 1 + 12 + AD + message + 12 described in the core. Decryption of a freshly
// produced ciphertext must give back the plaintext and the same tag. One
// check uses the published ASCON-128 answer for empty AD and message with
// key = nonce = 00 01 .. 0f.
module tb_ascon_core;
  import ascon_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [127:0] key, npub, tag;
  logic start = 0, decrypt = 0;
  logic [63:0] bdi, bdo;
  logic bdi_valid = 0, bdi_ready, bdi_type = 0, bdi_last = 0;
  logic [3:0] bdi_size = 0, bdo_size;
  logic bdo_valid, bdo_ready, tag_valid, busy;
  int checks = 0, failures = 0;

  ascon_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t got;
  always @(posedge clk) begin
    if (bdo_valid && bdo_ready)
      for (int j = 0; j < int'(bdo_size); j++) got.push_back(bdo[63-8*j -: 8]);
  end

  function automatic int expected_cycles(int nad, int nm);
    int c = 1 + 12;
    if (nad == 0) c += 1;
    else begin
      c += ((nad + 7) / 8) * 7;
      if (nad % 8 == 0) c += 7;
    end
    if (nm > 0) c += ((nm + 7) / 8 - 1) * 7;
    c += (nm > 0 && nm % 8 == 0) ? 8 : 1;
    return c + 12;
  endfunction

  task automatic send(input bytes_t d, input logic typ);
    int nb = (d.size() + 7) / 8;
    if (typ && nb == 0) nb = 1;
    for (int i = 0; i < nb; i++) begin
      int n = d.size() - 8 * i;
      if (n > 8) n = 8;
      @(negedge clk);
      bdi = '0;
      for (int j = 0; j < n; j++) bdi[63-8*j -: 8] = d[8*i+j];
      bdi_size = 4'(n); bdi_type = typ; bdi_last = (i == nb - 1); bdi_valid = 1;
      #1; while (!bdi_ready) begin @(negedge clk); #1; end @(posedge clk); #1 bdi_valid = 0;
    end
  endtask

  task automatic run(input logic [127:0] k, input logic [127:0] n, input bytes_t ad,
                     input bytes_t din, input bit dec, output bytes_t dout,
                     output logic [127:0] t, input bit check_cycles);
    int cyc;
    bytes_t exp_out;
    logic [127:0] exp_tag;
    aead(k, n, ad, din, dec, exp_out, exp_tag);
    got = {};
    @(negedge clk);
    key = k; npub = n; decrypt = dec; start = 1;
    @(posedge clk); #1 start = 0;
    fork
      begin send(ad, 1'b0); send(din, 1'b1); end
      begin cyc = 1; while (!tag_valid) begin @(posedge clk); #1 cyc++; end end
    join
    @(negedge clk);
    checks++;
    if (got != exp_out) begin
      failures++; $display("FAIL data dec=%0d nad=%0d nm=%0d", dec, ad.size(), din.size());
    end
    checks++;
    if (tag !== exp_tag) begin failures++; $display("FAIL tag %h exp %h", tag, exp_tag); end
    if (check_cycles) begin
      checks++;
      if (cyc != expected_cycles(ad.size(), din.size())) begin
        failures++;
        $display("FAIL cycles %0d exp %0d (nad=%0d nm=%0d)", cyc, expected_cycles(ad.size(), din.size()),
                 ad.size(), din.size());
      end
    end
    dout = got;
    t = tag;
  endtask

  initial begin
    bytes_t ad, pt, ct, back;
    logic [127:0] k, n, t1, t2;
    bdo_ready = 1;
    key = '0; npub = '0; bdi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // known answer: empty AD and message
    ad = {}; pt = {};
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h000102030405060708090a0b0c0d0e0f, ad, pt, 0, ct, t1, 1);
    checks++;
    if (t1 !== 128'he355159f292911f794cb1432a0103a8a) begin
      failures++; $display("FAIL known-answer tag %h", t1);
    end
    for (int it = 0; it < 40; it++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      n = {$urandom, $urandom, $urandom, $urandom};
      ad = {}; pt = {};
      repeat ($urandom_range(0, 27)) ad.push_back(8'($urandom));
      repeat ($urandom_range(0, 27)) pt.push_back(8'($urandom));
      if (it == 1) begin ad = {}; repeat (16) pt.push_back(8'($urandom)); end
      if (it == 2) begin ad = {}; repeat (8) ad.push_back(8'($urandom)); end
      run(k, n, ad, pt, 0, ct, t1, 1);
      run(k, n, ad, ct, 1, back, t2, 1);
      checks++;
      if (back != pt || t1 !== t2) begin failures++; $display("FAIL round trip"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
