// tb_acorn_core: self-checking test of the ACORN v2 cipher core.
//
// Random keys, IVs, AD and message lengths (0..40 bytes) in both directions,
// compared byte by byte and on the tag with the bit-serial model of
// acorn_ref_pkg. The cycle count from start to tag_valid must match the
// eight-steps-per-clock schedule: 1 + 224 + AD + 32 + message + 32 + 96,
// where an empty AD or message still costs one cycle. Decrypting a produced
// ciphertext must return the plaintext with the same tag.
module tb_acorn_core;
  import acorn_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [127:0] key, npub, tag;
  logic start = 0, decrypt = 0;
  logic [7:0] bdi, bdo;
  logic bdi_valid = 0, bdi_ready, bdi_type = 0, bdi_last = 0;
  logic [0:0] bdi_size = 0, bdo_size;
  logic bdo_valid, bdo_ready, tag_valid, busy;
  int checks = 0, failures = 0;

  acorn_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t got;
  always @(posedge clk) if (bdo_valid && bdo_ready) got.push_back(bdo);

  task automatic send(input bytes_t d, input logic typ);
    int nb = d.size();
    if (typ && nb == 0) nb = 1;
    for (int i = 0; i < nb; i++) begin
      @(negedge clk);
      bdi = (i < d.size()) ? d[i] : 8'h00;
      bdi_size = (i < d.size()); bdi_type = typ; bdi_last = (i == nb - 1); bdi_valid = 1;
      #1; while (!bdi_ready) begin @(negedge clk); #1; end @(posedge clk); #1 bdi_valid = 0;
    end
  endtask

  task automatic run(input logic [127:0] k, input logic [127:0] n, input bytes_t ad,
                     input bytes_t din, input bit dec, output bytes_t dout, output logic [127:0] t);
    int cyc, expc;
    bytes_t exp_out;
    logic [127:0] exp_tag;
    acorn_model mdl = new();
    mdl.aead(k, n, ad, din, dec, exp_out, exp_tag);
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
    if (got != exp_out) begin failures++; $display("FAIL data dec=%0d nad=%0d nm=%0d", dec, ad.size(), din.size()); end
    checks++;
    if (tag !== exp_tag) begin failures++; $display("FAIL tag %h exp %h", tag, exp_tag); end
    expc = 1 + 224 + (ad.size() == 0 ? 1 : ad.size()) + 32 + (din.size() == 0 ? 1 : din.size()) + 32 + 96;
    checks++;
    if (cyc != expc) begin failures++; $display("FAIL cycles %0d exp %0d", cyc, expc); end
    dout = got; t = tag;
  endtask

  initial begin
    bytes_t ad, pt, ct, back;
    logic [127:0] k, n, t1, t2;
    bdo_ready = 1; key = '0; npub = '0; bdi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 12; it++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      n = {$urandom, $urandom, $urandom, $urandom};
      ad = {}; pt = {};
      if (it != 0) repeat ($urandom_range(0, 40)) ad.push_back(8'($urandom));
      if (it != 1) repeat ($urandom_range(0, 40)) pt.push_back(8'($urandom));
      run(k, n, ad, pt, 0, ct, t1);
      run(k, n, ad, ct, 1, back, t2);
      checks++;
      if (back != pt || t1 !== t2) begin failures++; $display("FAIL round trip"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
