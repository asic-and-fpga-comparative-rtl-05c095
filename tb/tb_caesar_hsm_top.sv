// tb_caesar_hsm_top: end-to-end test of the whole module at its default
// parameters.
//
// AEAD path: loads a key over sdi, then runs encryptions and decryptions as
// pdi word streams (instruction, nonce, AD, message, tag) and compares the
// do stream word for word with the stream expected from ascon_ref_pkg:
// CT header, ciphertext, TAG header, tag, STATUS_OK for encryption; PT
// header, plaintext, STATUS_OK for an authentic decryption; STATUS_FAIL
// alone when the tag has been altered. do_ready is randomly withheld.
// The MORUS AEAD path gets its own key load and encryptions and authentic
// and forged decryptions through its word ports, checked the same way
// against morus_ref_pkg; so does the ACORN AEAD path, against
// acorn_ref_pkg. The AES-128 engine encrypts one FIPS-197 block.
//
// Each mechanism of the design is counted and must occur at least once:
// key load, encryption, authentic decryption, rejected decryption (plaintext
// discarded from the auxiliary FIFO), empty AD, empty message, partial last
// block, full last block (extra padding block), expected tag carried
// through the bypass FIFO, output back-pressure, MORUS and ACORN AEAD
// operations, and one AES block. For encryptions it also reports the mean
// number of cycles from the message header to the first ciphertext word on
// each path (a measurement only, not a check).
module tb_caesar_hsm_top;
  import aead_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] pdi_data = '0, sdi_data = '0, do_data;
  logic pdi_valid = 0, pdi_ready, sdi_valid = 0, sdi_ready, do_valid, do_ready = 1;
  logic [31:0] acorn_pdi_data = '0, acorn_sdi_data = '0, acorn_do_data;
  logic acorn_pdi_valid = 0, acorn_pdi_ready, acorn_sdi_valid = 0, acorn_sdi_ready;
  logic acorn_do_valid, acorn_do_ready = 1;
  logic [31:0] morus_pdi_data = '0, morus_sdi_data = '0, morus_do_data;
  logic morus_pdi_valid = 0, morus_pdi_ready, morus_sdi_valid = 0, morus_sdi_ready;
  logic morus_do_valid, morus_do_ready = 1;
  logic aes_start = 0, aes_done, aes_busy;
  logic [127:0] aes_key = '0, aes_pt = '0, aes_ct;

  int checks = 0, failures = 0;
  typedef enum int {
    M_KEYLOAD, M_ENC, M_DEC_OK, M_DEC_FAIL, M_EMPTY_AD, M_EMPTY_MSG, M_PARTIAL,
    M_FULL_LAST, M_BYP_TAG, M_BACKPRESSURE, M_ACORN, M_MORUS, M_AES, M_NUM
  } mech_e;
  int mech[M_NUM];

  caesar_hsm_top dut (.*);

  always #5 clk = ~clk;

  // cycle counter for the latency report
  longint cyc_now = 0;
  always @(posedge clk) cyc_now++;
  longint lat_sum[3] = '{0, 0, 0}, lat_n[3] = '{0, 0, 0};

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    for (int p = 0; p < 3; p++)
      if (lat_n[p] != 0)
        $display("%s: %0d encryptions, mean %0d cycles from message header to first ciphertext word",
                 p == 0 ? "ASCON" : p == 1 ? "MORUS" : "ACORN", lat_n[p], lat_sum[p] / lat_n[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.byp_push && !dut.byp_full && dut.byp_din[23:20] == SEG_TAG) mech[M_BYP_TAG]++;
    if (do_valid && !do_ready) mech[M_BACKPRESSURE]++;
    if (dut.aux_flush && !dut.aux_empty) mech[M_DEC_FAIL]++;
  end

  // output collector with random back-pressure
  // path 0 is the ASCON word interface, path 1 the MORUS one, 2 the ACORN one
  logic [31:0] got[$], got_m[$], got_a[$];
  always @(posedge clk) begin
    if (do_valid && do_ready) got.push_back(do_data);
    if (morus_do_valid && morus_do_ready) got_m.push_back(morus_do_data);
    if (acorn_do_valid && acorn_do_ready) got_a.push_back(acorn_do_data);
    acorn_do_ready <= ($urandom_range(0, 3) != 0);
    do_ready <= ($urandom_range(0, 3) != 0);
    morus_do_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic put_pdi(input int p, input logic [31:0] w);
    @(negedge clk);
    if (p == 0) begin
      pdi_data = w; pdi_valid = 1;
      #1; while (!pdi_ready) begin @(negedge clk); #1; end @(posedge clk); #1 pdi_valid = 0;
    end else if (p == 1) begin
      morus_pdi_data = w; morus_pdi_valid = 1;
      #1; while (!morus_pdi_ready) begin @(negedge clk); #1; end @(posedge clk); #1 morus_pdi_valid = 0;
    end else begin
      acorn_pdi_data = w; acorn_pdi_valid = 1;
      #1; while (!acorn_pdi_ready) begin @(negedge clk); #1; end @(posedge clk); #1 acorn_pdi_valid = 0;
    end
  endtask

  task automatic put_sdi(input int p, input logic [31:0] w);
    @(negedge clk);
    if (p == 0) begin
      sdi_data = w; sdi_valid = 1;
      #1; while (!sdi_ready) begin @(negedge clk); #1; end @(posedge clk); #1 sdi_valid = 0;
    end else if (p == 1) begin
      morus_sdi_data = w; morus_sdi_valid = 1;
      #1; while (!morus_sdi_ready) begin @(negedge clk); #1; end @(posedge clk); #1 morus_sdi_valid = 0;
    end else begin
      acorn_sdi_data = w; acorn_sdi_valid = 1;
      #1; while (!acorn_sdi_ready) begin @(negedge clk); #1; end @(posedge clk); #1 acorn_sdi_valid = 0;
    end
  endtask

  function automatic logic [127:0] bswap128(input logic [127:0] v);
    for (int i = 0; i < 16; i++) bswap128[8*i +: 8] = v[127-8*i -: 8];
  endfunction

  function automatic void words_of(input ascon_ref_pkg::bytes_t d, ref logic [31:0] q[$]);
    for (int i = 0; i < d.size(); i += 4) begin
      logic [31:0] w = '0;
      for (int j = 0; j < 4 && i + j < d.size(); j++) w[31-8*j -: 8] = d[i+j];
      q.push_back(w);
    end
  endfunction

  task automatic load_key(input int p, input logic [127:0] k);
    put_sdi(p, {OP_LDKEY, 28'd0});
    put_sdi(p, seg_hdr(SEG_KEY, 16'd16));
    for (int i = 0; i < 4; i++) put_sdi(p, k[127-32*i -: 32]);
    mech[M_KEYLOAD]++;
  endtask

  // one AEAD operation; for decryption 'tamper' flips a tag bit
  // Keys, nonces and tags are given in word order (first byte in [127:120]);
  // the MORUS model numbers bytes from the other end, hence bswap128.
  task automatic aead_op(input int p, input logic [127:0] k, input logic [127:0] n, input ascon_ref_pkg::bytes_t ad,
                         input ascon_ref_pkg::bytes_t din, input bit dec, input logic [127:0] tag_in,
                         input bit tamper, output ascon_ref_pkg::bytes_t dout, output logic [127:0] tag_out);
    logic [31:0] exp[$], q[$];
    logic [127:0] t;
    int guard;
    longint t0, t1;
    morus_ref_pkg::morus_model mm;
    acorn_ref_pkg::acorn_model am;
    if (p == 0) ascon_ref_pkg::aead(k, n, ad, din, dec, dout, tag_out);
    else if (p == 2) begin
      am = new();
      am.aead(bswap128(k), bswap128(n), ad, din, dec, dout, tag_out);
      tag_out = bswap128(tag_out);
    end else begin
      mm = new();
      mm.aead(bswap128(k), bswap128(n), ad, din, dec, dout, tag_out);
      tag_out = bswap128(tag_out);
    end
    exp = {};
    if (!dec) begin
      exp.push_back(seg_hdr(SEG_CT, 16'(din.size())));
      words_of(dout, exp);
      exp.push_back(seg_hdr(SEG_TAG, 16'd16));
      for (int i = 0; i < 4; i++) exp.push_back(tag_out[127-32*i -: 32]);
      exp.push_back(STATUS_OK);
    end else if (!tamper && tag_in == tag_out) begin
      exp.push_back(seg_hdr(SEG_PT, 16'(din.size())));
      words_of(dout, exp);
      exp.push_back(STATUS_OK);
    end else begin
      exp.push_back(STATUS_FAIL);
    end
    got = {}; got_m = {}; got_a = {};
    put_pdi(p, {dec ? OP_DEC : OP_ENC, 28'd0});
    put_pdi(p, seg_hdr(SEG_NPUB, 16'd16));
    for (int i = 0; i < 4; i++) put_pdi(p, n[127-32*i -: 32]);
    if (ad.size() > 0 || $urandom_range(0, 1) == 1) begin
      put_pdi(p, seg_hdr(SEG_AD, 16'(ad.size())));
      q = {}; words_of(ad, q);
      foreach (q[i]) put_pdi(p, q[i]);
    end
    put_pdi(p, seg_hdr(dec ? SEG_CT : SEG_PT, 16'(din.size())));
    // latency: from the message header to the first ciphertext word on do
    t0 = cyc_now; t1 = 0;
    if (!dec && din.size() > 0)
      fork
        begin
          while ((p == 0 ? got.size() : p == 1 ? got_m.size() : got_a.size()) < 2) @(posedge clk);
          t1 = cyc_now;
        end
      join_none
    q = {}; words_of(din, q);
    foreach (q[i]) put_pdi(p, q[i]);
    if (dec) begin
      t = tag_in ^ (tamper ? 128'(1) << $urandom_range(0, 127) : 128'd0);
      put_pdi(p, seg_hdr(SEG_TAG, 16'd16));
      for (int i = 0; i < 4; i++) put_pdi(p, t[127-32*i -: 32]);
    end
    guard = 0;
    while ((p == 0 ? got.size() : p == 1 ? got_m.size() : got_a.size()) < exp.size() && guard < 5000) begin
      @(posedge clk); guard++;
    end
    repeat (5) @(posedge clk);
    if (p == 1) got = got_m;
    if (p == 2) got = got_a;
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL aead path=%0d dec=%0d tamper=%0d nad=%0d nm=%0d got %0d words exp %0d", p, dec, tamper,
               ad.size(), din.size(), got.size(), exp.size());
      foreach (exp[i]) if (i < got.size() && got[i] !== exp[i]) $display("  word %0d got %h exp %h", i, got[i], exp[i]);
    end
    if (t1 != 0) begin lat_sum[p] += t1 - t0; lat_n[p]++; end
    if (p == 1) begin mech[M_MORUS]++; return; end
    if (p == 2) begin mech[M_ACORN]++; return; end
    if (!dec) mech[M_ENC]++;
    else if (!tamper) mech[M_DEC_OK]++;
    if (ad.size() == 0) mech[M_EMPTY_AD]++;
    if (din.size() == 0) mech[M_EMPTY_MSG]++;
    else if (din.size() % 8 == 0) mech[M_FULL_LAST]++;
    else mech[M_PARTIAL]++;
  endtask

  // ACORN AEAD path: encryptions and authentic / forged decryptions with
  // lengths that end on and off the 4-byte block
  task automatic acorn_test();
    ascon_ref_pkg::bytes_t ad, pt, ct, back;
    logic [127:0] k, n, t, t2;
    k = {$urandom, $urandom, $urandom, $urandom};
    load_key(2, k);
    for (int it = 0; it < 6; it++) begin
      n = {$urandom, $urandom, $urandom, $urandom};
      ad = {}; pt = {};
      repeat ((it % 3) * 5) ad.push_back(8'($urandom));
      repeat ((it == 0) ? 0 : (it == 1) ? 16 : $urandom_range(1, 23)) pt.push_back(8'($urandom));
      aead_op(2, k, n, ad, pt, 0, '0, 0, ct, t);
      aead_op(2, k, n, ad, ct, 1, t, (it % 2 == 1), back, t2);
      checks++;
      if (back != pt || t2 !== t) begin failures++; $display("FAIL acorn model round trip"); end
    end
  endtask

  // MORUS AEAD path: encryptions and authentic / forged decryptions with
  // lengths around the 32-byte block
  task automatic morus_test();
    ascon_ref_pkg::bytes_t ad, pt, ct, back;
    logic [127:0] k, n, t, t2;
    k = {$urandom, $urandom, $urandom, $urandom};
    load_key(1, k);
    for (int it = 0; it < 6; it++) begin
      n = {$urandom, $urandom, $urandom, $urandom};
      ad = {}; pt = {};
      repeat ((it % 3) * 20) ad.push_back(8'($urandom));
      repeat ((it == 0) ? 0 : (it == 1) ? 64 : $urandom_range(1, 100)) pt.push_back(8'($urandom));
      aead_op(1, k, n, ad, pt, 0, '0, 0, ct, t);
      aead_op(1, k, n, ad, ct, 1, t, (it % 2 == 1), back, t2);
      checks++;
      if (back != pt || t2 !== t) begin failures++; $display("FAIL morus model round trip"); end
    end
  endtask

  task automatic aes_test();
    aes_key = 128'h000102030405060708090a0b0c0d0e0f;
    aes_pt  = 128'h00112233445566778899aabbccddeeff;
    @(negedge clk) aes_start = 1; @(negedge clk) aes_start = 0;
    while (!aes_done) @(negedge clk);
    checks++;
    if (aes_ct !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL aes"); end
    else mech[M_AES]++;
  endtask

  initial begin
    ascon_ref_pkg::bytes_t ad, pt, ct, back;
    logic [127:0] k, n, t, t2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    k = {$urandom, $urandom, $urandom, $urandom};
    load_key(0, k);
    for (int it = 0; it < 24; it++) begin
      n = {$urandom, $urandom, $urandom, $urandom};
      ad = {}; pt = {};
      if (it % 4 != 0) repeat ($urandom_range(0, 30)) ad.push_back(8'($urandom));
      case (it % 6)
        1: ;                                                     // empty message
        2: repeat (8 * $urandom_range(1, 4)) pt.push_back(8'($urandom));  // full last block
        default: repeat ($urandom_range(1, 60)) pt.push_back(8'($urandom));
      endcase
      if (it == 12) begin k = {$urandom, $urandom, $urandom, $urandom}; load_key(0, k); end
      aead_op(0, k, n, ad, pt, 0, '0, 0, ct, t);
      aead_op(0, k, n, ad, ct, 1, t, (it % 3 == 2), back, t2);
      checks++;
      if (back != pt || t2 !== t) begin failures++; $display("FAIL model round trip"); end
    end
    acorn_test();
    morus_test();
    aes_test();
    for (int i = 0; i < M_NUM; i++) begin
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(i)); end
      else $display("mechanism %-16s %0d", mech_e'(i), mech[i]);
    end
    for (int p = 0; p < 3; p++)
      if (lat_n[p] != 0)
        $display("%s: %0d encryptions, mean %0d cycles from message header to first ciphertext word",
                 p == 0 ? "ASCON" : p == 1 ? "MORUS" : "ACORN", lat_n[p], lat_sum[p] / lat_n[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
