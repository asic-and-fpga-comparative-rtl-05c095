// tb_preprocessor: checks the input stage on its own.
//
// The testbench plays the cipher core (bdi_ready withheld at random) and
// the bypass FIFO (byp_full raised at random). For random key loads and
// encryption / decryption word streams it checks: the key and nonce present
// at each start pulse; every block handed on bdi (data with unused bytes
// cleared, size, type, last), including the size-0 block of an empty
// message and no block for an empty AD; and every bypass FIFO entry (the
// message header with the decrypt flag, then for decryption the eight tag
// halves). start must wait for op_ready.
module tb_preprocessor;
  import aead_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] pdi_data = '0, sdi_data = '0;
  logic pdi_valid = 0, pdi_ready, sdi_valid = 0, sdi_ready, op_ready = 1;
  logic [127:0] key, npub;
  logic start, decrypt;
  logic [63:0] bdi;
  logic bdi_valid, bdi_ready = 0, bdi_type, bdi_last;
  logic [3:0] bdi_size;
  logic [23:0] byp_data;
  logic byp_push, byp_full = 0;
  int checks = 0, failures = 0, starts = 0, early = 0;

  typedef struct { logic [63:0] d; logic [3:0] size; logic typ; logic last; } blk_t;
  blk_t exp_blk[$];
  logic [23:0] exp_byp[$];
  logic [127:0] cur_key, cur_npub;

  preprocessor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    bdi_ready <= ($urandom_range(0, 2) != 0);
    byp_full  <= ($urandom_range(0, 2) == 0);
    op_ready  <= ($urandom_range(0, 3) != 0);
  end

  blk_t e;
  always @(posedge clk) if (rst_n) begin
    if (start) begin
      starts++;
      checks++;
      if (key !== cur_key || npub !== cur_npub) begin failures++; $display("FAIL key/npub at start"); end
    end
    if (dut.st == dut.S_START && !op_ready && dut.start) early++;
    if (bdi_valid && bdi_ready) begin
      checks++;
      if (exp_blk.size() == 0) begin failures++; $display("FAIL unexpected block"); end
      else begin
        e = exp_blk.pop_front();
        if (bdi !== e.d || bdi_size !== e.size || bdi_type !== e.typ || bdi_last !== e.last) begin
          failures++;
          $display("FAIL block %h s%0d t%0d l%0d exp %h s%0d t%0d l%0d", bdi, bdi_size, bdi_type, bdi_last,
                   e.d, e.size, e.typ, e.last);
        end
      end
    end
    if (byp_push && !byp_full) begin
      checks++;
      if (exp_byp.size() == 0 || byp_data !== exp_byp[0]) begin
        failures++; $display("FAIL bypass %h", byp_data);
      end
      if (exp_byp.size() > 0) void'(exp_byp.pop_front());
    end
  end

  task automatic put(input bit secret, input logic [31:0] w);
    @(negedge clk);
    if (secret) begin sdi_data = w; sdi_valid = 1; end
    else begin pdi_data = w; pdi_valid = 1; end
    #1;
    while (!(secret ? sdi_ready : pdi_ready)) begin @(negedge clk); #1; end
    @(posedge clk); #1 sdi_valid = 0; pdi_valid = 0;
  endtask

  // expected blocks of a segment of n random bytes; returns the words to send
  task automatic segment(input int n, input bit typ, ref logic [31:0] words[$]);
    logic [7:0] b[$];
    repeat (n) b.push_back(8'($urandom));
    words = {};
    for (int i = 0; i < n; i += 4) begin
      logic [31:0] w = 32'($urandom);    // bytes past the end are junk
      for (int j = 0; j < 4 && i + j < n; j++) w[31-8*j -: 8] = b[i+j];
      words.push_back(w);
    end
    if (n == 0 && typ) exp_blk.push_back('{64'd0, 4'd0, 1'b1, 1'b1});
    for (int i = 0; i < n; i += 8) begin
      blk_t e;
      e.d = '0;
      for (int j = 0; j < 8 && i + j < n; j++) e.d[63-8*j -: 8] = b[i+j];
      e.size = 4'((n - i >= 8) ? 8 : n - i); e.typ = typ; e.last = (i + 8 >= n);
      exp_blk.push_back(e);
    end
  endtask

  initial begin
    logic [31:0] words[$];
    bit dec;
    int nad, nm;
    logic [127:0] t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 30; it++) begin
      dec = it[0];
      nad = (it % 5 == 0) ? 0 : $urandom_range(1, 30);
      nm  = (it % 7 == 3) ? 0 : $urandom_range(1, 40);
      t   = {$urandom, $urandom, $urandom, $urandom};
      if (it % 10 == 0) begin
        cur_key = {$urandom, $urandom, $urandom, $urandom};
        put(1, {OP_LDKEY, 28'd0});
        put(1, seg_hdr(SEG_KEY, 16'd16));
        for (int i = 0; i < 4; i++) put(1, cur_key[127-32*i -: 32]);
      end
      cur_npub = {$urandom, $urandom, $urandom, $urandom};
      put(0, {dec ? OP_DEC : OP_ENC, 28'd0});
      put(0, seg_hdr(SEG_NPUB, 16'd16));
      for (int i = 0; i < 4; i++) put(0, cur_npub[127-32*i -: 32]);
      put(0, seg_hdr(SEG_AD, 16'(nad)));
      segment(nad, 1'b0, words);
      foreach (words[i]) put(0, words[i]);
      exp_byp.push_back({dec ? SEG_CT : SEG_PT, 3'b000, dec, 16'(nm)});
      put(0, seg_hdr(dec ? SEG_CT : SEG_PT, 16'(nm)));
      segment(nm, 1'b1, words);
      foreach (words[i]) put(0, words[i]);
      if (dec) begin
        put(0, seg_hdr(SEG_TAG, 16'd16));
        for (int i = 0; i < 8; i++) exp_byp.push_back({SEG_TAG, 4'h0, t[127-16*i -: 16]});
        for (int i = 0; i < 4; i++) put(0, t[127-32*i -: 32]);
      end
      // wait for everything to drain
      for (int g = 0; g < 200 && (exp_blk.size() > 0 || exp_byp.size() > 0 || dut.st != dut.S_IDLE); g++)
        @(negedge clk);
    end
    checks++;
    if (exp_blk.size() != 0 || exp_byp.size() != 0 || starts != 30 || early != 0) begin
      failures++; $display("FAIL leftover blocks=%0d byp=%0d starts=%0d", exp_blk.size(), exp_byp.size(), starts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
