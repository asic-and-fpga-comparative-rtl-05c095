// tb_postprocessor: checks the output stage on its own.
//
// The testbench plays the cipher core (random output blocks whose bytes past
// the message are junk, then a tag), the bypass FIFO (a queue holding the
// message header and, for decryption, the expected tag halves) and the
// auxiliary FIFO (a queue of 64 words). do_ready is withheld at random.
// For encryption, authentic decryption and decryption with a wrong tag, and
// for empty and partial messages, the do stream must equal the expected
// segments word for word: junk bytes cleared, plaintext released only after
// a tag match, and the auxiliary FIFO emptied after a mismatch.
module tb_postprocessor;
  import aead_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [63:0] bdo = '0;
  logic bdo_valid = 0, bdo_ready;
  logic [3:0] bdo_size = '0;
  logic [127:0] tag = '0;
  logic tag_valid = 0;
  logic [23:0] byp_data;
  logic byp_empty, byp_pop;
  logic aux_push, aux_full, aux_pop, aux_empty, aux_flush;
  logic [31:0] aux_din, aux_dout;
  logic [31:0] do_data;
  logic do_valid, do_ready = 1, idle;
  int checks = 0, failures = 0, flushes = 0;

  logic [23:0] byp_q[$];
  logic [31:0] aux_q[$];
  logic [31:0] got[$];

  postprocessor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // queue-backed FIFO outputs, refreshed 1 time unit after each change
  function automatic void refresh();
    byp_empty = (byp_q.size() == 0);
    byp_data  = byp_empty ? 24'd0 : byp_q[0];
    aux_empty = (aux_q.size() == 0);
    aux_full  = (aux_q.size() == 64);
    aux_dout  = aux_empty ? 32'd0 : aux_q[0];
  endfunction
  initial refresh();

  always @(posedge clk) begin
    if (do_valid && do_ready) got.push_back(do_data);
    if (byp_pop && !byp_empty) void'(byp_q.pop_front());
    if (aux_flush) begin aux_q = {}; flushes++; end
    else begin
      if (aux_pop && !aux_empty) void'(aux_q.pop_front());
      if (aux_push && !aux_full) aux_q.push_back(aux_din);
    end
    do_ready <= ($urandom_range(0, 3) != 0);
    #1 refresh();
  end

  task automatic op(input bit dec, input int n, input bit bad_tag);
    logic [7:0] b[$];
    logic [31:0] exp[$], words[$];
    logic [127:0] t = {$urandom, $urandom, $urandom, $urandom};
    logic [127:0] et = bad_tag ? t ^ 128'h1 : t;
    repeat (n) b.push_back(8'($urandom));
    for (int i = 0; i < n; i += 4) begin
      logic [31:0] w = '0;
      for (int j = 0; j < 4 && i + j < n; j++) w[31-8*j -: 8] = b[i+j];
      words.push_back(w);
    end
    if (!dec) begin
      exp.push_back(seg_hdr(SEG_CT, 16'(n)));
      foreach (words[i]) exp.push_back(words[i]);
      exp.push_back(seg_hdr(SEG_TAG, 16'd16));
      for (int i = 0; i < 4; i++) exp.push_back(t[127-32*i -: 32]);
      exp.push_back(STATUS_OK);
    end else if (!bad_tag) begin
      exp.push_back(seg_hdr(SEG_PT, 16'(n)));
      foreach (words[i]) exp.push_back(words[i]);
      exp.push_back(STATUS_OK);
    end else exp.push_back(STATUS_FAIL);
    got = {};
    byp_q.push_back({dec ? SEG_CT : SEG_PT, 3'b000, dec, 16'(n)});
    if (dec) for (int i = 0; i < 8; i++) byp_q.push_back({SEG_TAG, 4'h0, et[127-16*i -: 16]});
    refresh();
    for (int i = 0; i < n; i += 8) begin
      @(negedge clk);
      bdo = {$urandom, $urandom};
      for (int j = 0; j < 8 && i + j < n; j++) bdo[63-8*j -: 8] = b[i+j];
      bdo_size = 4'((n - i >= 8) ? 8 : n - i);
      bdo_valid = 1;
      #1; while (!bdo_ready) begin @(negedge clk); #1; end @(posedge clk); #1 bdo_valid = 0;
    end
    repeat ($urandom_range(0, 5)) @(negedge clk);
    tag = t; tag_valid = 1;
    for (int g = 0; g < 400 && !(idle && got.size() == exp.size()); g++) @(negedge clk);
    tag_valid = 0;
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL dec=%0d n=%0d bad=%0d got %0d words exp %0d", dec, n, bad_tag, got.size(), exp.size());
    end
    checks++;
    if (aux_q.size() != 0) begin failures++; $display("FAIL aux not empty"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++)
      op(it % 3 != 0, (it % 11 == 0) ? 0 : $urandom_range(1, 120), it % 3 == 2);
    checks++;
    if (flushes == 0) begin failures++; $display("FAIL no flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
