// acorn_aead: ACORN v2 behind the word-level AEAD interface.
//
// The same chain as the ASCON and MORUS paths: a pre-processor packs the
// 32-bit pdi/sdi words into blocks, the cipher core processes them, and a
// post-processor writes the output segments, with a 4 x 24 bypass FIFO and a
// 32 x AUX_DEPTH auxiliary FIFO that holds decrypted words until the tag has
// been checked. Word formats, status words and pdi/sdi/do timing are those
// of the other paths.
//
// ACORN takes one byte per clock, which is narrower than the 32-bit word, so
// the pre- and post-processor work on 32-bit blocks (BLK = 32) and a small
// width converter sits on each side of the core:
//   - in: a 32-bit block from the pre-processor is held and handed to the
//     core one byte at a time, first byte (bits [31:24]) first; the last
//     byte carries bdi_last. A size-0 block (empty message) is passed on as
//     one size-0 beat. The next block is accepted once the held one is sent.
//   - out: output bytes are gathered into a 32-bit block, first byte at the
//     top, and handed to the post-processor when four bytes are in or when
//     the last message byte has come out (counted from the bytes fed in).
// ACORN numbers key, nonce and tag bytes from the least significant end, so
// their byte order is reversed between the processors and the core; byte n
// on pdi is byte n of ACORN's input. A new operation starts only when the
// core, both converters and the post-processor are idle.
//
// The chain follows the document's AEAD-core structure; the width
// converters, byte-order mapping and auxiliary FIFO depth are this design's
// own choices.
module acorn_aead #(
  parameter int unsigned AUX_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] pdi_data,
  input  logic        pdi_valid,
  output logic        pdi_ready,
  input  logic [31:0] sdi_data,
  input  logic        sdi_valid,
  output logic        sdi_ready,
  output logic [31:0] do_data,
  output logic        do_valid,
  input  logic        do_ready
);

  function automatic logic [127:0] bswap128(input logic [127:0] v);
    for (int i = 0; i < 16; i++) bswap128[8*i +: 8] = v[127-8*i -: 8];
  endfunction

  logic [127:0] key, npub, core_tag;
  logic         start, decrypt, core_busy, tag_valid;
  logic [31:0]  bdi, bdo;
  logic         bdi_valid, bdi_ready, bdi_type, bdi_last;
  logic [2:0]   bdi_size, bdo_size;
  logic         bdo_valid, bdo_ready;
  logic [23:0]  byp_din, byp_dout;
  logic         byp_push, byp_full, byp_pop, byp_empty;
  logic [31:0]  aux_din, aux_dout;
  logic         aux_push, aux_full, aux_pop, aux_empty, aux_flush;
  logic         post_idle, op_ready;

  // byte-wide side of the core
  logic [7:0]   c_bdi, c_bdo;
  logic         c_bdi_valid, c_bdi_ready, c_bdi_last, c_bdo_valid, c_bdo_ready;
  logic [0:0]   c_bdi_size, c_bdo_size;

  // input converter state
  logic [31:0]  ib;
  logic [2:0]   isz;
  logic [1:0]   idx;
  logic         ihold, itype, ilast;
  // output converter state
  logic [31:0]  ob;
  logic [2:0]   ocnt;
  logic         ovalid;
  logic [15:0]  n_in, n_out;       // message bytes fed to / returned by the core
  logic         fed_last;          // last message byte has been fed

  assign op_ready = !core_busy && post_idle && byp_empty && !ihold && !ovalid;

  preprocessor #(.W(32), .BLK(32)) u_pre (
    .clk, .rst_n,
    .pdi_data, .pdi_valid, .pdi_ready,
    .sdi_data, .sdi_valid, .sdi_ready,
    .op_ready,
    .key, .npub, .start, .decrypt,
    .bdi, .bdi_valid, .bdi_ready, .bdi_type, .bdi_last, .bdi_size,
    .byp_data(byp_din), .byp_push, .byp_full
  );

  // ---------------- block -> byte converter -------------------------------
  logic in_end;                    // the beat on c_bdi is the block's last
  assign in_end      = (isz == 3'd0) || ({1'b0, idx} == isz - 3'd1);
  assign bdi_ready   = !ihold;
  assign c_bdi       = ib[31 - 8 * int'(idx) -: 8];
  assign c_bdi_size  = (isz != 3'd0);
  assign c_bdi_last  = ilast && in_end;
  assign c_bdi_valid = ihold;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ib <= '0; isz <= '0; idx <= '0; ihold <= 1'b0; itype <= 1'b0; ilast <= 1'b0;
      n_in <= '0; fed_last <= 1'b0;
    end else begin
      if (start) begin n_in <= '0; fed_last <= 1'b0; end
      if (bdi_valid && bdi_ready) begin
        ib <= bdi; isz <= bdi_size; itype <= bdi_type; ilast <= bdi_last;
        idx <= '0; ihold <= 1'b1;
      end else if (c_bdi_valid && c_bdi_ready) begin
        if (itype && c_bdi_size[0]) n_in <= n_in + 16'd1;
        if (itype && c_bdi_last) fed_last <= 1'b1;
        if (in_end) ihold <= 1'b0;
        else        idx   <= idx + 2'd1;
      end
    end
  end

  acorn_core #(.P(8)) u_acorn (
    .clk, .rst_n, .key(bswap128(key)), .npub(bswap128(npub)), .start, .decrypt,
    .bdi(c_bdi), .bdi_valid(c_bdi_valid), .bdi_ready(c_bdi_ready), .bdi_type(itype),
    .bdi_last(c_bdi_last), .bdi_size(c_bdi_size),
    .bdo(c_bdo), .bdo_valid(c_bdo_valid), .bdo_ready(c_bdo_ready), .bdo_size(c_bdo_size),
    .tag(core_tag), .tag_valid, .busy(core_busy)
  );

  // ---------------- byte -> block converter -------------------------------
  // c_bdo_size is always 1: every output beat carries one byte
  logic out_end;                   // the byte arriving now closes the block
  assign out_end     = (ocnt == 3'd3) || (fed_last && n_out + 16'd1 == n_in) || !c_bdo_size[0];
  assign c_bdo_ready = !ovalid;
  assign bdo         = ob;
  assign bdo_size    = ocnt;
  assign bdo_valid   = ovalid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ob <= '0; ocnt <= '0; ovalid <= 1'b0; n_out <= '0;
    end else begin
      if (start) n_out <= '0;
      if (ovalid) begin
        if (bdo_ready) begin ovalid <= 1'b0; ocnt <= '0; ob <= '0; end
      end else if (c_bdo_valid) begin
        ob[31 - 8 * int'(ocnt[1:0]) -: 8] <= c_bdo;
        ocnt  <= ocnt + 3'd1;
        n_out <= n_out + 16'd1;
        if (out_end) ovalid <= 1'b1;
      end
    end
  end

  fwft_fifo #(.WIDTH(24), .DEPTH(4)) u_bypass_fifo (
    .clk, .rst_n, .flush(1'b0),
    .push(byp_push), .din(byp_din), .full(byp_full),
    .pop(byp_pop), .dout(byp_dout), .empty(byp_empty)
  );

  fwft_fifo #(.WIDTH(32), .DEPTH(AUX_DEPTH)) u_aux_fifo (
    .clk, .rst_n, .flush(aux_flush),
    .push(aux_push), .din(aux_din), .full(aux_full),
    .pop(aux_pop), .dout(aux_dout), .empty(aux_empty)
  );

  postprocessor #(.W(32), .BLK(32)) u_post (
    .clk, .rst_n,
    .bdo, .bdo_valid, .bdo_ready, .bdo_size,
    .tag(bswap128(core_tag)), .tag_valid,
    .byp_data(byp_dout), .byp_empty, .byp_pop,
    .aux_push, .aux_din, .aux_full, .aux_pop, .aux_dout, .aux_empty, .aux_flush,
    .do_data, .do_valid, .do_ready,
    .idle(post_idle)
  );

endmodule
