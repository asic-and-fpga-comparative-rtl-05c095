// morus_aead: MORUS-1280-128 behind the word-level AEAD interface.
//
// The same structure as the ASCON path of the top: a pre-processor packs
// 32-bit pdi/sdi words into 256-bit blocks, the MORUS cipher core encrypts
// or decrypts them, and a post-processor turns the output blocks back into
// words, with a 4 x 24 bypass FIFO (message header, expected tag) and an
// auxiliary FIFO (32 x AUX_DEPTH) that holds decrypted words until the tag
// has been checked. Instruction and segment formats, status words and the
// valid/ready timing of pdi, sdi and do are those of the ASCON path.
//
// The word interface puts the first byte of a segment in the most
// significant position, while MORUS numbers its bytes from the least
// significant end of a block. The byte order of the key, the nonce, the data
// blocks and the tag is therefore reversed between the two halves, so that
// byte n of a segment on pdi is byte n of the MORUS block. The core runs one
// StateUpdate per clock, so it needs at most one 256-bit block every clock
// while the pre-processor needs eight words to fill one: the word interface,
// not the cipher, sets the throughput of this path.
//
// The wrapper follows the document's AEAD-core structure (pre-processor,
// cipher core, post-processor, bypass and auxiliary FIFOs); the byte-order
// mapping and the auxiliary FIFO depth are this design's own choices.
module morus_aead #(
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

  // reverse the byte order of an N-bit vector
  function automatic logic [255:0] bswap256(input logic [255:0] v);
    for (int i = 0; i < 32; i++) bswap256[8*i +: 8] = v[255-8*i -: 8];
  endfunction
  function automatic logic [127:0] bswap128(input logic [127:0] v);
    for (int i = 0; i < 16; i++) bswap128[8*i +: 8] = v[127-8*i -: 8];
  endfunction

  logic [127:0] key, npub, core_tag;
  logic         start, decrypt, core_busy, tag_valid;
  logic [255:0] bdi, bdo;
  logic         bdi_valid, bdi_ready, bdi_type, bdi_last;
  logic [5:0]   bdi_size, bdo_size;
  logic         bdo_valid, bdo_ready;
  logic [23:0]  byp_din, byp_dout;
  logic         byp_push, byp_full, byp_pop, byp_empty;
  logic [31:0]  aux_din, aux_dout;
  logic         aux_push, aux_full, aux_pop, aux_empty, aux_flush;
  logic         post_idle, op_ready;

  assign op_ready = !core_busy && post_idle && byp_empty;

  preprocessor #(.W(32), .BLK(256)) u_pre (
    .clk, .rst_n,
    .pdi_data, .pdi_valid, .pdi_ready,
    .sdi_data, .sdi_valid, .sdi_ready,
    .op_ready,
    .key, .npub, .start, .decrypt,
    .bdi, .bdi_valid, .bdi_ready, .bdi_type, .bdi_last, .bdi_size,
    .byp_data(byp_din), .byp_push, .byp_full
  );

  logic [255:0] core_bdo;
  morus_core u_morus (
    .clk, .rst_n, .key(bswap128(key)), .npub(bswap128(npub)), .start, .decrypt,
    .bdi(bswap256(bdi)), .bdi_valid, .bdi_ready, .bdi_type, .bdi_last, .bdi_size,
    .bdo(core_bdo), .bdo_valid, .bdo_ready, .bdo_size,
    .tag(core_tag), .tag_valid, .busy(core_busy)
  );
  assign bdo = bswap256(core_bdo);

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

  postprocessor #(.W(32), .BLK(256)) u_post (
    .clk, .rst_n,
    .bdo, .bdo_valid, .bdo_ready, .bdo_size,
    .tag(bswap128(core_tag)), .tag_valid,
    .byp_data(byp_dout), .byp_empty, .byp_pop,
    .aux_push, .aux_din, .aux_full, .aux_pop, .aux_dout, .aux_empty, .aux_flush,
    .do_data, .do_valid, .do_ready,
    .idle(post_idle)
  );

endmodule
