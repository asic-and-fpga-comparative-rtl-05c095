// caesar_hsm_top: lightweight hardware security module with the CAESAR
// authenticated ciphers that could be built, side by side.
//
// The main path is an AEAD core in the style of the CAESAR hardware API:
//   pdi/sdi words -> preprocessor -> ascon_core -> postprocessor -> do words
// with a 4 x 24 first-word-fall-through bypass FIFO carrying the message
// header and the expected tag from the pre- to the post-processor, and an
// auxiliary FIFO (32 x AUX_DEPTH) holding decrypted words until the tag has
// been checked. The pre-processor only starts an operation when the cipher
// core and post-processor are idle and the bypass FIFO is empty.
//
// MORUS-1280-128 (morus_aead, 256-bit blocks) and ACORN v2 (acorn_aead,
// byte-wide core behind 32-bit blocks) have AEAD cores of the same kind,
// each with its own word ports morus_* and acorn_*. The AES-128 encryption
// engine that the AES-based modes CLOC and SILC are built around has its
// block interface brought out directly.
// All cores run from one clock (10 MHz in the intended low-power setting)
// and one active-low synchronous reset.
module caesar_hsm_top #(
  parameter int unsigned AUX_DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  // AEAD core (ASCON-128 behind the pre/post-processor)
  input  logic [31:0]  pdi_data,
  input  logic         pdi_valid,
  output logic         pdi_ready,
  input  logic [31:0]  sdi_data,
  input  logic         sdi_valid,
  output logic         sdi_ready,
  output logic [31:0]  do_data,
  output logic         do_valid,
  input  logic         do_ready,
  // ACORN v2 AEAD core (same word interface as the ASCON path)
  input  logic [31:0]  acorn_pdi_data,
  input  logic         acorn_pdi_valid,
  output logic         acorn_pdi_ready,
  input  logic [31:0]  acorn_sdi_data,
  input  logic         acorn_sdi_valid,
  output logic         acorn_sdi_ready,
  output logic [31:0]  acorn_do_data,
  output logic         acorn_do_valid,
  input  logic         acorn_do_ready,
  // MORUS-1280-128 AEAD core (same word interface as the ASCON path)
  input  logic [31:0]  morus_pdi_data,
  input  logic         morus_pdi_valid,
  output logic         morus_pdi_ready,
  input  logic [31:0]  morus_sdi_data,
  input  logic         morus_sdi_valid,
  output logic         morus_sdi_ready,
  output logic [31:0]  morus_do_data,
  output logic         morus_do_valid,
  input  logic         morus_do_ready,
  // AES-128 engine (block cipher of CLOC and SILC)
  input  logic         aes_start,
  input  logic [127:0] aes_key,
  input  logic [127:0] aes_pt,
  output logic [127:0] aes_ct,
  output logic         aes_done,
  output logic         aes_busy
);

  // ---------------- AEAD core: pre-processor, ASCON, post-processor -------
  logic [127:0] key, npub, tag;
  logic         start, decrypt, core_busy, tag_valid;
  logic [63:0]  bdi, bdo;
  logic         bdi_valid, bdi_ready, bdi_type, bdi_last;
  logic [3:0]   bdi_size, bdo_size;
  logic         bdo_valid, bdo_ready;
  logic [23:0]  byp_din, byp_dout;
  logic         byp_push, byp_full, byp_pop, byp_empty;
  logic [31:0]  aux_din, aux_dout;
  logic         aux_push, aux_full, aux_pop, aux_empty, aux_flush;
  logic         post_idle, op_ready;

  assign op_ready = !core_busy && post_idle && byp_empty;

  preprocessor #(.W(32), .BLK(64)) u_pre (
    .clk, .rst_n,
    .pdi_data, .pdi_valid, .pdi_ready,
    .sdi_data, .sdi_valid, .sdi_ready,
    .op_ready,
    .key, .npub, .start, .decrypt,
    .bdi, .bdi_valid, .bdi_ready, .bdi_type, .bdi_last, .bdi_size,
    .byp_data(byp_din), .byp_push, .byp_full
  );

  ascon_core u_ascon (
    .clk, .rst_n, .key, .npub, .start, .decrypt,
    .bdi, .bdi_valid, .bdi_ready, .bdi_type, .bdi_last, .bdi_size,
    .bdo, .bdo_valid, .bdo_ready, .bdo_size,
    .tag, .tag_valid, .busy(core_busy)
  );

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

  postprocessor #(.W(32), .BLK(64)) u_post (
    .clk, .rst_n,
    .bdo, .bdo_valid, .bdo_ready, .bdo_size,
    .tag, .tag_valid,
    .byp_data(byp_dout), .byp_empty, .byp_pop,
    .aux_push, .aux_din, .aux_full, .aux_pop, .aux_dout, .aux_empty, .aux_flush,
    .do_data, .do_valid, .do_ready,
    .idle(post_idle)
  );

  // ---------------- independent cipher cores ------------------------------
  acorn_aead #(.AUX_DEPTH(AUX_DEPTH)) u_acorn_aead (
    .clk, .rst_n,
    .pdi_data(acorn_pdi_data), .pdi_valid(acorn_pdi_valid), .pdi_ready(acorn_pdi_ready),
    .sdi_data(acorn_sdi_data), .sdi_valid(acorn_sdi_valid), .sdi_ready(acorn_sdi_ready),
    .do_data(acorn_do_data), .do_valid(acorn_do_valid), .do_ready(acorn_do_ready)
  );

  morus_aead #(.AUX_DEPTH(AUX_DEPTH)) u_morus_aead (
    .clk, .rst_n,
    .pdi_data(morus_pdi_data), .pdi_valid(morus_pdi_valid), .pdi_ready(morus_pdi_ready),
    .sdi_data(morus_sdi_data), .sdi_valid(morus_sdi_valid), .sdi_ready(morus_sdi_ready),
    .do_data(morus_do_data), .do_valid(morus_do_valid), .do_ready(morus_do_ready)
  );

  aes128_enc u_aes (
    .clk, .rst_n, .start(aes_start), .key(aes_key), .pt(aes_pt),
    .ct(aes_ct), .done(aes_done), .busy(aes_busy)
  );

endmodule
