// aead_pkg: constants and types shared by the AEAD wrapper (pre-processor,
// post-processor) and the cipher cores.
//
// The wrapper follows the structure of the CAESAR hardware API: a
// pre-processor that turns a 32-bit word stream into cipher blocks, a cipher
// core, and a post-processor that turns blocks back into words. The
// instruction and segment-header codes below are this design's own GMU-style
// choice: the opcode or segment type sits in bits [31:28] of a word and a
// segment length in bytes sits in bits [15:0].
package aead_pkg;

  // Instruction opcodes (bits [31:28] of an instruction word)
  typedef enum logic [3:0] {
    OP_ENC    = 4'h2,
    OP_DEC    = 4'h3,
    OP_LDKEY  = 4'h4
  } opcode_e;

  // Segment types (bits [31:28] of a segment header)
  typedef enum logic [3:0] {
    SEG_AD    = 4'h1,
    SEG_PT    = 4'h4,
    SEG_CT    = 4'h5,
    SEG_TAG   = 4'h8,
    SEG_KEY   = 4'hC,
    SEG_NPUB  = 4'hD
  } seg_e;

  // Status words emitted by the post-processor at the end of an operation
  typedef enum logic [31:0] {
    STATUS_OK   = 32'hE000_0000,
    STATUS_FAIL = 32'hF000_0000
  } status_e;

  // Bypass FIFO entry: {type, flags, length or tag half-word}
  typedef struct packed {
    logic [3:0]  kind;
    logic [3:0]  flags;   // bit 0: decrypt
    logic [15:0] value;
  } byp_t;

  // Segment header word
  function automatic logic [31:0] seg_hdr(input logic [3:0] kind, input logic [15:0] len);
    return {kind, 12'h000, len};
  endfunction

  // Byte mask over a W-bit big-endian word/block: the first n bytes kept
  function automatic logic [63:0] keep_bytes64(input logic [3:0] n);
    logic [63:0] m;
    for (int i = 0; i < 8; i++) m[63-8*i -: 8] = (i < int'(n)) ? 8'hFF : 8'h00;
    return m;
  endfunction

endpackage
