// preprocessor: input stage of the AEAD core.
//
// It reads two 32-bit valid/ready word streams: sdi carries the secret key,
// pdi the public data. It parses instruction words and segment headers,
// loads the key and the nonce, issues start to the cipher core, packs data
// words into BLK-bit blocks (serial-in, parallel-out), clears the bytes of a
// partial last word and block, and keeps count of the bytes left in the
// segment. The algorithm's own padding bit is added by the cipher core.
//
// Formats (this design's GMU-style choice): an instruction or header has its
// opcode / segment type in [31:28] and a length in bytes in [15:0]; the
// first byte of a segment is bits [31:24] of its first word.
//   sdi: LDKEY instruction, KEY header (16), 4 key words.
//   pdi: ENC or DEC instruction, NPUB header (16), 4 nonce words,
//        optional AD header + words, PT (ENC) or CT (DEC) header + words,
//        and for DEC a TAG header (16) + 4 words.
// An empty AD segment sends no block. An empty message sends one block of
// size 0 with bdi_last, so the core always sees the end of the message.
//
// Through the 24-bit bypass FIFO it sends the post-processor what that needs
// and cannot get from the cipher core: the message header {type, flags
// (bit 0 = decrypt), length}, and for decryption the expected tag as eight
// 16-bit halves, most significant first. The FIFO is only 4 deep, so the
// tag transfer stalls until the post-processor pops; the message itself has
// already been handed to the core by then.
//
// start is issued only when op_ready is high (core and post-processor idle
// and the bypass FIFO empty), so a new operation never overtakes the output
// of the previous one.
module preprocessor #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 64,
  localparam int unsigned SW = $clog2(BLK / 8 + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [W-1:0]   pdi_data,
  input  logic           pdi_valid,
  output logic           pdi_ready,
  input  logic [W-1:0]   sdi_data,
  input  logic           sdi_valid,
  output logic           sdi_ready,
  input  logic           op_ready,
  output logic [127:0]   key,
  output logic [127:0]   npub,
  output logic           start,
  output logic           decrypt,
  output logic [BLK-1:0] bdi,
  output logic           bdi_valid,
  input  logic           bdi_ready,
  output logic           bdi_type,
  output logic           bdi_last,
  output logic [SW-1:0]  bdi_size,
  output logic [23:0]    byp_data,
  output logic           byp_push,
  input  logic           byp_full
);
  import aead_pkg::*;

  localparam int unsigned WPB = BLK / W;       // words per block

  typedef enum logic [3:0] {
    S_IDLE, S_KEY_HDR, S_KEY_DATA, S_NPUB_HDR, S_NPUB_DATA, S_START, S_SEG_HDR,
    S_MSG_BYP, S_DATA, S_SEND, S_TAG_HDR, S_TAG_DATA, S_TAG_LO
  } state_e;

  state_e            st;
  logic [1:0]        wcnt4;          // word counter for 128-bit fields
  logic [$clog2(WPB+1)-1:0] wcnt;    // words in the block being built
  logic [15:0]       remaining;      // bytes left in the segment
  logic [15:0]       seg_len;
  logic              is_msg;
  logic [15:0]       tag_lo;
  logic [3:0]        hdr_kind_q;     // type of the current segment

  logic [3:0]  hdr_kind;
  logic [15:0] hdr_len;
  assign hdr_kind = pdi_data[31:28];
  assign hdr_len  = pdi_data[15:0];

  // bytes of the current word that belong to the segment, and their mask
  logic [2:0]   take;
  logic [W-1:0] wmask;
  always_comb begin
    take  = (remaining >= 16'd4) ? 3'd4 : 3'(remaining);
    wmask = ~({W{1'b1}} >> (8 * take));
  end

  always_comb begin
    pdi_ready = 1'b0;
    sdi_ready = 1'b0;
    byp_push  = 1'b0;
    byp_data  = '0;
    case (st)
      S_IDLE:      begin sdi_ready = sdi_valid; pdi_ready = !sdi_valid && pdi_valid; end
      S_KEY_HDR, S_KEY_DATA: sdi_ready = 1'b1;
      S_NPUB_HDR, S_NPUB_DATA, S_TAG_HDR: pdi_ready = 1'b1;
      S_SEG_HDR:   pdi_ready = 1'b1;
      S_MSG_BYP: begin
        byp_push = !byp_full;
        byp_data = {hdr_kind_q, 3'b000, decrypt, seg_len};
      end
      S_DATA:      pdi_ready = 1'b1;
      S_TAG_DATA: begin
        pdi_ready = !byp_full;
        byp_push  = pdi_valid && !byp_full;
        byp_data  = {SEG_TAG, 4'h0, pdi_data[31:16]};
      end
      S_TAG_LO: begin
        byp_push = !byp_full;
        byp_data = {SEG_TAG, 4'h0, tag_lo};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      key        <= '0;
      npub       <= '0;
      start      <= 1'b0;
      decrypt    <= 1'b0;
      bdi        <= '0;
      bdi_valid  <= 1'b0;
      bdi_type   <= 1'b0;
      bdi_last   <= 1'b0;
      bdi_size   <= '0;
      wcnt4      <= '0;
      wcnt       <= '0;
      remaining  <= '0;
      seg_len    <= '0;
      is_msg     <= 1'b0;
      tag_lo     <= '0;
      hdr_kind_q <= '0;
    end else begin
      start <= 1'b0;
      case (st)
        S_IDLE: begin
          if (sdi_valid) begin
            if (sdi_data[31:28] == OP_LDKEY) st <= S_KEY_HDR;
          end else if (pdi_valid) begin
            if (pdi_data[31:28] == OP_ENC || pdi_data[31:28] == OP_DEC) begin
              decrypt <= (pdi_data[31:28] == OP_DEC);
              st      <= S_NPUB_HDR;
            end
          end
        end
        S_KEY_HDR: if (sdi_valid) begin wcnt4 <= '0; st <= S_KEY_DATA; end
        S_KEY_DATA: if (sdi_valid) begin
          key   <= {key[95:0], sdi_data};
          wcnt4 <= wcnt4 + 1'b1;
          if (wcnt4 == 2'd3) st <= S_IDLE;
        end
        S_NPUB_HDR: if (pdi_valid) begin wcnt4 <= '0; st <= S_NPUB_DATA; end
        S_NPUB_DATA: if (pdi_valid) begin
          npub  <= {npub[95:0], pdi_data};
          wcnt4 <= wcnt4 + 1'b1;
          if (wcnt4 == 2'd3) st <= S_START;
        end
        S_START: if (op_ready) begin
          start <= 1'b1;
          st    <= S_SEG_HDR;
        end
        S_SEG_HDR: if (pdi_valid) begin
          remaining  <= hdr_len;
          seg_len    <= hdr_len;
          hdr_kind_q <= hdr_kind;
          wcnt       <= '0;
          bdi        <= '0;
          if (hdr_kind == SEG_AD) begin
            is_msg <= 1'b0;
            st     <= (hdr_len == 16'd0) ? S_SEG_HDR : S_DATA;
          end else begin
            is_msg <= 1'b1;
            st     <= S_MSG_BYP;
          end
        end
        S_MSG_BYP: if (!byp_full) begin
          if (seg_len == 16'd0) begin
            // empty message: one block of size 0
            bdi_size  <= '0;
            bdi_type  <= 1'b1;
            bdi_last  <= 1'b1;
            bdi_valid <= 1'b1;
            st        <= S_SEND;
          end else begin
            st <= S_DATA;
          end
        end
        S_DATA: if (pdi_valid) begin
          bdi[BLK-1-W*int'(wcnt) -: W] <= pdi_data & wmask;
          remaining <= remaining - 16'(take);
          wcnt      <= wcnt + 1'b1;
          if (wcnt == ($clog2(WPB+1))'(WPB - 1) || remaining <= 16'd4) begin
            bdi_size  <= SW'(W / 8 * int'(wcnt)) + SW'(take);
            bdi_type  <= is_msg;
            bdi_last  <= (remaining <= 16'd4);
            bdi_valid <= 1'b1;
            st        <= S_SEND;
          end
        end
        S_SEND: if (bdi_ready) begin
          bdi_valid <= 1'b0;
          bdi       <= '0;
          wcnt      <= '0;
          if (!bdi_last)    st <= S_DATA;
          else if (!is_msg) st <= S_SEG_HDR;
          else if (decrypt) st <= S_TAG_HDR;
          else              st <= S_IDLE;
        end
        S_TAG_HDR: if (pdi_valid) begin wcnt4 <= '0; st <= S_TAG_DATA; end
        S_TAG_DATA: if (pdi_valid && !byp_full) begin
          tag_lo <= pdi_data[15:0];
          st     <= S_TAG_LO;
        end
        S_TAG_LO: if (!byp_full) begin
          wcnt4 <= wcnt4 + 1'b1;
          st    <= (wcnt4 == 2'd3) ? S_IDLE : S_TAG_DATA;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Block handshake rule: a block offered to the core stays until it is taken.
  a_bdi_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bdi_valid && !bdi_ready |=> bdi_valid && $stable(bdi) && $stable(bdi_size));

endmodule
