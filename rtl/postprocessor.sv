// postprocessor: output stage of the AEAD core.
//
// It takes the message header from the bypass FIFO, then the cipher core's
// output blocks, and turns each block back into 32-bit words (parallel-in,
// serial-out), clearing the bytes of the last word that do not belong to
// the message. It formats the output stream on do:
//   encryption: CT header, ciphertext words, TAG header (16), 4 tag words,
//               status word STATUS_OK;
//   decryption: the plaintext words go to the auxiliary FIFO first. The
//               expected tag arrives through the bypass FIFO as eight 16-bit
//               halves; when the core's tag is ready the two are compared.
//               On a match: PT header, the words from the auxiliary FIFO and
//               STATUS_OK; on a mismatch the auxiliary FIFO is flushed and
//               only STATUS_FAIL is sent, so unauthenticated plaintext never
//               leaves the core.
// The auxiliary FIFO must hold a whole decrypted message (its depth in
// words times four bytes). do follows valid/ready; do_data is held while
// do_valid is high and do_ready low. idle is high between operations.
module postprocessor #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 64,
  localparam int unsigned SW = $clog2(BLK / 8 + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [BLK-1:0] bdo,
  input  logic           bdo_valid,
  output logic           bdo_ready,
  input  logic [SW-1:0]  bdo_size,
  input  logic [127:0]   tag,
  input  logic           tag_valid,
  input  logic [23:0]    byp_data,
  input  logic           byp_empty,
  output logic           byp_pop,
  output logic           aux_push,
  output logic [W-1:0]   aux_din,
  input  logic           aux_full,
  output logic           aux_pop,
  input  logic [W-1:0]   aux_dout,
  input  logic           aux_empty,
  output logic           aux_flush,
  output logic [W-1:0]   do_data,
  output logic           do_valid,
  input  logic           do_ready,
  output logic           idle
);
  import aead_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_HDR, S_LOAD, S_WORDS, S_GET_TAG, S_WAIT_TAG, S_TAG_HDR, S_TAG_OUT,
    S_PT_HDR, S_AUX_OUT, S_STATUS
  } state_e;

  state_e         st;
  logic           dec;
  logic [15:0]    len, remaining;
  logic [BLK-1:0] blk;
  logic [SW-1:0]  blk_bytes;        // bytes of blk still to send
  logic [127:0]   exp_tag;
  logic [2:0]     tcnt;
  logic           auth_ok;

  byp_t byp;
  assign byp = byp_t'(byp_data);

  // current output word with the bytes past the message cleared
  logic [2:0]   take;
  logic [W-1:0] word;
  always_comb begin
    take = (remaining >= 16'd4) ? 3'd4 : 3'(remaining);
    word = blk[BLK-1 -: W] & ~({W{1'b1}} >> (8 * take));
  end

  always_comb begin
    do_valid  = 1'b0;
    do_data   = '0;
    bdo_ready = 1'b0;
    byp_pop   = 1'b0;
    aux_push  = 1'b0;
    aux_din   = word;
    aux_pop   = 1'b0;
    aux_flush = 1'b0;
    case (st)
      S_IDLE:    byp_pop = !byp_empty;
      S_HDR:     begin do_valid = 1'b1; do_data = seg_hdr(SEG_CT, len); end
      S_LOAD:    bdo_ready = 1'b1;
      S_WORDS: begin
        if (dec) aux_push = !aux_full;
        else begin do_valid = 1'b1; do_data = word; end
      end
      S_GET_TAG: byp_pop = !byp_empty;
      S_WAIT_TAG: aux_flush = tag_valid && dec && (tag != exp_tag || !auth_ok);
      S_TAG_HDR: begin do_valid = 1'b1; do_data = seg_hdr(SEG_TAG, 16'd16); end
      S_TAG_OUT: begin do_valid = 1'b1; do_data = tag[127 - 32 * int'(tcnt[1:0]) -: 32]; end
      S_PT_HDR:  begin do_valid = 1'b1; do_data = seg_hdr(SEG_PT, len); end
      S_AUX_OUT: begin
        do_valid = !aux_empty;
        do_data  = aux_dout;
        aux_pop  = do_ready && !aux_empty;
      end
      S_STATUS:  begin do_valid = 1'b1; do_data = auth_ok ? STATUS_OK : STATUS_FAIL; end
      default: ;
    endcase
  end

  assign idle = (st == S_IDLE);

  logic word_done;
  assign word_done = dec ? !aux_full : do_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      dec       <= 1'b0;
      len       <= '0;
      remaining <= '0;
      blk       <= '0;
      blk_bytes <= '0;
      exp_tag   <= '0;
      tcnt      <= '0;
      auth_ok   <= 1'b0;
    end else begin
      case (st)
        S_IDLE: if (!byp_empty) begin
          dec       <= byp.flags[0];
          len       <= byp.value;
          remaining <= byp.value;
          tcnt      <= '0;
          auth_ok   <= 1'b1;
          if (byp.flags[0]) st <= (byp.value == 16'd0) ? S_GET_TAG : S_LOAD;
          else              st <= S_HDR;
        end
        S_HDR: if (do_ready) st <= (len == 16'd0) ? S_WAIT_TAG : S_LOAD;
        S_LOAD: if (bdo_valid) begin
          blk       <= bdo;
          blk_bytes <= bdo_size;
          st        <= S_WORDS;
        end
        S_WORDS: if (word_done) begin
          blk       <= blk << W;
          remaining <= remaining - 16'(take);
          blk_bytes <= (blk_bytes > SW'(W / 8)) ? blk_bytes - SW'(W / 8) : '0;
          if (remaining <= 16'd4)               st <= dec ? S_GET_TAG : S_WAIT_TAG;
          else if (blk_bytes <= SW'(W / 8))     st <= S_LOAD;
        end
        S_GET_TAG: if (!byp_empty) begin
          exp_tag <= {exp_tag[111:0], byp.value};
          if (byp.kind != SEG_TAG) auth_ok <= 1'b0;   // out-of-order entry
          tcnt    <= tcnt + 1'b1;
          if (tcnt == 3'd7) st <= S_WAIT_TAG;
        end
        S_WAIT_TAG: if (tag_valid) begin
          tcnt <= '0;
          if (!dec)                  st <= S_TAG_HDR;
          else if (tag == exp_tag && auth_ok) st <= S_PT_HDR;
          else begin auth_ok <= 1'b0; st <= S_STATUS; end
        end
        S_TAG_HDR: if (do_ready) st <= S_TAG_OUT;
        S_TAG_OUT: if (do_ready) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 3'd3) st <= S_STATUS;
        end
        S_PT_HDR:  if (do_ready) st <= S_AUX_OUT;
        S_AUX_OUT: if (aux_empty) st <= S_STATUS;
        S_STATUS:  if (do_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // Output handshake rule: a word offered on do stays until it is taken.
  a_do_hold: assert property (@(posedge clk) disable iff (!rst_n)
    do_valid && !do_ready |=> do_valid && $stable(do_data));

endmodule
