// ascon_core: ASCON-128 authenticated encryption / decryption cipher core.
//
// The 320-bit state is driven through the ASCON permutation one round per
// clock (ascon_round): P^a (12 rounds) for initialization and finalization,
// P^b (6 rounds) after each associated-data or message block. The rate is
// 64 bits; blocks arrive on bdi as big-endian 64-bit words (byte 0 in
// [63:56]) with bdi_size valid bytes (0..8).
//
// Operation: pulse start with key, npub and decrypt set. After the 12
// initialization rounds the core takes AD blocks (bdi_type 0, the last one
// with bdi_last) and then message blocks (bdi_type 1). If the first block
// after initialization is a message block there is no AD. The message always
// ends with a block that has bdi_last set; its size may be 0 (empty message
// or only the padding). A last block of 8 bytes is followed inside the core
// by a padding-only block, as ASCON's padding rule requires. Every message
// block with a non-zero size gives one bdo block (ciphertext for encryption,
// plaintext for decryption); bytes beyond bdo_size are not cleared here, the
// post-processor does it. The tag appears on tag with tag_valid after the
// 12 finalization rounds and stays until the next start. Tag comparison for
// decryption is left to the post-processor.
//
// Cycle counts: 12 cycles of initialization, 6 cycles per non-final block,
// 12 cycles of finalization, plus one cycle per accepted block.
// The IV 0x80400c0600000000 (k=128, r=64, a=12, b=6) is ASCON-128's.
module ascon_core #(
  parameter int unsigned A_ROUNDS = 12,
  parameter int unsigned B_ROUNDS = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  logic [127:0] npub,
  input  logic         start,
  input  logic         decrypt,
  input  logic [63:0]  bdi,
  input  logic         bdi_valid,
  output logic         bdi_ready,
  input  logic         bdi_type,
  input  logic         bdi_last,
  input  logic [3:0]   bdi_size,
  output logic [63:0]  bdo,
  output logic         bdo_valid,
  input  logic         bdo_ready,
  output logic [3:0]   bdo_size,
  output logic [127:0] tag,
  output logic         tag_valid,
  output logic         busy
);
  import aead_pkg::*;

  localparam logic [63:0] IV = {8'd128, 8'd64, 8'(A_ROUNDS), 8'(B_ROUNDS), 32'd0};
  localparam logic [63:0] PAD1 = 64'h8000_0000_0000_0000;

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_AD_WAIT, S_AD_PERM, S_AD_PAD, S_AD_PAD_PERM, S_MSG_WAIT,
    S_MSG_PERM, S_MSG_PAD, S_FINAL, S_DONE
  } state_e;

  state_e       st;
  logic [319:0] x;
  logic [127:0] k;
  logic         dec;
  logic [3:0]   rnd;           // rounds done in the current permutation
  logic         last_full;     // last block was full: a padding block follows
  logic         ad_last_q;     // the AD block being permuted was the last one

  // round constant for round rnd of a permutation with n rounds
  logic [3:0]   ridx;
  logic [7:0]   rc;
  logic [319:0] x_rnd;
  logic         in_a;

  assign in_a = (st == S_INIT) || (st == S_FINAL);
  assign ridx = in_a ? rnd : 4'(rnd + 4'(12 - B_ROUNDS));
  assign rc   = {4'hF - ridx, ridx};

  ascon_round u_round (.x_in(x), .rc(rc), .x_out(x_rnd));

  // absorb / squeeze of one rate block
  logic [63:0] mask, padv, x0_new, out_blk;
  always_comb begin
    mask   = keep_bytes64(bdi_size);
    padv   = (bdi_size < 4'd8) ? (PAD1 >> (8 * bdi_size)) : 64'd0;
    if (dec && bdi_type) begin
      out_blk = x[319:256] ^ bdi;
      x0_new  = (x[319:256] & ~mask) ^ (bdi & mask) ^ padv;
    end else begin
      x0_new  = x[319:256] ^ (bdi & mask) ^ padv;
      out_blk = x0_new;
    end
  end

  assign busy = (st != S_IDLE) && (st != S_DONE);

  always_comb begin
    bdi_ready = 1'b0;
    case (st)
      S_AD_WAIT:  bdi_ready = bdi_valid && !bdi_type;
      S_MSG_WAIT: bdi_ready = bdi_valid && bdi_type && (!bdo_valid || bdo_ready);
      default:    bdi_ready = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      x         <= '0;
      k         <= '0;
      dec       <= 1'b0;
      rnd       <= '0;
      last_full <= 1'b0;
      bdo       <= '0;
      bdo_size  <= '0;
      bdo_valid <= 1'b0;
      tag       <= '0;
      tag_valid <= 1'b0;
    end else begin
      if (bdo_valid && bdo_ready) bdo_valid <= 1'b0;
      case (st)
        S_IDLE, S_DONE: begin
          if (start) begin
            x         <= {IV, key, npub};
            k         <= key;
            dec       <= decrypt;
            rnd       <= '0;
            tag_valid <= 1'b0;
            st        <= S_INIT;
          end
        end
        S_INIT: begin
          rnd <= rnd + 1'b1;
          if (rnd == 4'(A_ROUNDS - 1)) begin
            x   <= x_rnd ^ {192'd0, k};
            rnd <= '0;
            st  <= S_AD_WAIT;
          end else begin
            x <= x_rnd;
          end
        end
        S_AD_WAIT: begin
          if (bdi_valid && !bdi_type) begin
            x[319:256] <= x0_new;
            last_full  <= bdi_last && (bdi_size == 4'd8);
            rnd        <= '0;
            // the AD's own padding is in x0_new unless the block was full
            st         <= S_AD_PERM;
          end else if (bdi_valid && bdi_type) begin
            // no associated data: domain separation only
            x[0] <= x[0] ^ 1'b1;
            st   <= S_MSG_WAIT;
          end
        end
        S_AD_PERM, S_AD_PAD_PERM, S_MSG_PERM: begin
          x   <= x_rnd;
          rnd <= rnd + 1'b1;
          if (rnd == 4'(B_ROUNDS - 1)) begin
            rnd <= '0;
            if (st == S_MSG_PERM)
              st <= last_full ? S_MSG_PAD : S_MSG_WAIT;
            else if (st == S_AD_PERM && last_full)
              st <= S_AD_PAD;
            else if (st == S_AD_PERM && !ad_last_q)
              st <= S_AD_WAIT;
            else begin
              x[0] <= x_rnd[0] ^ 1'b1;   // domain separation after the AD
              st   <= S_MSG_WAIT;
            end
          end
        end
        S_AD_PAD: begin
          x[319:256] <= x[319:256] ^ PAD1;
          last_full  <= 1'b0;
          st         <= S_AD_PAD_PERM;
        end
        S_MSG_WAIT: begin
          if (bdi_ready) begin
            if (bdi_size != 4'd0) begin
              bdo       <= out_blk;
              bdo_size  <= bdi_size;
              bdo_valid <= 1'b1;
            end
            rnd <= '0;
            if (bdi_last && bdi_size != 4'd8) begin
              // padding already absorbed: finalize
              x         <= {x0_new, x[255:128] ^ k, x[127:0]};
              last_full <= 1'b0;
              st        <= S_FINAL;
            end else begin
              x[319:256] <= x0_new;
              last_full  <= bdi_last;
              st         <= S_MSG_PERM;
            end
          end
        end
        S_MSG_PAD: begin
          x         <= {x[319:256] ^ PAD1, x[255:128] ^ k, x[127:0]};
          last_full <= 1'b0;
          rnd       <= '0;
          st        <= S_FINAL;
        end
        S_FINAL: begin
          x   <= x_rnd;
          rnd <= rnd + 1'b1;
          if (rnd == 4'(A_ROUNDS - 1)) begin
            tag       <= x_rnd[127:0] ^ k;
            tag_valid <= 1'b1;
            st        <= S_DONE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // whether the AD block being permuted was the last one
  always_ff @(posedge clk) begin
    if (!rst_n) ad_last_q <= 1'b0;
    else if (st == S_AD_WAIT && bdi_valid && !bdi_type) ad_last_q <= bdi_last;
    else if (st == S_AD_PAD) ad_last_q <= 1'b1;
  end

endmodule
