// morus_core: MORUS-1280-128 authenticated encryption / decryption cipher
// core, one StateUpdate per clock.
//
// The state is five 256-bit words S0..S4. StateUpdate(S, M) is five rounds;
// round i updates one word with AND, XOR and Rotl_256_64 (each of the four
// 64-bit lanes rotated left by b_i = 13, 46, 38, 7, 4) and rotates another
// word as a whole by w_i = 64, 128, 192, 128, 64 bits. The message block M
// enters rounds 2..5. All five rounds are chained in one clock cycle, so a
// 256-bit block is absorbed per cycle; this is what makes MORUS the fastest
// and largest of the cores.
//
// Phases: initialization loads S0 = nonce, S1 = key || key, S2 = all ones,
// S3 = 0, S4 = the Fibonacci constants, runs StateUpdate 16 times with M = 0
// and then XORs the key into S1. Each AD block is one StateUpdate; each
// message block gives C = P ^ S0 ^ (S1 <<< 192) ^ (S2 & S3) and one
// StateUpdate with M = P (for decryption, the recovered plaintext with the
// bytes past bdi_size cleared). Finalization XORs S0 into S4 and runs
// StateUpdate 8 times with M = the AD and message bit lengths; the tag is the
// low 128 bits of S0 ^ (S1 <<< 192) ^ (S2 & S3). Byte n of a block is bits
// [8n+7:8n]. Cycle count: 1 (start) + 16 + one per AD block (one if no AD)
// + one per message block + 1 + 8.
//
// Interface as the other cipher cores (bdi_size counts bytes, 0..32; a last
// message block of size 0 is an empty message).
module morus_core #(
  parameter int unsigned INIT_STEPS  = 16,
  parameter int unsigned FINAL_STEPS = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  logic [127:0] npub,
  input  logic         start,
  input  logic         decrypt,
  input  logic [255:0] bdi,
  input  logic         bdi_valid,
  output logic         bdi_ready,
  input  logic         bdi_type,
  input  logic         bdi_last,
  input  logic [5:0]   bdi_size,
  output logic [255:0] bdo,
  output logic         bdo_valid,
  input  logic         bdo_ready,
  output logic [5:0]   bdo_size,
  output logic [127:0] tag,
  output logic         tag_valid,
  output logic         busy
);
  localparam logic [255:0] CONST = {128'hdd28b57342311120_f12fc26d55183ddb,
                                    128'h6279e99059372215_0d08050302010100};

  typedef logic [255:0] w256_t;
  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_AD, S_MSG, S_FPREP, S_FINAL, S_DONE
  } state_e;

  function automatic w256_t rotl_lanes(input w256_t v, input int b);
    w256_t o;
    for (int i = 0; i < 4; i++) o[64*i +: 64] = (v[64*i +: 64] << b) | (v[64*i +: 64] >> (64 - b));
    return o;
  endfunction

  function automatic w256_t rotl_word(input w256_t v, input int w);
    return (v << w) | (v >> (256 - w));
  endfunction

  state_e        st;
  w256_t         s0, s1, s2, s3, s4;
  logic [127:0]  k;
  logic          dec;
  logic [4:0]    cnt;
  logic [63:0]   ad_bits, msg_bits;

  // keystream-masked block and StateUpdate
  w256_t mask, ksw, xin, mblk, m_upd;
  w256_t n0, n1, n2, n3, n4;
  logic  upd_en;
  logic [127:0] tag_full;

  always_comb begin
    for (int i = 0; i < 32; i++) mask[8*i +: 8] = (i < int'(bdi_size)) ? 8'hFF : 8'h00;
    ksw  = s0 ^ rotl_word(s1, 192) ^ (s2 & s3);
    xin  = bdi ^ ksw;                       // ciphertext (enc) or plaintext (dec)
    mblk = (dec && st == S_MSG) ? (xin & mask) : (bdi & mask);
    case (st)
      S_AD, S_MSG: m_upd = mblk;
      S_FINAL:     m_upd = {128'd0, msg_bits, ad_bits};
      default:     m_upd = '0;
    endcase
    n0 = rotl_lanes(s0 ^ (s1 & s2) ^ s3, 13);
    n3 = rotl_word(s3, 64);
    n1 = rotl_lanes(s1 ^ (s2 & n3) ^ s4 ^ m_upd, 46);
    n4 = rotl_word(s4, 128);
    n2 = rotl_lanes(s2 ^ (n3 & n4) ^ n0 ^ m_upd, 38);
    n0 = rotl_word(n0, 192);
    n3 = rotl_lanes(n3 ^ (n4 & n0) ^ n1 ^ m_upd, 7);
    n1 = rotl_word(n1, 128);
    n4 = rotl_lanes(n4 ^ (n0 & n1) ^ n2 ^ m_upd, 4);
    n2 = rotl_word(n2, 64);
    // low half of S0 ^ (S1 <<< 192) ^ (S2 & S3); (S1 <<< 192)[127:0] is S1[191:64]
    tag_full = n0[127:0] ^ n1[191:64] ^ (n2[127:0] & n3[127:0]);
  end

  always_comb begin
    bdi_ready = 1'b0;
    upd_en    = 1'b0;
    case (st)
      S_INIT, S_FINAL: upd_en = 1'b1;
      S_AD: begin
        bdi_ready = bdi_valid && !bdi_type;
        upd_en    = bdi_ready;
      end
      S_MSG: begin
        bdi_ready = bdi_valid && bdi_type && (!bdo_valid || bdo_ready);
        upd_en    = bdi_ready && (bdi_size != '0);
      end
      default: ;
    endcase
  end

  assign busy = (st != S_IDLE) && (st != S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_IDLE;
      {s0, s1, s2, s3, s4} <= '0;
      k <= '0; dec <= 1'b0; cnt <= '0;
      ad_bits <= '0; msg_bits <= '0;
      bdo <= '0; bdo_size <= '0; bdo_valid <= 1'b0;
      tag <= '0; tag_valid <= 1'b0;
    end else begin
      if (bdo_valid && bdo_ready) bdo_valid <= 1'b0;
      if (upd_en) {s0, s1, s2, s3, s4} <= {n0, n1, n2, n3, n4};
      case (st)
        S_IDLE, S_DONE: if (start) begin
          s0 <= {128'd0, npub};
          s1 <= {key, key};
          s2 <= '1;
          s3 <= '0;
          s4 <= CONST;
          k <= key; dec <= decrypt; cnt <= '0;
          ad_bits <= '0; msg_bits <= '0;
          tag_valid <= 1'b0;
          st <= S_INIT;
        end
        S_INIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == 5'(INIT_STEPS - 1)) begin
            s1  <= n1 ^ {k, k};
            cnt <= '0;
            st  <= S_AD;
          end
        end
        S_AD: begin
          if (bdi_ready) begin
            ad_bits <= ad_bits + 64'(8 * int'(bdi_size));
            if (bdi_last) st <= S_MSG;
          end else if (bdi_valid && bdi_type) begin
            st <= S_MSG;
          end
        end
        S_MSG: if (bdi_ready) begin
          msg_bits <= msg_bits + 64'(8 * int'(bdi_size));
          if (bdi_size != '0) begin
            bdo       <= xin;
            bdo_size  <= bdi_size;
            bdo_valid <= 1'b1;
          end
          if (bdi_last) st <= S_FPREP;
        end
        S_FPREP: begin
          s4  <= s4 ^ s0;
          cnt <= '0;
          st  <= S_FINAL;
        end
        S_FINAL: begin
          cnt <= cnt + 1'b1;
          if (cnt == 5'(FINAL_STEPS - 1)) begin
            tag       <= tag_full;
            tag_valid <= 1'b1;
            st        <= S_DONE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
