// acorn_core: ACORN v2 (ACORN-128) authenticated encryption / decryption
// cipher core, eight state steps per clock.
//
// ACORN is a stream cipher: a 293-bit state built from six LFSRs of lengths
// 61, 46, 47, 39, 37 and 59 plus 4 extra bits. Each step first applies the
// six LFSR feedbacks, then the key stream generator gives
//   ks = s12 ^ s154 ^ maj(s235, s61, s193)
// and the nonlinear feedback
//   f = s0 ^ ~s107 ^ maj(s244, s23, s160) ^ ch(s230, s111, s66)
//       ^ (ca & s196) ^ (cb & ks)
// which, XORed with the input bit m, enters at s292 as the state shifts down.
// Eight such steps are chained combinationally, so one byte is handled per
// clock (the eight-way parallel form). The same datapath encrypts and
// decrypts: with decrypt set, the bit fed back is the recovered plaintext
// c ^ ks instead of the input bit. The input m is selected between key/IV,
// associated data, message and the padding / zero input of each phase.
//
// Phases (step counts are ACORN v2's): initialization 1792 steps (key, IV,
// key[0]^1, then the key repeated) = 224 cycles; each AD byte 1 cycle;
// 256 padding steps (a single 1 then zeros; ca=1 for the first 128) = 32
// cycles; each message byte 1 cycle with cb=0; 32 padding cycles; 768
// finalization steps = 96 cycles, the key stream of the last 128 steps being
// the tag. Bits enter least-significant-bit first: key and IV bit i are
// key[i] and npub[i], byte n of the key is key[8n+7:8n].
//
// Interface as the other cipher cores: bytes on bdi with bdi_type (0 AD,
// 1 message) and bdi_last. bdi_size is 1 bit; a last block of size 0 carries
// no byte (empty message). If the first block after initialization is a
// message block, the AD is empty. Each message byte gives one bdo byte, so
// bdo_size is always 1; the port is kept so that all cores share one
// interface.
module acorn_core #(
  parameter int unsigned P = 8      // state steps per clock
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  logic [127:0] npub,
  input  logic         start,
  input  logic         decrypt,
  input  logic [P-1:0] bdi,
  input  logic         bdi_valid,
  output logic         bdi_ready,
  input  logic         bdi_type,
  input  logic         bdi_last,
  input  logic [0:0]   bdi_size,
  output logic [P-1:0] bdo,
  output logic         bdo_valid,
  input  logic         bdo_ready,
  output logic [0:0]   bdo_size,
  output logic [127:0] tag,
  output logic         tag_valid,
  output logic         busy
);
  localparam int unsigned INIT_CYC  = 1792 / P;
  localparam int unsigned PAD_CYC   = 256 / P;
  localparam int unsigned FINAL_CYC = 768 / P;
  localparam int unsigned TAG_CYC   = 128 / P;
  localparam int unsigned CW        = $clog2(INIT_CYC + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_AD, S_AD_PAD, S_MSG, S_MSG_PAD, S_FINAL, S_DONE
  } state_e;

  state_e         st;
  logic [292:0]   s;
  logic [127:0]   k, iv;
  logic           dec;
  logic [CW-1:0]  cnt;

  function automatic logic maj(input logic a, input logic b, input logic c);
    return (a & b) ^ (a & c) ^ (b & c);
  endfunction
  function automatic logic ch(input logic a, input logic b, input logic c);
    return (a & b) ^ (~a & c);
  endfunction

  // datapath inputs for this cycle
  logic [P-1:0] m;
  logic         ca, cb, fb_dec, step;
  logic [292:0] s_next;
  logic [P-1:0] ks, dout;

  // P chained state steps
  always_comb begin
    logic [292:0] t;
    logic         kb, fb, mb;
    t = s;
    for (int j = 0; j < int'(P); j++) begin
      t[289] = t[289] ^ t[235] ^ t[230];
      t[230] = t[230] ^ t[196] ^ t[193];
      t[193] = t[193] ^ t[160] ^ t[154];
      t[154] = t[154] ^ t[111] ^ t[107];
      t[107] = t[107] ^ t[66]  ^ t[61];
      t[61]  = t[61]  ^ t[23]  ^ t[0];
      kb = t[12] ^ t[154] ^ maj(t[235], t[61], t[193]);
      fb = t[0] ^ ~t[107] ^ maj(t[244], t[23], t[160]) ^ ch(t[230], t[111], t[66])
         ^ (ca & t[196]) ^ (cb & kb);
      mb = fb_dec ? (m[j] ^ kb) : m[j];
      t  = {fb ^ mb, t[292:1]};
      ks[j]   = kb;
      dout[j] = m[j] ^ kb;
    end
    s_next = t;
  end

  // byte n of a 128-bit LSB-first vector
  function automatic logic [P-1:0] byte_of(input logic [127:0] v, input int n);
    return v[P*(n % (128 / P)) +: P];
  endfunction

  always_comb begin
    m = '0; ca = 1'b1; cb = 1'b1; fb_dec = 1'b0; step = 1'b0;
    bdi_ready = 1'b0;
    case (st)
      S_INIT: begin
        step = 1'b1;
        if (cnt < CW'(128 / P))           m = byte_of(k, int'(cnt));
        else if (cnt < CW'(256 / P))      m = byte_of(iv, int'(cnt));
        else if (cnt == CW'(256 / P))     m = byte_of(k, 0) ^ P'(1);
        else                              m = byte_of(k, int'(cnt));
      end
      S_AD: begin
        bdi_ready = bdi_valid && !bdi_type;
        m    = bdi;
        step = bdi_valid && !bdi_type && bdi_size[0];
      end
      S_AD_PAD, S_MSG_PAD: begin
        step = 1'b1;
        m    = (cnt == '0) ? P'(1) : '0;
        ca   = (cnt < CW'(PAD_CYC / 2));
        cb   = (st == S_AD_PAD);
      end
      S_MSG: begin
        bdi_ready = bdi_valid && bdi_type && (!bdo_valid || bdo_ready);
        m      = bdi;
        cb     = 1'b0;
        fb_dec = dec;
        step   = bdi_ready && bdi_size[0];
      end
      S_FINAL: step = 1'b1;
      default: step = 1'b0;
    endcase
  end

  assign busy     = (st != S_IDLE) && (st != S_DONE);
  assign bdo_size = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      s         <= '0;
      k         <= '0;
      iv        <= '0;
      dec       <= 1'b0;
      cnt       <= '0;
      bdo       <= '0;
      bdo_valid <= 1'b0;
      tag       <= '0;
      tag_valid <= 1'b0;
    end else begin
      if (bdo_valid && bdo_ready) bdo_valid <= 1'b0;
      if (step) s <= s_next;
      case (st)
        S_IDLE, S_DONE: if (start) begin
          s         <= '0;
          k         <= key;
          iv        <= npub;
          dec       <= decrypt;
          cnt       <= '0;
          tag_valid <= 1'b0;
          st        <= S_INIT;
        end
        S_INIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(INIT_CYC - 1)) begin cnt <= '0; st <= S_AD; end
        end
        S_AD: if (bdi_valid) begin
          // a message block first means there is no (more) AD
          if (bdi_type || bdi_last) begin cnt <= '0; st <= S_AD_PAD; end
        end
        S_AD_PAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(PAD_CYC - 1)) begin cnt <= '0; st <= S_MSG; end
        end
        S_MSG: if (bdi_ready) begin
          if (bdi_size[0]) begin
            bdo       <= dout;
            bdo_valid <= 1'b1;
          end
          if (bdi_last) begin cnt <= '0; st <= S_MSG_PAD; end
        end
        S_MSG_PAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(PAD_CYC - 1)) begin cnt <= '0; st <= S_FINAL; end
        end
        S_FINAL: begin
          cnt <= cnt + 1'b1;
          if (cnt >= CW'(FINAL_CYC - TAG_CYC))
            tag[P*(int'(cnt) - int'(FINAL_CYC - TAG_CYC)) +: P] <= ks;
          if (cnt == CW'(FINAL_CYC - 1)) begin
            tag_valid <= 1'b1;
            st        <= S_DONE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
