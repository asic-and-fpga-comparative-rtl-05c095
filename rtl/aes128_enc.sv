// aes128_enc: iterative AES-128 encryption engine (FIPS-197), the block
// cipher inside the CLOC and SILC modes.
//
// A round per clock: start loads state = pt ^ key and the round key register
// with the cipher key; each of the next ten cycles applies SubBytes,
// ShiftRows, MixColumns (skipped in round 10) and AddRoundKey, while the key
// schedule computes the next round key on the fly, so no round-key memory is
// needed. done pulses for one cycle when ct is valid, eleven cycles after
// start (one loading cycle, the "+C" of the usual throughput formula
// block/(rounds+C), plus ten rounds);
// ct then holds until the next start. start is ignored while busy.
//
// The S-box is a 256 x 8 table (the size the AES-based modes are known for),
// filled at elaboration from its definition: the multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the affine map with constant
// 0x63. ShiftRows rotates row r left by r bytes as FIPS-197 defines it.
// Byte 0 of a block is bits [127:120]; bytes fill the state column by column.
module aes128_enc #(
  parameter int unsigned ROUNDS = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic [127:0] ct,
  output logic         done,
  output logic         busy
);

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // Table built from exp/log tables of the generator 0x03, then the affine map
  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    logic [7:0] expt [256];
    logic [7:0] logt [256];
    logic [7:0] a, inv;
    a = 8'h01;
    for (int i = 0; i < 256; i++) begin
      expt[i] = a;
      if (i < 255) logt[a] = 8'(i);
      a = xtime(a) ^ a;
    end
    logt[0] = 8'h00;
    for (int x = 0; x < 256; x++) begin
      inv = (x == 0) ? 8'h00 : expt[(255 - int'(logt[x])) % 255];
      t[8*x +: 8] = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^
                    {inv[3:0], inv[7:4]} ^ 8'h63;
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX = gen_sbox();

  function automatic logic [7:0] sb(input logic [7:0] a);
    return SBOX[8*a +: 8];
  endfunction

  // state byte (row r, column c) sits at bits [127-8*(4c+r) -: 8]
  function automatic logic [127:0] round_fn(input logic [127:0] s, input logic last);
    logic [7:0] a [4][4];
    logic [7:0] b [4][4];
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        a[r][c] = sb(s[127-8*(4*c+r) -: 8]);
    // ShiftRows: row r moves left by r positions
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        b[r][c] = a[r][(c + r) % 4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        if (last)
          o[127-8*(4*c+r) -: 8] = b[r][c];
        else
          o[127-8*(4*c+r) -: 8] = xtime(b[r][c]) ^ xtime(b[(r+1)%4][c]) ^ b[(r+1)%4][c]
                                ^ b[(r+2)%4][c] ^ b[(r+3)%4][c];
      end
    end
    return o;
  endfunction

  function automatic logic [127:0] next_key(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {sb(w3[23:16]) ^ rcon, sb(w3[15:8]), sb(w3[7:0]), sb(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  logic [127:0] state, rkey;
  logic [7:0]   rcon;
  logic [3:0]   rnd;

  logic [127:0] rk_next;
  assign rk_next = next_key(rkey, rcon);
  assign ct = state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      rnd   <= '0;
      rcon  <= 8'h01;
      state <= '0;
      rkey  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= pt ^ key;
          rkey  <= key;
          rcon  <= 8'h01;
          rnd   <= 4'd1;
          busy  <= 1'b1;
        end
      end else begin
        state <= round_fn(state, rnd == 4'(ROUNDS)) ^ rk_next;
        rkey  <= rk_next;
        rcon  <= xtime(rcon);
        rnd   <= rnd + 1'b1;
        if (rnd == 4'(ROUNDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
