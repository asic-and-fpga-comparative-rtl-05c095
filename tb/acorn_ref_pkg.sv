// acorn_ref_pkg: bit-serial behavioural reference of ACORN v2 (ACORN-128)
// for testbenches. One function call is one state step; whole messages are
// processed as byte strings, bits taken least-significant first.
package acorn_ref_pkg;

  typedef logic [7:0] bytes_t[$];

  class acorn_model;
    bit s[293];

    function bit step(bit m, bit ca, bit cb, bit dec, output bit ks);
      bit f, mb;
      s[289] ^= s[235] ^ s[230];
      s[230] ^= s[196] ^ s[193];
      s[193] ^= s[160] ^ s[154];
      s[154] ^= s[111] ^ s[107];
      s[107] ^= s[66] ^ s[61];
      s[61]  ^= s[23] ^ s[0];
      ks = s[12] ^ s[154] ^ ((s[235] & s[61]) | (s[235] & s[193]) | (s[61] & s[193]));
      f  = s[0] ^ !s[107] ^ ((s[244] & s[23]) | (s[244] & s[160]) | (s[23] & s[160]))
         ^ (s[230] ? s[111] : s[66]) ^ (ca & s[196]) ^ (cb & ks);
      mb = dec ? (m ^ ks) : m;
      for (int i = 0; i < 292; i++) s[i] = s[i+1];
      s[292] = f ^ mb;
      return m ^ ks;
    endfunction

    function void aead(logic [127:0] key, logic [127:0] iv, bytes_t ad, bytes_t din, bit dec,
                       output bytes_t dout, output logic [127:0] tag);
      bit ks, o;
      logic [7:0] by;
      foreach (s[i]) s[i] = 0;
      for (int i = 0; i < 1792; i++) begin
        bit m;
        if (i < 128) m = key[i];
        else if (i < 256) m = iv[i-128];
        else if (i == 256) m = key[0] ^ 1'b1;
        else m = key[i % 128];
        void'(step(m, 1, 1, 0, ks));
      end
      foreach (ad[n]) for (int b = 0; b < 8; b++) void'(step(ad[n][b], 1, 1, 0, ks));
      for (int i = 0; i < 256; i++) void'(step(i == 0, i < 128, 1, 0, ks));
      dout = {};
      foreach (din[n]) begin
        for (int b = 0; b < 8; b++) begin
          o = step(din[n][b], 1, 0, dec, ks);
          by[b] = o;
        end
        dout.push_back(by);
      end
      for (int i = 0; i < 256; i++) void'(step(i == 0, i < 128, 0, 0, ks));
      for (int i = 0; i < 768; i++) begin
        void'(step(0, 1, 1, 0, ks));
        if (i >= 640) tag[i-640] = ks;
      end
    endfunction
  endclass

endpackage
