// ascon_round: one round of the ASCON permutation, purely combinational.
//
// The 320-bit state is five 64-bit words x0..x4, with x0 in bits [319:256].
// A round adds the round constant rc to x2, applies the 5-bit S-box to every
// bit slice (written in its bitsliced form of XORs, ANDs and NOTs), then the
// linear diffusion layer, which XORs each word with two rotations of itself
// (x0: 19, 28; x1: 61, 39; x2: 1, 6; x3: 10, 17; x4: 7, 41). These constants
// are those of the ASCON specification. The P^a and P^b permutations of the
// cipher core are this round applied 12 or 6 times, one round per clock.
module ascon_round (
  input  logic [319:0] x_in,
  input  logic [7:0]   rc,
  output logic [319:0] x_out
);
  function automatic logic [63:0] ror(input logic [63:0] v, input int n);
    return (v >> n) | (v << (64 - n));
  endfunction

  logic [63:0] x0, x1, x2, x3, x4;
  logic [63:0] t0, t1, t2, t3, t4;
  logic [63:0] s0, s1, s2, s3, s4;

  always_comb begin
    {x0, x1, x2, x3, x4} = x_in;
    // constant addition
    x2 = x2 ^ {56'd0, rc};
    // substitution layer
    x0 = x0 ^ x4;
    x4 = x4 ^ x3;
    x2 = x2 ^ x1;
    t0 = ~x0 & x1;
    t1 = ~x1 & x2;
    t2 = ~x2 & x3;
    t3 = ~x3 & x4;
    t4 = ~x4 & x0;
    s0 = x0 ^ t1;
    s1 = x1 ^ t2;
    s2 = x2 ^ t3;
    s3 = x3 ^ t4;
    s4 = x4 ^ t0;
    s1 = s1 ^ s0;
    s0 = s0 ^ s4;
    s3 = s3 ^ s2;
    s2 = ~s2;
    // linear diffusion layer
    x_out = {s0 ^ ror(s0, 19) ^ ror(s0, 28),
             s1 ^ ror(s1, 61) ^ ror(s1, 39),
             s2 ^ ror(s2, 1)  ^ ror(s2, 6),
             s3 ^ ror(s3, 10) ^ ror(s3, 17),
             s4 ^ ror(s4, 7)  ^ ror(s4, 41)};
  end
endmodule
