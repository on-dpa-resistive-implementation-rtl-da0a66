// grain_pkg: sizes and the state-update function of the Grain v.1 stream cipher.
//
// State: an 80-bit LFSR s and an 80-bit NLFSR b. Bit j of each vector holds
// s_(i+j) / b_(i+j) at time i, so bit 0 is the oldest bit and leaves first, and
// the new bit enters at position 79. One call of grain_step performs one clock of
// the cipher:
//   f: s_(i+80) = s_(i+62) ^ s_(i+51) ^ s_(i+38) ^ s_(i+23) ^ s_(i+13) ^ s_i
//   g: b_(i+80) = s_i ^ (NLFSR feedback polynomial of b, linear and product terms)
//   h(x0..x4) with x0..x4 = s_(i+3), s_(i+25), s_(i+46), s_(i+64), b_(i+63)
//   z_i = b_(i+1) ^ b_(i+2) ^ b_(i+4) ^ b_(i+10) ^ b_(i+31) ^ b_(i+43) ^ b_(i+56) ^ h
// During initialisation z_i is also XORed into both feedback bits and no keystream
// is released.
package grain_pkg;

  localparam int unsigned KEY_W       = 80;
  localparam int unsigned IV_W        = 64;
  localparam int unsigned FSR_W       = 80;
  // Number of initialisation clocks (two full rounds of the 80-bit state).
  localparam int unsigned INIT_CLOCKS = 160;
  // Largest number of keystream bits per clock considered for this design.
  localparam int unsigned MAX_RADIX   = 32;

  typedef struct packed {
    logic [FSR_W-1:0] nfsr;  // b_(i+79) .. b_i
    logic [FSR_W-1:0] lfsr;  // s_(i+79) .. s_i
  } grain_state_t;

  // Output filter h(x0, x1, x2, x3, x4).
  function automatic logic grain_h(input logic x0, x1, x2, x3, x4);
    return x1 ^ x4 ^ (x0 & x3) ^ (x2 & x3) ^ (x3 & x4) ^ (x0 & x1 & x2)
         ^ (x0 & x2 & x3) ^ (x0 & x2 & x4) ^ (x1 & x2 & x4) ^ (x2 & x3 & x4);
  endfunction

  // Keystream bit z_i of the current state.
  function automatic logic grain_z(input grain_state_t st);
    logic [FSR_W-1:0] s, b;
    s = st.lfsr;
    b = st.nfsr;
    return b[1] ^ b[2] ^ b[4] ^ b[10] ^ b[31] ^ b[43] ^ b[56]
         ^ grain_h(s[3], s[25], s[46], s[64], b[63]);
  endfunction

  // LFSR feedback f.
  function automatic logic grain_f(input logic [FSR_W-1:0] s);
    return s[62] ^ s[51] ^ s[38] ^ s[23] ^ s[13] ^ s[0];
  endfunction

  // NLFSR feedback g, including the s_i term.
  function automatic logic grain_g(input logic [FSR_W-1:0] s, input logic [FSR_W-1:0] b);
    return s[0] ^ b[0] ^ b[9] ^ b[14] ^ b[21] ^ b[28] ^ b[33] ^ b[37] ^ b[45] ^ b[52]
         ^ b[60] ^ b[62]
         ^ (b[63] & b[60]) ^ (b[37] & b[33]) ^ (b[15] & b[9])
         ^ (b[60] & b[52] & b[45]) ^ (b[33] & b[28] & b[21])
         ^ (b[63] & b[45] & b[28] & b[9]) ^ (b[60] & b[52] & b[37] & b[33])
         ^ (b[63] & b[60] & b[21] & b[15])
         ^ (b[63] & b[60] & b[52] & b[45] & b[37])
         ^ (b[33] & b[28] & b[21] & b[15] & b[9])
         ^ (b[52] & b[45] & b[37] & b[33] & b[28] & b[21]);
  endfunction

  // One clock of the cipher. With init set, z is fed back into both registers.
  function automatic grain_state_t grain_step(input grain_state_t st, input logic init);
    grain_state_t nx;
    logic         z, fb_s, fb_b;
    z    = grain_z(st);
    fb_s = grain_f(st.lfsr) ^ (init & z);
    fb_b = grain_g(st.lfsr, st.nfsr) ^ (init & z);
    nx.lfsr = {fb_s, st.lfsr[FSR_W-1:1]};
    nx.nfsr = {fb_b, st.nfsr[FSR_W-1:1]};
    return nx;
  endfunction

  // Parallel-load value: b_j = k_j; s_j = IV_j for j < 64, the last 16 LFSR bits 1.
  function automatic grain_state_t grain_load_value(input logic [KEY_W-1:0] key,
                                                    input logic [IV_W-1:0]  iv);
    grain_state_t ld;
    ld.nfsr = key;
    ld.lfsr = {{(FSR_W-IV_W){1'b1}}, iv};
    return ld;
  endfunction

endpackage
