// trivium_pkg: sizes and the state-update function of the Trivium stream cipher.
//
// State: three coupled NLFSRs A (93 bits), B (84 bits) and C (111 bits). Bit j of
// each vector holds a_(i+j), b_(i+j), c_(i+j) at time i: bit 0 is the oldest bit and
// the new bit enters at the top. One call of trivium_step performs one clock:
//   a_(i+93)  = a_(i+24) ^ c_i ^ (c_(i+1) & c_(i+2)) ^ c_(i+45)
//   b_(i+84)  = b_(i+6)  ^ a_i ^ (a_(i+1) & a_(i+2)) ^ a_(i+27)
//   c_(i+111) = c_(i+24) ^ b_i ^ (b_(i+1) & b_(i+2)) ^ b_(i+15)
//   z_i       = a_i ^ b_i ^ c_i ^ a_(i+27) ^ b_(i+15) ^ c_(i+45)
// In the usual s1..s288 numbering a_j is s_(93-j), b_j is s_(177-j) and c_j is
// s_(288-j). Initialisation runs 1152 clocks (four times the 288-bit state) with
// the same update and no keystream.
package trivium_pkg;

  localparam int unsigned KEY_W       = 80;
  localparam int unsigned IV_W        = 80;
  localparam int unsigned A_W         = 93;
  localparam int unsigned B_W         = 84;
  localparam int unsigned C_W         = 111;
  localparam int unsigned INIT_CLOCKS = 4 * (A_W + B_W + C_W);  // 1152
  localparam int unsigned MAX_RADIX   = 64;

  typedef struct packed {
    logic [C_W-1:0] c;
    logic [B_W-1:0] b;
    logic [A_W-1:0] a;
  } trivium_state_t;

  function automatic logic trivium_z(input trivium_state_t st);
    return st.a[0] ^ st.b[0] ^ st.c[0] ^ st.a[27] ^ st.b[15] ^ st.c[45];
  endfunction

  function automatic trivium_state_t trivium_step(input trivium_state_t st);
    trivium_state_t nx;
    logic           fa, fb, fc;
    fa = st.a[24] ^ st.c[0] ^ (st.c[1] & st.c[2]) ^ st.c[45];
    fb = st.b[6]  ^ st.a[0] ^ (st.a[1] & st.a[2]) ^ st.a[27];
    fc = st.c[24] ^ st.b[0] ^ (st.b[1] & st.b[2]) ^ st.b[15];
    nx.a = {fa, st.a[A_W-1:1]};
    nx.b = {fb, st.b[B_W-1:1]};
    nx.c = {fc, st.c[C_W-1:1]};
    return nx;
  endfunction

  // Parallel-load value:
  //   (a_0..a_92)  = (0,..,0, k_79..k_0)   i.e. a_(92-j) = k_j
  //   (b_0..b_83)  = (0,0,0,0, IV_79..IV_0) i.e. b_(83-j) = IV_j
  //   (c_0..c_110) = (1,1,1,0,..,0)
  function automatic trivium_state_t trivium_load_value(input logic [KEY_W-1:0] key,
                                                        input logic [IV_W-1:0]  iv);
    trivium_state_t ld;
    ld.a = '0;
    ld.b = '0;
    ld.c = '0;
    for (int j = 0; j < KEY_W; j++) ld.a[A_W-1-j] = key[j];
    for (int j = 0; j < IV_W; j++)  ld.b[B_W-1-j] = iv[j];
    ld.c[2:0] = 3'b111;
    return ld;
  endfunction

endpackage
