// cipher_ref_pkg: reference models of Grain v.1 and Trivium for the testbenches.
//
// Both return the first n keystream bits after initialisation for a given key and
// IV. They are written from the cipher definitions in a form unlike the RTL: the
// Grain model computes the bit sequences s_i and b_i index by index, and the
// Trivium model keeps the 288-bit state in the s1..s288 numbering of the cipher's
// specification.
package cipher_ref_pkg;

  // Grain v.1 reference: keystream bits z_0 .. z_(n-1) after initialisation.
  function automatic void grain_ref_keystream(input logic [79:0] k, input logic [63:0] v,
                                        input int n, ref bit zs[]);
    bit s[], b[];
    int total;
    total = 160 + n + 80;
    s = new[total];
    b = new[total];
    for (int j = 0; j < 80; j++) b[j] = k[j];
    for (int j = 0; j < 64; j++) s[j] = v[j];
    for (int j = 64; j < 80; j++) s[j] = 1'b1;
    zs = new[n];
    for (int i = 0; i < 160 + n; i++) begin
      bit x0, x1, x2, x3, x4, h, z, fs, gb;
      x0 = s[i+3]; x1 = s[i+25]; x2 = s[i+46]; x3 = s[i+64]; x4 = b[i+63];
      h  = x1 ^ x4 ^ (x0 & x3) ^ (x2 & x3) ^ (x3 & x4) ^ (x0 & x1 & x2)
         ^ (x0 & x2 & x3) ^ (x0 & x2 & x4) ^ (x1 & x2 & x4) ^ (x2 & x3 & x4);
      z  = b[i+1] ^ b[i+2] ^ b[i+4] ^ b[i+10] ^ b[i+31] ^ b[i+43] ^ b[i+56] ^ h;
      fs = s[i+62] ^ s[i+51] ^ s[i+38] ^ s[i+23] ^ s[i+13] ^ s[i];
      gb = s[i] ^ b[i] ^ b[i+9] ^ b[i+14] ^ b[i+21] ^ b[i+28] ^ b[i+33] ^ b[i+37]
         ^ b[i+45] ^ b[i+52] ^ b[i+60] ^ b[i+62]
         ^ (b[i+63] & b[i+60]) ^ (b[i+37] & b[i+33]) ^ (b[i+15] & b[i+9])
         ^ (b[i+60] & b[i+52] & b[i+45]) ^ (b[i+33] & b[i+28] & b[i+21])
         ^ (b[i+63] & b[i+45] & b[i+28] & b[i+9])
         ^ (b[i+60] & b[i+52] & b[i+37] & b[i+33])
         ^ (b[i+63] & b[i+60] & b[i+21] & b[i+15])
         ^ (b[i+63] & b[i+60] & b[i+52] & b[i+45] & b[i+37])
         ^ (b[i+33] & b[i+28] & b[i+21] & b[i+15] & b[i+9])
         ^ (b[i+52] & b[i+45] & b[i+37] & b[i+33] & b[i+28] & b[i+21]);
      if (i < 160) begin
        s[i+80] = fs ^ z;
        b[i+80] = gb ^ z;
      end else begin
        s[i+80] = fs;
        b[i+80] = gb;
        zs[i-160] = z;
      end
    end
  endfunction

  // Trivium reference in specification numbering: s[1..288].
  function automatic void trivium_ref_keystream(input logic [79:0] k, input logic [79:0] v,
                                        input int n, ref bit zs[]);
    bit s[289];
    for (int j = 1; j <= 288; j++) s[j] = 1'b0;
    for (int j = 1; j <= 80; j++) s[j] = k[j-1];
    for (int j = 1; j <= 80; j++) s[93+j] = v[j-1];
    s[286] = 1'b1; s[287] = 1'b1; s[288] = 1'b1;
    zs = new[n];
    for (int i = 0; i < 1152 + n; i++) begin
      bit t1, t2, t3;
      t1 = s[66] ^ s[93];
      t2 = s[162] ^ s[177];
      t3 = s[243] ^ s[288];
      if (i >= 1152) zs[i-1152] = t1 ^ t2 ^ t3;
      t1 = t1 ^ (s[91] & s[92]) ^ s[171];
      t2 = t2 ^ (s[175] & s[176]) ^ s[264];
      t3 = t3 ^ (s[286] & s[287]) ^ s[69];
      for (int j = 288; j > 178; j--) s[j] = s[j-1];
      s[178] = t2;
      for (int j = 177; j > 94; j--) s[j] = s[j-1];
      s[94] = t1;
      for (int j = 93; j > 1; j--) s[j] = s[j-1];
      s[1] = t3;
    end
  endfunction

endpackage
