// cipher_ref_pkg: bit-serial reference models for the testbenches.
//
// Each function steps its cipher one bit at a time, with the state held in
// queues (Grain) or in a 1-based array (Trivium) and the taps written as in
// the cipher definitions, and returns the first n keystream (or pre-output)
// bits after key initialization. Bit 0 of key/iv is k_0 / IV_0 (Grain) or
// K_1 / IV_1 (Trivium). hex_lsb() turns a published test vector (bytes, least
// significant bit first) into a bit queue.
package cipher_ref_pkg;

  typedef bit bitq_t[$];

  function automatic bit grain_v1_h(bit x0, bit x1, bit x2, bit x3, bit x4);
    return x1 ^ x4 ^ (x0 & x3) ^ (x2 & x3) ^ (x3 & x4) ^ (x0 & x1 & x2)
         ^ (x0 & x2 & x3) ^ (x0 & x2 & x4) ^ (x1 & x2 & x4) ^ (x2 & x3 & x4);
  endfunction

  function automatic bitq_t grain_v1_ref(bit [79:0] key, bit [63:0] iv, int n);
    bit s[$], b[$];
    bitq_t out;
    bit z, fs, fb;
    for (int i = 0; i < 80; i++) b.push_back(key[i]);
    for (int i = 0; i < 64; i++) s.push_back(iv[i]);
    repeat (16) s.push_back(1'b1);
    for (int t = 0; t < 160 + n; t++) begin
      z  = b[1] ^ b[2] ^ b[4] ^ b[10] ^ b[31] ^ b[43] ^ b[56]
         ^ grain_v1_h(s[3], s[25], s[46], s[64], b[63]);
      fs = s[62] ^ s[51] ^ s[38] ^ s[23] ^ s[13] ^ s[0];
      fb = s[0] ^ b[62] ^ b[60] ^ b[52] ^ b[45] ^ b[37] ^ b[33] ^ b[28] ^ b[21]
         ^ b[14] ^ b[9] ^ b[0] ^ (b[63] & b[60]) ^ (b[37] & b[33]) ^ (b[15] & b[9])
         ^ (b[60] & b[52] & b[45]) ^ (b[33] & b[28] & b[21])
         ^ (b[63] & b[45] & b[28] & b[9]) ^ (b[60] & b[52] & b[37] & b[33])
         ^ (b[63] & b[60] & b[21] & b[15])
         ^ (b[63] & b[60] & b[52] & b[45] & b[37])
         ^ (b[33] & b[28] & b[21] & b[15] & b[9])
         ^ (b[52] & b[45] & b[37] & b[33] & b[28] & b[21]);
      if (t < 160) begin
        fs ^= z;
        fb ^= z;
      end else begin
        out.push_back(z);
      end
      void'(s.pop_front());
      void'(b.pop_front());
      s.push_back(fs);
      b.push_back(fb);
    end
    return out;
  endfunction

  // Grain-128 (variant_a = 0) or the Grain-128a pre-output (variant_a = 1).
  function automatic bitq_t grain128_ref(bit [127:0] key, bit [95:0] iv, int n, bit variant_a);
    bit s[$], b[$];
    bitq_t out;
    bit y, fs, fb;
    for (int i = 0; i < 128; i++) b.push_back(key[i]);
    for (int i = 0; i < 96; i++) s.push_back(iv[i]);
    repeat (32) s.push_back(1'b1);
    if (variant_a) s[127] = 1'b0;
    for (int t = 0; t < 256 + n; t++) begin
      y  = b[2] ^ b[15] ^ b[36] ^ b[45] ^ b[64] ^ b[73] ^ b[89]
         ^ (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42]) ^ (s[60] & s[79])
         ^ (b[12] & b[95] & s[95]) ^ s[93];
      fs = s[0] ^ s[7] ^ s[38] ^ s[70] ^ s[81] ^ s[96];
      fb = s[0] ^ b[0] ^ b[26] ^ b[56] ^ b[91] ^ b[96] ^ (b[3] & b[67]) ^ (b[11] & b[13])
         ^ (b[17] & b[18]) ^ (b[27] & b[59]) ^ (b[40] & b[48]) ^ (b[61] & b[65])
         ^ (b[68] & b[84]);
      if (variant_a)
        fb ^= (b[22] & b[24] & b[25]) ^ (b[70] & b[78] & b[82])
            ^ (b[88] & b[92] & b[93] & b[95]);
      if (t < 256) begin
        fs ^= y;
        fb ^= y;
      end else begin
        out.push_back(y);
      end
      void'(s.pop_front());
      void'(b.pop_front());
      s.push_back(fs);
      b.push_back(fb);
    end
    return out;
  endfunction

  function automatic bitq_t trivium_ref(bit [79:0] key, bit [79:0] iv, int n);
    bit S[1:288];
    bit t1, t2, t3;
    bitq_t out;
    for (int i = 1; i <= 288; i++) S[i] = 1'b0;
    for (int i = 1; i <= 80; i++) S[i] = key[i-1];
    for (int i = 1; i <= 80; i++) S[93+i] = iv[i-1];
    S[286] = 1'b1; S[287] = 1'b1; S[288] = 1'b1;
    for (int t = 0; t < 1152 + n; t++) begin
      t1 = S[66] ^ S[93];
      t2 = S[162] ^ S[177];
      t3 = S[243] ^ S[288];
      if (t >= 1152) out.push_back(t1 ^ t2 ^ t3);
      t1 = t1 ^ (S[91] & S[92]) ^ S[171];
      t2 = t2 ^ (S[175] & S[176]) ^ S[264];
      t3 = t3 ^ (S[286] & S[287]) ^ S[69];
      for (int i = 288; i > 178; i--) S[i] = S[i-1];
      S[178] = t2;
      for (int i = 177; i > 94; i--) S[i] = S[i-1];
      S[94] = t1;
      for (int i = 93; i > 1; i--) S[i] = S[i-1];
      S[1] = t3;
    end
    return out;
  endfunction

  // Grain-128a MAC by its index definition: a^j = y_j, r_j = y_(32+j),
  // r_(i+32) = y_(64+2i+1), a^j += m_i r_(i+j) for i = 0..L with m_L = 1.
  function automatic bit [31:0] grain128a_tag_ref(bitq_t y, bitq_t m);
    bit [31:0] a;
    bit r[$];
    int L = m.size();
    for (int j = 0; j < 32; j++) a[j] = y[j];
    for (int j = 0; j < 32; j++) r.push_back(y[32+j]);
    for (int i = 0; i < L; i++) r.push_back(y[64+2*i+1]);
    for (int i = 0; i <= L; i++) begin
      bit mi = (i == L) ? 1'b1 : m[i];
      for (int j = 0; j < 32; j++) a[j] ^= mi & r[i+j];
    end
    return a;
  endfunction

  function automatic bitq_t hex_lsb(string h);
    bitq_t q;
    for (int i = 0; i + 1 < h.len(); i += 2) begin
      bit [7:0] v = 8'(h.substr(i, i+1).atohex());
      for (int j = 0; j < 8; j++) q.push_back(v[j]);
    end
    return q;
  endfunction

endpackage
