// sdsm_ref_pkg -- reference model for the testbenches: a byte-oriented
// AES-128 written independently of the RTL (S-box built by the classic
// p/q walk over GF(2^8) generators, whole key schedule expanded up front),
// and the counter-mode keystream block of one 64-byte cache block.
package sdsm_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] rl(logic [7:0] x, int s);
    return (x << s) | (x >> (8 - s));
  endfunction

  function automatic void build_sbox(output logic [7:0] sb [256]);
    logic [7:0] p, q, x;
    p = 8'h01; q = 8'h01;
    do begin
      p = p ^ (p << 1) ^ ((p & 8'h80) != 0 ? 8'h1b : 8'h00);
      q = q ^ (q << 1);
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if ((q & 8'h80) != 0) q = q ^ 8'h09;
      x = q ^ rl(q, 1) ^ rl(q, 2) ^ rl(q, 3) ^ rl(q, 4);
      sb[p] = x ^ 8'h63;
    end while (p != 8'h01);
    sb[0] = 8'h63;
  endfunction

  function automatic logic [7:0] mul2(logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [127:0] aes_encrypt(logic [127:0] key, logic [127:0] pt);
    logic [7:0] sb [256];
    logic [7:0] w [176];
    logic [7:0] st [16], tmp [16];
    logic [7:0] rc, t0, t1, t2, t3, a0, a1, a2, a3;
    logic [127:0] out;
    build_sbox(sb);
    for (int i = 0; i < 16; i++) w[i] = key[127 - 8*i -: 8];
    rc = 8'h01;
    for (int i = 16; i < 176; i += 4) begin
      t0 = w[i-4]; t1 = w[i-3]; t2 = w[i-2]; t3 = w[i-1];
      if (i % 16 == 0) begin
        {t0, t1, t2, t3} = {sb[t1] ^ rc, sb[t2], sb[t3], sb[t0]};
        rc = mul2(rc);
      end
      w[i] = w[i-16] ^ t0; w[i+1] = w[i-15] ^ t1;
      w[i+2] = w[i-14] ^ t2; w[i+3] = w[i-13] ^ t3;
    end
    for (int i = 0; i < 16; i++) st[i] = pt[127 - 8*i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) tmp[i] = sb[st[(i + 4*(i % 4)) % 16]];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          a0 = tmp[4*c]; a1 = tmp[4*c+1]; a2 = tmp[4*c+2]; a3 = tmp[4*c+3];
          tmp[4*c]   = mul2(a0) ^ mul2(a1) ^ a1 ^ a2 ^ a3;
          tmp[4*c+1] = a0 ^ mul2(a1) ^ mul2(a2) ^ a2 ^ a3;
          tmp[4*c+2] = a0 ^ a1 ^ mul2(a2) ^ mul2(a3) ^ a3;
          tmp[4*c+3] = mul2(a0) ^ a0 ^ a1 ^ a2 ^ mul2(a3);
        end
      for (int i = 0; i < 16; i++) st[i] = tmp[i] ^ w[16*r + i];
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = st[i];
    return out;
  endfunction

  // KB of a 64-byte block: four cipher blocks with inputs
  // {59'b0, marker, value, index}, marker = (seed != 0),
  // value = seed if marker else the block address.
  function automatic logic [511:0] ref_kb(logic [63:0] seed, logic [15:0] va,
                                          logic [127:0] key);
    logic [511:0] r;
    logic [63:0]  v;
    v = (seed != 0) ? seed : {48'd0, va};
    for (int i = 0; i < 4; i++)
      r[511 - 128*i -: 128] = aes_encrypt(key, {59'd0, seed != 0, v, 4'(i)});
    return r;
  endfunction

endpackage
