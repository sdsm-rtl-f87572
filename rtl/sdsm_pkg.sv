// sdsm_pkg -- types, constants and crypto helpers shared by the secure
// distributed-shared-memory (SDSM) blocks.
//
// * Message format carried by the interconnect between secure cores (nodes)
//   and trusted coherence managers (TCMs). Endpoints 0..N_CORES-1 are cores,
//   endpoints N_CORES.. are TCMs.
// * Counter-mode seed handling: a seed of 0 means "initial encryption" and
//   selects a VA-based cipher input; any other seed gives a VA-independent
//   input with a leading '1' marker, so runtime keystream blocks (KBs) can
//   never equal initial ones.
// * AES-128 round functions used by sdsm_aes128. The S-box is computed at
//   elaboration from its definition (multiplicative inverse in GF(2^8)
//   followed by the affine map), not stored as a table.
//
// Seeds are 8 bytes as in the design; the 64-byte cache block, the field
// widths of the message and the 4-bit process id are this implementation's
// choices.
package sdsm_pkg;

  localparam int SEED_W     = 64;   // 8-byte seeds
  localparam int BLOCK_BITS = 512;  // 64-byte cache block
  localparam int AES_W      = 128;
  localparam int N_SUB      = BLOCK_BITS / AES_W;  // cipher blocks per KB
  localparam int NODE_W     = 16;   // endpoint id field
  localparam int PID_W      = 4;    // secure process id field
  localparam int ADDR_W     = 16;   // block address field (block granularity)
  localparam int IDX_W      = 4;    // sub-block index appended to P

  typedef logic [SEED_W-1:0]     seed_t;
  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [AES_W-1:0]      aes_blk_t;
  typedef logic [NODE_W-1:0]     node_id_t;
  typedef logic [PID_W-1:0]      pid_t;
  typedef logic [ADDR_W-1:0]     baddr_t;

  typedef enum logic [3:0] {
    M_NONE        = 4'd0,
    M_REQ_RD      = 4'd1,   // core -> home TCM: read miss
    M_REQ_WR      = 4'd2,   // core -> home TCM: write miss / upgrade
    M_SEED_REQ    = 4'd3,   // core -> TCM: ask for one outstanding seed
    M_SEED_GRANT  = 4'd4,   // TCM -> core: new outstanding seed (flag=1) or refusal
    M_SEED_USED   = 4'd5,   // core -> TCM: core wants a seed for a local eviction
    M_USED_ACK    = 4'd6,   // TCM -> core: flag=1 seed withdrawn, 0 already handed out
    M_SEED_TO_REQ = 4'd7,   // TCM -> requestor: seed the sender will encrypt with
    M_FWD         = 4'd8,   // TCM -> sender: send block to requestor with this seed
    M_DATA        = 4'd9,   // sender -> requestor: encrypted block
    M_INV         = 4'd10,  // TCM -> sharer: invalidate
    M_UPG_ACK     = 4'd11   // TCM -> requestor: write permission, no data needed
  } msg_type_e;

  typedef struct packed {
    msg_type_e mtype;
    node_id_t  src;
    node_id_t  dst;
    node_id_t  req;    // FWD: the requestor
    pid_t      pid;
    baddr_t    addr;
    seed_t     seed;
    logic      rw;     // 1 = write permission asked / granted
    logic      flag;   // FWD: fresh seed; SEED_GRANT/USED_ACK: success
    block_t    data;
  } msg_t;

  // Block permission held by a core (MESI reduced to what a node tracks).
  typedef enum logic [1:0] {P_I = 2'd0, P_S = 2'd1, P_M = 2'd2} perm_e;

  // Core-side operations on a block.
  typedef enum logic [1:0] {OP_RD = 2'd0, OP_WR = 2'd1, OP_EV = 2'd2} cpu_op_e;

  // One pulse per mechanism, per node, per cycle.
  typedef struct packed {
    logic cache_hit;      // core access served by the private cache
    logic mem_load;       // block decrypted from local memory into the cache
    logic miss_sent;      // request sent to the home TCM
    logic kb_hidden;      // encrypted data arrived with the incoming KB ready
    logic kb_late;        // encrypted data had to wait for the incoming KB
    logic seed_mismatch;  // data came with another seed than announced
    logic fwd_cache_hit;  // sender found the block in its cache (send w/o memory)
    logic fwd_cache_miss; // sender loaded, decrypted and re-encrypted the block
    logic kb_pregen_hit;  // sender used a pre-generated outstanding KB
    logic kb_on_demand;   // sender had to compute the KB after the request
    logic evict_dirty;    // modified block encrypted with an outstanding KB
    logic evict_retry;    // TCM refused the seed chosen for an eviction
    logic invalidated;    // INV received
    logic upgraded;       // write permission granted without data
    logic seed_req;       // seed asked from a TCM for pre-generation
  } node_ev_t;

  // ------------------------------------------------------------------
  // Counter-mode cipher input: P = f(S, VA), then P_i = P || i.
  // Layout (128 bit): 59 zeros | marker | 64-bit value | 4-bit index.
  function automatic aes_blk_t make_cipher_input(seed_t s, baddr_t va,
                                                 logic [IDX_W-1:0] idx);
    logic        marker;
    logic [63:0] value;
    marker = (s != '0);
    value  = marker ? 64'(s) : 64'(va);
    return {59'd0, marker, value, idx};
  endfunction

  // ------------------------------------------------------------------
  // AES-128 helpers (FIPS-197). Byte 0 of the state is bits [127:120];
  // the state is column-major, byte index = row + 4*column.
  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // x^254 = x^-1 in GF(2^8); 254 = 0b11111110.
  function automatic logic [7:0] gf_inv(logic [7:0] x);
    logic [7:0] sq, r;
    r  = 8'h01;
    sq = x;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);      // x^(2^i)
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    logic [7:0]    b;
    for (int x = 0; x < 256; x++) begin
      b = gf_inv(8'(x));
      t[x*8 +: 8] = b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX = gen_sbox();

  function automatic logic [7:0] sbox(logic [7:0] x);
    return SBOX[{x, 3'b000} +: 8];
  endfunction

  function automatic logic [7:0] get_byte(aes_blk_t s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic aes_blk_t sub_shift(aes_blk_t s);
    aes_blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(r + 4*c) -: 8] = sbox(get_byte(s, r + 4*((c + r) % 4)));
    return o;
  endfunction

  function automatic aes_blk_t mix_columns(aes_blk_t s);
    aes_blk_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2);
      a3 = get_byte(s, 4*c + 3);
      o[127 - 8*(4*c)     -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[127 - 8*(4*c + 3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  function automatic aes_blk_t next_round_key(aes_blk_t k, logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96]; w1 = k[95:64]; w2 = k[63:32]; w3 = k[31:0];
    t  = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
