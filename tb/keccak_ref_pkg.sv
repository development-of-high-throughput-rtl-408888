// keccak_ref_pkg - behavioural reference model of Keccak-512 for the testbenches.
//
// Written independently of the RTL: the state is a 5x5 array of lanes indexed [x][y],
// the 24 round constants and the rho offsets are the published Keccak-f[1600] values
// typed in as tables, and each step is a plain loop. Flat 1600-bit vectors use the
// RTL's lane order (lane (x, y) at bits [64*(5y+x) +: 64]); padded blocks put word i
// at bits [575-64i -: 64]; digests put lane 0 in bits [511:448].
// Also holds known-answer digests of Keccak-512 (original Keccak padding, r = 576) of
// the messages 00 01 02 ... (n bytes), and the zero-state permutation result.
package keccak_ref_pkg;

  typedef logic [63:0]   u64;
  typedef logic [1599:0] flat_t;
  typedef logic [575:0]  blk_t;
  typedef logic [511:0]  dig_t;
  typedef u64            arr_t [5][5];
  typedef byte unsigned  msg_t [$];

  localparam u64 RC_REF [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808a, 64'h8000000080008000,
    64'h000000000000808b, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008a, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000a,
    64'h000000008000808b, 64'h800000000000008b, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800a, 64'h800000008000000a,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  // ROT_REF[x][y]
  localparam int ROT_REF [5][5] = '{
    '{ 0, 36,  3, 41, 18}, '{ 1, 44, 10, 45,  2}, '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56}, '{27, 20, 39,  8, 14}};

  // Lane 0 of Keccak-f[1600] applied to the all-zero state.
  localparam u64 ZERO_PERM_LANE0 = 64'hf1258f7940e1dde7;

  // Known answers: Keccak-512 of bytes 0,1,2,...,n-1.
  localparam int   KAT_N   = 8;
  localparam int   KAT_LEN [KAT_N] = '{0, 1, 7, 8, 71, 72, 143, 200};
  localparam dig_t KAT_DIG [KAT_N] = '{
    512'h92eb3c4cde42ab0eb246e7ffac91fc350ec6b766c3a8299c04436af366c4674e7679d8f9caa90fc0b41367e0cb9b46ba16fb6927ef91f0350e6870363db3da0c,
    512'h4bc452444ba4f0401c861f41491b40af687dbe87ba16c7aa44ecfc14117f759469b5ca4bf4a9d4a4d0e91f766e67bcfad6719c5d1d19dd9753150767e8b35062,
    512'h4a4a4da03c98551e23ea889086dab9036acd63450cc7602abd6948d7c4e548796739a850a204945a55671761fcd3af8a6515438cc526d629fcab260cbf22e2b7,
    512'ha518b42bdb9928d335a38db0d254727b78013cccc6d0cfdb7383dae5bfbdf860b4f4465b94c5953c2499d2c6ff1a58d0387602f1689038c36906a058ed116096,
    512'hd7fedfaff95309fee6f00f59c26497ffa6dc2de489061baf7126cedd03f06e8d1771d5e6d2e006b890e9e26661ad75bb5845897f6a2b66ca15aeab9e4508534f,
    512'h534085903623fa761134f331286afe4510e25610116bee3bb41a7c6ef52a0872e0885fdbdb588845c9104365ca386dd8974f1f9c311207a3279546c03a9ffe83,
    512'h194193e72ed73552e7240d5a5677381bd196757c655287ac5f60ae8fc05ebb5fe2414586f963c8c32fc83ec50d1e9856f08f1f203958c57b99a1189d418da300,
    512'hf861b9621bd852f43780e7cb28823f02e029efdc9dc4369b53ccc230a901fbdf24d2f0e36aed94a684814a8155bef1a28aa4f4cd6bd5901bfc14dc328a253f63};

  function automatic u64 rol(u64 v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic arr_t to_arr(flat_t f);
    arr_t a;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) a[x][y] = f[64*(5*y+x) +: 64];
    return a;
  endfunction

  function automatic flat_t to_flat(arr_t a);
    flat_t f;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) f[64*(5*y+x) +: 64] = a[x][y];
    return f;
  endfunction

  function automatic flat_t theta(flat_t f);
    arr_t a = to_arr(f);
    u64 c [5];
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) a[x][y] ^= c[(x+4)%5] ^ rol(c[(x+1)%5], 1);
    return to_flat(a);
  endfunction

  function automatic flat_t rho_pi(flat_t f);
    arr_t a = to_arr(f);
    arr_t b;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) b[y][(2*x+3*y)%5] = rol(a[x][y], ROT_REF[x][y]);
    return to_flat(b);
  endfunction

  function automatic flat_t chi(flat_t f);
    arr_t a = to_arr(f);
    arr_t b;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) b[x][y] = a[x][y] ^ (~a[(x+1)%5][y] & a[(x+2)%5][y]);
    return to_flat(b);
  endfunction

  function automatic flat_t iota(flat_t f, u64 rc);
    f[63:0] ^= rc;
    return f;
  endfunction

  function automatic flat_t round_fn(flat_t f, int r);
    return iota(chi(rho_pi(theta(f))), RC_REF[r]);
  endfunction

  function automatic flat_t permute(flat_t f);
    for (int r = 0; r < 24; r++) f = round_fn(f, r);
    return f;
  endfunction

  // XOR a padded block into the first nine lanes.
  function automatic flat_t absorb(flat_t f, blk_t b);
    for (int i = 0; i < 9; i++) f[64*i +: 64] ^= b[575-64*i -: 64];
    return f;
  endfunction

  // Padded blocks of a message (pad10*1 on bytes: 0x01 ... 0x80).
  function automatic void pad_blocks(msg_t m, ref blk_t blocks [$]);
    byte unsigned p [$];
    blk_t b;
    p = m;
    p.push_back(8'h01);
    while (p.size() % 72 != 0) p.push_back(8'h00);
    p[p.size()-1] |= 8'h80;
    blocks.delete();
    for (int k = 0; k < p.size() / 72; k++) begin
      for (int i = 0; i < 9; i++)
        for (int j = 0; j < 8; j++) b[512-64*i+8*j +: 8] = p[72*k + 8*i + j];
      blocks.push_back(b);
    end
  endfunction

  function automatic dig_t truncate(flat_t f);
    dig_t d;
    for (int i = 0; i < 8; i++) d[511-64*i -: 64] = f[64*i +: 64];
    return d;
  endfunction

  function automatic dig_t hash(msg_t m);
    blk_t  blocks [$];
    flat_t s = '0;
    pad_blocks(m, blocks);
    foreach (blocks[k]) s = permute(absorb(s, blocks[k]));
    return truncate(s);
  endfunction

  function automatic msg_t counting_msg(int n);
    msg_t m;
    for (int j = 0; j < n; j++) m.push_back(8'(j));
    return m;
  endfunction

  function automatic msg_t random_msg(int n);
    msg_t m;
    for (int j = 0; j < n; j++) m.push_back(8'($urandom));
    return m;
  endfunction

  function automatic flat_t random_state();
    flat_t f;
    for (int i = 0; i < 50; i++) f[32*i +: 32] = $urandom;
    return f;
  endfunction

endpackage
