// fnoc_pkg: types, flit field positions and constant tables shared by the
// Fortified-NoC modules.
//
// Flit format (64 bits, MSB first, field widths as in the packet format of the
// design; the bit numbering is this design's choice):
//   head flit : H[63] T[62] SRC[61:58] DST[57:54] PL[53:50] DATA[49:2] NF[1] Tr[0]
//   body/tail : H[63] T[62] DATA[61:1] Tr[0]
// The 14 bits [63:50] of every flit (H, T, SRC, DST, PL in a head flit) are
// the "crucial" bits. The router's security encoder puts 5 Hamming parity
// bits into the first payload bits [49:45], which the sending core leaves as
// dummy bits, and shuffles the resulting 19-bit group [63:45].
// Node address: DST/SRC = {y[1:0], x[1:0]}, node id = 4*y + x, with y growing
// southwards and x eastwards.
package fnoc_pkg;

  localparam int FLIT_W  = 64;
  localparam int H_BIT   = 63;
  localparam int T_BIT   = 62;
  localparam int SRC_LSB = 58;
  localparam int DST_LSB = 54;
  localparam int PL_LSB  = 50;
  localparam int NF_BIT  = 1;
  localparam int TR_BIT  = 0;

  // Hamming-protected group: 14 data bits + 5 parity bits = 19 bits at [63:45]
  localparam int N_DATA  = 14;
  localparam int N_PAR   = 5;
  localparam int N_GRP   = N_DATA + N_PAR;
  localparam int GRP_LSB = 45;   // group bit g[i] = flit[GRP_LSB+i]; g[4:0] parity, g[18:5] data

  // Number of shuffle patterns selectable by the pattern selection bits
  localparam int N_PAT   = 4;
  localparam int PSEL_W  = 2;

  // Packet length in flits
  localparam int PKT_FLITS = 5;
  // Usable payload bits per packet: head 43 + 4 x 56 (parity slots excluded)
  localparam int HEAD_PAY  = 43;
  localparam int BODY_PAY  = 56;
  localparam int PKT_PAY   = HEAD_PAY + (PKT_FLITS-1)*BODY_PAY;
  localparam int MSG_WORDS = 4;  // 64-bit data words carried by one packet

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [3:0]        addr_t;

  // Router port numbering
  typedef enum logic [2:0] {
    DIR_LOCAL = 3'd0,
    DIR_NORTH = 3'd1,
    DIR_EAST  = 3'd2,
    DIR_SOUTH = 3'd3,
    DIR_WEST  = 3'd4
  } dir_e;

  localparam int N_PORTS = 5;

  // Attack modes of the evaluation Trojan model
  typedef enum logic [2:0] {
    HT_NONE = 3'd0,
    HT_HBT  = 3'd1,   // head bit Trojan
    HT_DAT  = 3'd2,   // destination address Trojan
    HT_PLT  = 3'd3,   // packet length Trojan
    HT_DLT  = 3'd4,   // data leakage Trojan
    HT_LLT  = 3'd5    // live lock Trojan
  } ht_mode_e;

  // Codeword position (1..19) of group bit i. Parity bits sit at the powers
  // of two, the 14 data bits at the remaining positions in ascending order.
  typedef int grp_int_t [N_GRP];
  localparam grp_int_t CW_POS = '{1, 2, 4, 8, 16, 3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19};

  function automatic int cw_pos(int i);
    return CW_POS[i];
  endfunction

  // Group bits that feed syndrome (and parity) bit j: bit i set when the
  // codeword position of group bit i has bit j set.
  function automatic logic [N_GRP-1:0] syn_mask(int j);
    logic [N_GRP-1:0] m;
    for (int i = 0; i < N_GRP; i++) m[i] = CW_POS[i][j];
    return m;
  endfunction

  // Shuffle patterns: shuffled bit k takes group bit EDS_PAT[p][k]. Each
  // pattern has no fixed point and is chosen so that tampering with any run of
  // 1 to 6 adjacent stored bits leaves a non-zero Hamming syndrome.
  typedef int pat_row_t [N_GRP];
  localparam pat_row_t EDS_PAT [N_PAT] = '{
    '{ 6, 11, 13, 14, 15, 16,  0,  3, 18, 17,  2,  5,  9,  4,  7,  1, 10,  8, 12},
    '{ 5,  7, 17,  4,  0, 13, 15,  2,  6,  3,  8,  1,  9, 16, 12, 11, 14, 18, 10},
    '{14,  9, 18, 16,  2, 17, 13,  6, 10,  0,  4, 12, 11,  5, 15,  1,  7,  8,  3},
    '{ 3,  9, 16, 12,  8,  4,  2, 11,  1,  7,  6, 17, 15, 10, 18,  5, 13,  0, 14}
  };

  // Inverse patterns: group bit g is found at shuffled position EDS_INV[p][g].
  function automatic pat_row_t inv_pat(int p);
    pat_row_t r;
    for (int k = 0; k < N_GRP; k++) r[EDS_PAT[p][k]] = k;
    return r;
  endfunction

  // Sixteen 4-bit S-boxes, nibble x of entry s holds S_s(x). Every one is a
  // bijection with S(x) != x (no fixed point) and S(x) != ~x (no opposite point).
  localparam logic [63:0] SBOX_TAB [16] = '{
    64'hb3a457d61f298c0e, 64'hac187b2035fd9e46, 64'hbd76584af1e30c92, 64'hab429f1065d38ec7,
    64'heac21fd0678594b3, 64'h8d42605abe97f13c, 64'hbd15a7e2c40863f9, 64'h86157e2b3ad0f94c,
    64'h4031d92ac86feb57, 64'h19f4d8063e2a5bc7, 64'h5d3f8c74b1209ea6, 64'h9284e6fa30b517dc,
    64'h301d28796ae5b4fc, 64'hb8369ed21540af7c, 64'ha876ef2c1b0943d5, 64'h1d95fc8ab0e72463
  };

  // P-box key of a core: bit i of the input moves to bit (i*mult + add) mod 64.
  typedef struct packed {
    logic [5:0] mult;   // odd, so the map is a bijection
    logic [5:0] add;
  } pkey_t;

  function automatic pkey_t core_key(int id);
    pkey_t k;
    k.mult = 6'((2 * ((id * 7 + 3) % 32)) + 1);
    k.add  = 6'((id * 13 + 5) % 64);
    return k;
  endfunction

endpackage
