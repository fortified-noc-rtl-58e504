// secure_core_if: the core side of one tile: encryption, network interface
// and decryption between a processing node and its router.
// Send: a message of MSG_WORDS 64-bit words is encrypted word by word with
// this core's P-box key and S-boxes when both this tile and the destination
// tile are trusted (bit set in SECURE_MASK), otherwise sent as is, and handed
// to ni_packetizer. Receive: ni_depacketizer rebuilds the message; if source
// and this tile are trusted, it is decrypted with the source core's key.
// Received messages appear for one cycle on rx_valid, one cycle after the
// tail flit. Which tiles are trusted comes from the secure clans of the
// evaluation setup; the key schedule and the rule that only trusted pairs
// encrypt are this design's choices.
module secure_core_if
  import fnoc_pkg::*;
#(
  parameter addr_t       NODE_ID     = 4'd0,
  parameter logic [15:0] SECURE_MASK = 16'h33CC
) (
  input  logic        clk,
  input  logic        rst_n,
  // processing node side
  input  logic        tx_valid,
  output logic        tx_ready,
  input  addr_t       tx_dst,
  input  logic [63:0] tx_data [MSG_WORDS],
  output logic        rx_valid,
  output addr_t       rx_src,
  output logic [63:0] rx_data [MSG_WORDS],
  output logic        rx_len_err,
  // router local port
  output logic        lo_valid,
  input  logic        lo_ready,
  output flit_t       lo_flit,
  input  logic        li_valid,
  output logic        li_ready,
  input  flit_t       li_flit
);
  localparam bit SELF_SECURE = SECURE_MASK[NODE_ID];

  logic [63:0] enc_data [MSG_WORDS];
  logic [63:0] tx_word  [MSG_WORDS];
  logic [63:0] dep_data [MSG_WORDS];
  logic [63:0] dec_data [MSG_WORDS];
  logic        dep_valid;
  addr_t       dep_src;
  addr_t       dep_dst;
  logic        tx_enc, rx_dec;
  pkey_t       src_key;

  assign tx_enc  = SELF_SECURE && SECURE_MASK[tx_dst];
  assign rx_dec  = SELF_SECURE && SECURE_MASK[dep_src];

  always_comb begin
    src_key = '0;
    for (int n = 0; n < 16; n++)
      if (dep_src == 4'(n)) src_key = core_key(n);
  end

  for (genvar w = 0; w < MSG_WORDS; w++) begin : g_word
    flit_encryptor u_enc (.key(core_key(int'(NODE_ID))), .plain(tx_data[w]), .cipher(enc_data[w]));
    flit_decryptor u_dec (.key(src_key), .cipher(dep_data[w]), .plain(dec_data[w]));
    assign tx_word[w] = tx_enc ? enc_data[w] : tx_data[w];
    assign rx_data[w] = rx_dec ? dec_data[w] : dep_data[w];
  end

  ni_packetizer #(.NODE_ID(NODE_ID)) u_pkt (
    .clk, .rst_n, .msg_valid(tx_valid), .msg_ready(tx_ready), .msg_dst(tx_dst),
    .msg_data(tx_word), .flit_valid(lo_valid), .flit_ready(lo_ready), .flit(lo_flit)
  );

  ni_depacketizer u_dpk (
    .clk, .rst_n, .flit_valid(li_valid), .flit_ready(li_ready), .flit(li_flit),
    .msg_valid(dep_valid), .msg_src(dep_src), .msg_dst(dep_dst), .msg_data(dep_data),
    .len_err(rx_len_err)
  );

  assign rx_valid = dep_valid;
  assign rx_src   = dep_src;
endmodule
