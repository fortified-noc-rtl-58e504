// ni_packetizer: send side of a network interface.
// Accepts one message (destination + MSG_WORDS 64-bit words, already
// encrypted by a trusted core) and emits it as one packet of PKT_FLITS flits
// in the flit format of fnoc_pkg: a head flit (H=1, SRC, DST, PL=PKT_FLITS,
// NF=0, Tr=0) and PKT_FLITS-1 body flits, the last one with T=1. The 256
// message bits are spread over the usable payload bits: head flit bits
// [44:2] (43 bits), then per body flit bits [61:50] (12) and [44:1] (44).
// Payload bits [49:45] of every flit stay zero as the dummy slots that the
// router's Hamming encoder overwrites with parity bits.
// Handshake: msg_ready is high when idle; msg_valid&msg_ready loads the
// message. Flits leave with flit_valid/flit_ready, one per cycle at most.
// The payload mapping is this design's choice.
module ni_packetizer
  import fnoc_pkg::*;
#(
  parameter addr_t NODE_ID = 4'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        msg_valid,
  output logic        msg_ready,
  input  addr_t       msg_dst,
  input  logic [63:0] msg_data [MSG_WORDS],
  output logic        flit_valid,
  input  logic        flit_ready,
  output flit_t       flit
);
  logic [PKT_PAY-1:0] pay;
  addr_t              dst_q;
  logic [2:0]         idx;       // next flit to send
  logic               busy;

  assign msg_ready  = !busy;
  assign flit_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx   <= '0;
      dst_q <= '0;
      pay   <= '0;
    end else if (!busy) begin
      if (msg_valid) begin
        busy  <= 1'b1;
        idx   <= '0;
        dst_q <= msg_dst;
        pay   <= '0;
        for (int w = 0; w < MSG_WORDS; w++) pay[64*w +: 64] <= msg_data[w];
      end
    end else if (flit_ready) begin
      if (idx == 3'(PKT_FLITS-1)) busy <= 1'b0;
      idx <= idx + 1'b1;
    end
  end

  always_comb begin
    int base;
    base = 0;
    flit = '0;
    if (idx == '0) begin
      flit[H_BIT]            = 1'b1;
      flit[T_BIT]            = (PKT_FLITS == 1);
      flit[SRC_LSB +: 4]     = NODE_ID;
      flit[DST_LSB +: 4]     = dst_q;
      flit[PL_LSB +: 4]      = 4'(PKT_FLITS);
      flit[44:2]             = pay[0 +: HEAD_PAY];
    end else begin
      base                   = HEAD_PAY + (int'(idx) - 1) * BODY_PAY;
      flit[T_BIT]            = (idx == 3'(PKT_FLITS-1));
      flit[61:50]            = pay[base +: 12];
      flit[44:1]             = pay[base + 12 +: 44];
    end
  end
endmodule
