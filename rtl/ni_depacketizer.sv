// ni_depacketizer: receive side of a network interface.
// Collects the flits of a packet from the router's local output and checks
// it: a packet is delivered only if it starts with a head flit and its tail
// flit arrives exactly as the flit number given by the head's packet length
// field (PL). A head flit arriving inside a packet abandons the previous
// one, a flit count past PL or a tail too early discards the packet
// (len_err pulse), and body flits with no packet open are ignored. The
// payload mapping is the inverse of ni_packetizer. flit_ready is always
// high; msg_valid pulses for one cycle with the source, the packet's NF/Tr
// view is not used. The error handling is this design's choice.
module ni_depacketizer
  import fnoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flit_valid,
  output logic        flit_ready,
  input  flit_t       flit,
  output logic        msg_valid,
  output addr_t       msg_src,
  output addr_t       msg_dst,
  output logic [63:0] msg_data [MSG_WORDS],
  output logic        len_err
);
  logic [PKT_PAY-1:0] pay;
  logic               open_q;
  logic [3:0]         cnt;       // flits received so far
  logic [3:0]         pl_q;

  assign flit_ready = 1'b1;

  for (genvar w = 0; w < MSG_WORDS; w++) begin : g_w
    assign msg_data[w] = pay[64*w +: 64];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    int base;
    if (!rst_n) begin
      pay       <= '0;
      open_q    <= 1'b0;
      cnt       <= '0;
      pl_q      <= '0;
      msg_valid <= 1'b0;
      msg_src   <= '0;
      msg_dst   <= '0;
      len_err   <= 1'b0;
    end else begin
      msg_valid <= 1'b0;
      len_err   <= 1'b0;
      if (flit_valid) begin
        if (flit[H_BIT]) begin
          if (open_q) len_err <= 1'b1;          // previous packet abandoned
          pay                 <= '0;
          pay[0 +: HEAD_PAY]  <= flit[44:2];
          msg_src             <= flit[SRC_LSB +: 4];
          msg_dst             <= flit[DST_LSB +: 4];
          pl_q                <= flit[PL_LSB +: 4];
          cnt                 <= 4'd1;
          open_q              <= !flit[T_BIT];
          if (flit[T_BIT]) begin
            if (flit[PL_LSB +: 4] == 4'd1) msg_valid <= 1'b1;
            else                           len_err   <= 1'b1;
          end
        end else if (open_q) begin
          cnt <= cnt + 1'b1;
          if (cnt < 4'(PKT_FLITS)) begin
            base = HEAD_PAY + (int'(cnt) - 1) * BODY_PAY;
            pay[base +: 12]      <= flit[61:50];
            pay[base + 12 +: 44] <= flit[44:1];
          end
          if (flit[T_BIT]) begin
            open_q <= 1'b0;
            if (cnt + 1'b1 == pl_q) msg_valid <= 1'b1;
            else                    len_err   <= 1'b1;
          end else if (cnt + 1'b1 >= pl_q) begin
            open_q  <= 1'b0;                    // no tail where PL says
            len_err <= 1'b1;
          end
        end
      end
    end
  end
endmodule
