// fnoc_router: five-port wormhole router of the Fortified-NoC.
// Ports are numbered as dir_e: 0 local, 1 north, 2 east, 3 south, 4 west.
//
// Flit path through the router:
//   input link -> security_encoder (Hamming parity + EDS shuffle)
//   -> input buffer (flit_fifo, BUF_DEPTH) -> address_extractor -> TCRA route
//   computer -> per-output round-robin arbiter and crossbar (Tr cleared, NF of
//   a head flit updated) -> output buffer (flit_fifo, OBUF_DEPTH)
//   -> security_decoder (de-shuffle, ED, EC, TE sets Tr) -> output link.
// Flits stay shuffled while they are stored inside the router, which is
// where a Trojan planted in a buffer would act. The Tr checker looks at the
// flit waiting at each of the four neighbour inputs: Tr set means the
// neighbour on that side altered it, and the matching NEWS register is set;
// the route computer then steers packets around that neighbour.
//
// Links use valid/ready: a flit moves when valid and ready are both high;
// in_ready is "input buffer not full". A packet holds its output from the
// head flit until its tail flit has passed (wormhole). Minimum latency is
// two clock cycles per router (input and output buffer registers).
//
// Recovery rules for flits a Trojan has damaged:
//  - lost head: a non-head flit reaching an idle input is discarded;
//  - lost tail: a head flit reaching an input still inside a packet closes
//    the old packet and releases its output first;
//  - idle release: an input that stays empty for IDLE_LIMIT cycles inside a
//    packet releases its output, which a packet with a lost tail would
//    otherwise hold for ever;
//  - stall: a head flit not granted its output for STALL_LIMIT cycles is
//    discarded with its packet; this breaks the cyclic waits that routes
//    bent around a suspect router can form under wormhole switching (plain
//    XY routing cannot form them);
//  - hand-back: a packet that a flagged neighbour hands back, addressed to
//    that same neighbour, is discarded whole, so the suspect router cannot
//    trap it in a ping-pong that blocks the links.
// The order of blocks follows the router architecture of the design; the
// output buffer depth, round-robin arbitration, the flow control and the
// recovery rules are this design's choices.
//
// With HAS_TROJAN set, an hw_trojan evaluation model is placed at each input
// buffer read port and route output; it stays idle while ht_enable is low.
module fnoc_router
  import fnoc_pkg::*;
#(
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned OBUF_DEPTH = 2,
  parameter bit          HAS_TROJAN = 1'b0,
  parameter int unsigned TRIG_COUNT = 4,
  parameter int unsigned IDLE_LIMIT  = 128,
  parameter int unsigned STALL_LIMIT = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PSEL_W-1:0] pattern_sel,
  // input links
  input  logic              in_valid [N_PORTS],
  input  flit_t             in_flit  [N_PORTS],
  output logic              in_ready [N_PORTS],
  // output links
  output logic              out_valid [N_PORTS],
  output flit_t             out_flit  [N_PORTS],
  input  logic              out_ready [N_PORTS],
  // evaluation Trojan control
  input  logic              ht_enable,
  input  ht_mode_e          ht_mode,
  // status
  output logic [4:1]        news,          // Trojan direction registers
  output logic [N_PORTS-1:0] err_det,      // an altered flit left on this output
  output logic [N_PORTS-1:0] deflect,      // a head flit left off its XY route
  output logic [N_PORTS-1:0] drop,         // a flit was discarded at this input
  output logic [N_PORTS-1:0] ht_hit        // Trojan payload applied at this input
);
  localparam int unsigned CW  = $clog2(BUF_DEPTH + 1);
  localparam int unsigned OCW = $clog2(OBUF_DEPTH + 1);

  // ------------------------------------------------------------ inputs
  flit_t      enc_flit [N_PORTS];
  flit_t      buf_raw  [N_PORTS];
  flit_t      buf_flit [N_PORTS];
  logic       buf_full [N_PORTS];
  logic       buf_empty[N_PORTS];
  logic       buf_pop  [N_PORTS];
  logic [CW-1:0] buf_cnt [N_PORTS];

  logic       f_head [N_PORTS];
  logic       f_tail [N_PORTS];
  addr_t      f_dst  [N_PORTS];
  logic       f_nf   [N_PORTS];
  logic       f_tr   [N_PORTS];
  dir_e       rc_dir [N_PORTS];
  dir_e       xy_dir [N_PORTS];
  dir_e       rt_dir [N_PORTS];
  logic       rc_nf  [N_PORTS];

  logic [4:1] news_eff;
  logic [4:1] tr_present, tr_bit;

  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    addr_t       unused_src;
    logic [3:0]  unused_pl;
    logic        xy_nf_unused;

    security_encoder u_senc (.sel(pattern_sel), .flit_in(in_flit[i]), .flit_out(enc_flit[i]));

    assign in_ready[i] = !buf_full[i];

    flit_fifo #(.W(FLIT_W), .DEPTH(BUF_DEPTH)) u_ibuf (
      .clk, .rst_n,
      .push (in_valid[i] && !buf_full[i]),
      .din  (enc_flit[i]),
      .pop  (buf_pop[i]),
      .dout (buf_raw[i]),
      .full (buf_full[i]),
      .empty(buf_empty[i]),
      .count(buf_cnt[i])
    );

    address_extractor u_aext (
      .sel(pattern_sel), .flit(buf_flit[i]),
      .head(f_head[i]), .tail(f_tail[i]), .src(unused_src), .dst(f_dst[i]),
      .pl(unused_pl), .nf(f_nf[i]), .tr(f_tr[i])
    );

    tcra_route u_tcra (
      .lx(2'(X)), .ly(2'(Y)), .dx(f_dst[i][1:0]), .dy(f_dst[i][3:2]),
      .nf_in(f_nf[i]), .news(news_eff), .dir(rc_dir[i]), .nf_out(rc_nf[i])
    );

    // plain XY route of the same flit, only to report deflections
    tcra_route u_xy (
      .lx(2'(X)), .ly(2'(Y)), .dx(f_dst[i][1:0]), .dy(f_dst[i][3:2]),
      .nf_in(1'b0), .news(4'b0000), .dir(xy_dir[i]), .nf_out(xy_nf_unused)
    );

    if (HAS_TROJAN) begin : g_ht
      hw_trojan #(.LOCAL_ADDR(addr_t'(4*Y + X)), .TRIG_COUNT(TRIG_COUNT)) u_ht (
        .clk, .rst_n, .enable(ht_enable), .mode(ht_mode),
        .flit_in(buf_raw[i]), .pop(buf_pop[i]), .flit_out(buf_flit[i]),
        .route_in(rc_dir[i]), .route_out(rt_dir[i]),
        .active(), .tampering(ht_hit[i])
      );
    end else begin : g_noht
      assign buf_flit[i] = buf_raw[i];
      assign rt_dir[i]   = rc_dir[i];
      assign ht_hit[i]   = 1'b0;
    end
  end

  // Tr checker and NEWS registers (neighbour inputs only)
  for (genvar d = 1; d < N_PORTS; d++) begin : g_tr
    assign tr_present[d] = !buf_empty[d];
    assign tr_bit[d]     = f_tr[d];
  end

  trojan_dir_regs u_news (
    .clk, .rst_n, .flit_present(tr_present), .flit_tr(tr_bit),
    .news_q(news), .news_eff(news_eff)
  );

  // ------------------------------------------------------------ switching
  logic       act   [N_PORTS];     // input is inside a packet
  dir_e       adir  [N_PORTS];     // output held by that packet
  logic       own_v [N_PORTS];     // output is held
  dir_e       req_dir [N_PORTS];
  logic       req_v   [N_PORTS];
  logic       stray   [N_PORTS];
  logic       uturn   [N_PORTS];     // head handed back by a flagged neighbour, addressed to it
  logic       dropping[N_PORTS];     // discarding the rest of such a packet
  logic       discard [N_PORTS];
  logic       stale   [N_PORTS];     // head flit seen inside an open packet
  logic       idle_to [N_PORTS];     // open packet idle for IDLE_LIMIT cycles
  logic [7:0] idle_cnt[N_PORTS];
  logic       expire  [N_PORTS];     // head waited STALL_LIMIT cycles for its output
  logic [9:0] stall_cnt[N_PORTS];

  logic [N_PORTS-1:0] oreq  [N_PORTS];
  logic [N_PORTS-1:0] ogrant[N_PORTS];
  logic [2:0]         owin  [N_PORTS];
  logic               xfer  [N_PORTS];
  flit_t              xflit [N_PORTS];

  logic       ob_full [N_PORTS];
  logic       ob_empty[N_PORTS];
  flit_t      ob_dout [N_PORTS];
  logic [OCW-1:0] ob_cnt [N_PORTS];
  logic       dec_err [N_PORTS];
  logic       dec_cor [N_PORTS];

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      stale[i]   = !buf_empty[i] && act[i] && f_head[i];
      idle_to[i] = buf_empty[i] && (act[i] || dropping[i]) && (idle_cnt[i] == 8'(IDLE_LIMIT - 1));
      req_dir[i] = act[i] ? adir[i] : rt_dir[i];
      uturn[i]   = !buf_empty[i] && !act[i] && !dropping[i] && f_head[i] && (i != int'(DIR_LOCAL))
                   && news_eff[i] && (rt_dir[i] == dir_e'(i));
      expire[i]  = !buf_empty[i] && !act[i] && !dropping[i] && f_head[i] && !uturn[i]
                   && (stall_cnt[i] == 10'(STALL_LIMIT - 1));
      req_v[i]   = !buf_empty[i] && !dropping[i] && !stale[i] && !expire[i]
                   && (act[i] || (f_head[i] && !uturn[i]));
      stray[i]   = !buf_empty[i] && !act[i] && !dropping[i] && !f_head[i];
      discard[i] = stray[i] || uturn[i] || expire[i] || (dropping[i] && !buf_empty[i]);
    end
    for (int o = 0; o < N_PORTS; o++)
      for (int i = 0; i < N_PORTS; i++)
        oreq[o][i] = req_v[i] && (req_dir[i] == dir_e'(o)) && (act[i] || !own_v[o]);
  end

  for (genvar o = 0; o < N_PORTS; o++) begin : g_out
    rr_arbiter #(.N(N_PORTS)) u_arb (
      .clk, .rst_n, .req(oreq[o]), .advance(xfer[o]),
      .grant(ogrant[o]), .grant_idx(owin[o])
    );

    assign xfer[o] = (|oreq[o]) && !ob_full[o];

    // crossbar: Tr is cleared as the flit leaves the arbiter; a head flit
    // carries the NF value chosen by the route computer
    always_comb begin
      xflit[o] = buf_flit[owin[o]];
      xflit[o][TR_BIT] = 1'b0;
      if (!act[owin[o]]) xflit[o][NF_BIT] = rc_nf[owin[o]];
    end

    flit_fifo #(.W(FLIT_W), .DEPTH(OBUF_DEPTH)) u_obuf (
      .clk, .rst_n,
      .push (xfer[o]),
      .din  (xflit[o]),
      .pop  (out_valid[o] && out_ready[o]),
      .dout (ob_dout[o]),
      .full (ob_full[o]),
      .empty(ob_empty[o]),
      .count(ob_cnt[o])
    );

    security_decoder u_sdec (
      .sel(pattern_sel), .flit_in(ob_dout[o]), .flit_out(out_flit[o]),
      .err_det(dec_err[o]), .err_cor(dec_cor[o])
    );

    assign out_valid[o] = !ob_empty[o];
    assign err_det[o]   = out_valid[o] && out_ready[o] && dec_err[o];
  end

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      buf_pop[i] = discard[i];
      drop[i]    = discard[i];
      deflect[i] = 1'b0;
    end
    for (int o = 0; o < N_PORTS; o++) begin
      if (xfer[o]) begin
        buf_pop[owin[o]] = 1'b1;
        if (!act[owin[o]] && rt_dir[owin[o]] != xy_dir[owin[o]]) deflect[o] = 1'b1;
      end
    end
  end

  // wormhole state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PORTS; i++) begin
        act[i]      <= 1'b0;
        adir[i]     <= DIR_LOCAL;
        own_v[i]    <= 1'b0;
        dropping[i] <= 1'b0;
        idle_cnt[i] <= '0;
        stall_cnt[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N_PORTS; i++) begin
        stall_cnt[i] <= (req_v[i] && !act[i] && !buf_pop[i]) ? stall_cnt[i] + 1'b1 : '0;
        if ((uturn[i] || expire[i]) && !f_tail[i]) dropping[i] <= 1'b1;
        else if (dropping[i] && !buf_empty[i] && f_tail[i]) dropping[i] <= 1'b0;
        idle_cnt[i] <= (buf_empty[i] && (act[i] || dropping[i]) && !idle_to[i]) ? idle_cnt[i] + 1'b1 : '0;
        if (idle_to[i]) dropping[i] <= 1'b0;
        if (stale[i] || (idle_to[i] && act[i])) begin
          act[i]         <= 1'b0;
          own_v[adir[i]] <= 1'b0;
        end
      end
      for (int o = 0; o < N_PORTS; o++) begin
        if (xfer[o]) begin
          if (!act[owin[o]]) begin
            if (!f_tail[owin[o]]) begin
              act[owin[o]]  <= 1'b1;
              adir[owin[o]] <= dir_e'(o);
              own_v[o]      <= 1'b1;
            end
          end else if (f_tail[owin[o]]) begin
            act[owin[o]] <= 1'b0;
            own_v[o]     <= 1'b0;
          end
        end
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid[0] && !out_ready[0] |=> out_valid[0]);
endmodule
