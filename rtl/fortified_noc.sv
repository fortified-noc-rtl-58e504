// fortified_noc: top level of the Fortified-NoC, a 2D mesh of X_DIM x Y_DIM
// tiles (4 x 4 by default). Each tile has a fnoc_router and a secure_core_if
// (encryption, network interface, decryption); the processing nodes
// themselves are outside and connect through the tx_* / rx_* ports, one
// entry per node id = 4*y + x (y grows southwards).
// Router links: north port of (x,y) <-> south port of (x,y-1), east port of
// (x,y) <-> west port of (x+1,y). Ports on the mesh edge are tied off (no
// flit in, always ready out).
// The router at TROJAN_NODE (router 10, tile x=2 y=2, as in the evaluation
// setup) carries the hw_trojan evaluation model; it does nothing while
// ht_enable is low or ht_mode is HT_NONE. Set TROJAN_NODE to 16 or more for a
// mesh without it. pattern_sel selects the shuffle pattern used inside every
// router. Status outputs per node: the routers' Trojan direction registers
// and one-cycle event pulses (altered flit detected on leaving a router,
// head flit deflected from its XY route, stray flit discarded, Trojan
// payload applied). Tile addresses are 2+2 bits, so X_DIM, Y_DIM <= 4.
module fortified_noc
  import fnoc_pkg::*;
#(
  parameter int unsigned X_DIM       = 4,
  parameter int unsigned Y_DIM       = 4,
  parameter int unsigned BUF_DEPTH   = 8,
  parameter int unsigned OBUF_DEPTH  = 2,
  parameter int unsigned TROJAN_NODE = 10,
  parameter int unsigned TRIG_COUNT  = 4,
  parameter logic [15:0] SECURE_MASK = 16'h33CC,
  localparam int unsigned NODES      = X_DIM * Y_DIM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PSEL_W-1:0] pattern_sel,
  input  logic              ht_enable,
  input  ht_mode_e          ht_mode,
  // processing nodes
  input  logic              tx_valid [NODES],
  output logic              tx_ready [NODES],
  input  addr_t             tx_dst   [NODES],
  input  logic [63:0]       tx_data  [NODES][MSG_WORDS],
  output logic              rx_valid [NODES],
  output addr_t             rx_src   [NODES],
  output logic [63:0]       rx_data  [NODES][MSG_WORDS],
  output logic              rx_len_err [NODES],
  // status
  output logic [4:1]        news     [NODES],
  output logic              ev_err_det [NODES],
  output logic              ev_deflect [NODES],
  output logic              ev_drop    [NODES],
  output logic              ev_ht_hit  [NODES]
);
  logic  r_in_valid  [NODES][N_PORTS];
  flit_t r_in_flit   [NODES][N_PORTS];
  logic  r_in_ready  [NODES][N_PORTS];
  logic  r_out_valid [NODES][N_PORTS];
  flit_t r_out_flit  [NODES][N_PORTS];
  logic  r_out_ready [NODES][N_PORTS];

  for (genvar y = 0; y < Y_DIM; y++) begin : g_y
    for (genvar x = 0; x < X_DIM; x++) begin : g_x
      localparam int unsigned ID = y * X_DIM + x;
      logic [N_PORTS-1:0] e_err, e_def, e_drop, e_hit;

      fnoc_router #(
        .X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH), .OBUF_DEPTH(OBUF_DEPTH),
        .HAS_TROJAN(ID == TROJAN_NODE), .TRIG_COUNT(TRIG_COUNT)
      ) u_router (
        .clk, .rst_n, .pattern_sel,
        .in_valid(r_in_valid[ID]), .in_flit(r_in_flit[ID]), .in_ready(r_in_ready[ID]),
        .out_valid(r_out_valid[ID]), .out_flit(r_out_flit[ID]), .out_ready(r_out_ready[ID]),
        .ht_enable, .ht_mode,
        .news(news[ID]), .err_det(e_err), .deflect(e_def), .drop(e_drop), .ht_hit(e_hit)
      );

      assign ev_err_det[ID] = |e_err;
      assign ev_deflect[ID] = |e_def;
      assign ev_drop[ID]    = |e_drop;
      assign ev_ht_hit[ID]  = |e_hit;

      secure_core_if #(.NODE_ID(addr_t'(ID)), .SECURE_MASK(SECURE_MASK)) u_core (
        .clk, .rst_n,
        .tx_valid(tx_valid[ID]), .tx_ready(tx_ready[ID]), .tx_dst(tx_dst[ID]), .tx_data(tx_data[ID]),
        .rx_valid(rx_valid[ID]), .rx_src(rx_src[ID]), .rx_data(rx_data[ID]), .rx_len_err(rx_len_err[ID]),
        .lo_valid(r_in_valid[ID][DIR_LOCAL]), .lo_ready(r_in_ready[ID][DIR_LOCAL]),
        .lo_flit(r_in_flit[ID][DIR_LOCAL]),
        .li_valid(r_out_valid[ID][DIR_LOCAL]), .li_ready(r_out_ready[ID][DIR_LOCAL]),
        .li_flit(r_out_flit[ID][DIR_LOCAL])
      );

      // north side
      if (y > 0) begin : g_n
        assign r_in_valid[ID][DIR_NORTH]  = r_out_valid[ID-X_DIM][DIR_SOUTH];
        assign r_in_flit[ID][DIR_NORTH]   = r_out_flit[ID-X_DIM][DIR_SOUTH];
        assign r_out_ready[ID][DIR_NORTH] = r_in_ready[ID-X_DIM][DIR_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[ID][DIR_NORTH]  = 1'b0;
        assign r_in_flit[ID][DIR_NORTH]   = '0;
        assign r_out_ready[ID][DIR_NORTH] = 1'b1;
      end
      // south side
      if (y < Y_DIM - 1) begin : g_s
        assign r_in_valid[ID][DIR_SOUTH]  = r_out_valid[ID+X_DIM][DIR_NORTH];
        assign r_in_flit[ID][DIR_SOUTH]   = r_out_flit[ID+X_DIM][DIR_NORTH];
        assign r_out_ready[ID][DIR_SOUTH] = r_in_ready[ID+X_DIM][DIR_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[ID][DIR_SOUTH]  = 1'b0;
        assign r_in_flit[ID][DIR_SOUTH]   = '0;
        assign r_out_ready[ID][DIR_SOUTH] = 1'b1;
      end
      // east side
      if (x < X_DIM - 1) begin : g_e
        assign r_in_valid[ID][DIR_EAST]  = r_out_valid[ID+1][DIR_WEST];
        assign r_in_flit[ID][DIR_EAST]   = r_out_flit[ID+1][DIR_WEST];
        assign r_out_ready[ID][DIR_EAST] = r_in_ready[ID+1][DIR_WEST];
      end else begin : g_e_edge
        assign r_in_valid[ID][DIR_EAST]  = 1'b0;
        assign r_in_flit[ID][DIR_EAST]   = '0;
        assign r_out_ready[ID][DIR_EAST] = 1'b1;
      end
      // west side
      if (x > 0) begin : g_w
        assign r_in_valid[ID][DIR_WEST]  = r_out_valid[ID-1][DIR_EAST];
        assign r_in_flit[ID][DIR_WEST]   = r_out_flit[ID-1][DIR_EAST];
        assign r_out_ready[ID][DIR_WEST] = r_in_ready[ID-1][DIR_EAST];
      end else begin : g_w_edge
        assign r_in_valid[ID][DIR_WEST]  = 1'b0;
        assign r_in_flit[ID][DIR_WEST]   = '0;
        assign r_out_ready[ID][DIR_WEST] = 1'b1;
      end
    end
  end
endmodule
