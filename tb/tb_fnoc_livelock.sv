// tb_fnoc_livelock: the live-lock scenario on the 4x4 Fortified-NoC with the
// evaluation Trojan in corner router 15 (x=3, y=3) in live-lock mode: it
// turns north-bound packets west and clears what it takes for tail bits.
// Bit-complement flows 12->3, 13->2 and 15->0 run, first with the Trojan
// idle, then with it active. Checked: every message arrives intact in both
// runs; with the Trojan active, router 14's east direction register is set
// and router 14 deflects packets for node 3 away from router 15 (north,
// through router 10).
module tb_fnoc_livelock;
  import fnoc_pkg::*;
  localparam int NODES = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic [1:0]  psel;
  logic        ht_en;
  ht_mode_e    ht_mode;
  logic        tx_valid [NODES];
  logic        tx_ready [NODES];
  addr_t       tx_dst   [NODES];
  logic [63:0] tx_data  [NODES][MSG_WORDS];
  logic        rx_valid [NODES];
  addr_t       rx_src   [NODES];
  logic [63:0] rx_data  [NODES][MSG_WORDS];
  logic        rx_len_err [NODES];
  logic [4:1]  news [NODES];
  logic        ev_err [NODES], ev_defl [NODES], ev_drop [NODES], ev_hit [NODES];

  fortified_noc #(.TROJAN_NODE(15)) dut (
    .clk, .rst_n, .pattern_sel(psel), .ht_enable(ht_en), .ht_mode(ht_mode),
    .tx_valid, .tx_ready, .tx_dst, .tx_data, .rx_valid, .rx_src, .rx_data, .rx_len_err,
    .news, .ev_err_det(ev_err), .ev_deflect(ev_defl), .ev_drop(ev_drop), .ev_ht_hit(ev_hit));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  localparam int SRCS [3] = '{12, 13, 15};
  localparam int DSTS [3] = '{3, 2, 0};

  logic [63:0] expect_w [3][$];
  int n_ok, n_bad, c_hit, c_det, defl14, r10_traffic;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) begin
      int d;
      d = DSTS[k];
      if (rx_valid[d]) begin
        int hit;
        hit = -1;
        // packets may overtake each other once some are detoured
        if (rx_src[d] == 4'(SRCS[k]))
          foreach (expect_w[k][j]) if (hit < 0 && rx_data[d][0] == expect_w[k][j]) hit = j;
        if (hit >= 0) begin
          n_ok++;
          expect_w[k].delete(hit);
        end else n_bad++;
      end
    end
    for (int n = 0; n < NODES; n++) begin
      if (ev_hit[n]) c_hit++;
      if (ev_err[n]) c_det++;
    end
    if (ev_defl[14]) defl14++;
  end

  task automatic run(int per_src, int max_cycles);
    int sent [3];
    int c;
    for (int k = 0; k < 3; k++) sent[k] = 0;
    c = 0;
    while (c < max_cycles) begin
      bit done;
      @(posedge clk);
      c++;
      done = 1;
      for (int k = 0; k < 3; k++) begin
        int s;
        s = SRCS[k];
        if (tx_valid[s] && tx_ready[s]) begin
          expect_w[k].push_back(tx_data[s][0]);
          sent[k]++;
          tx_valid[s] <= 1'b0;
        end else if (!tx_valid[s] && sent[k] < per_src && ($urandom_range(0, 7) == 0)) begin
          tx_valid[s]   <= 1'b1;
          tx_dst[s]     <= addr_t'(DSTS[k]);
          tx_data[s][0] <= {$urandom, $urandom};
        end
        if (sent[k] < per_src || expect_w[k].size() > 0) done = 0;
      end
      if (done) break;
    end
  endtask

  initial begin
    for (int n = 0; n < NODES; n++) begin
      tx_valid[n] = 0; tx_dst[n] = '0;
      for (int w = 0; w < MSG_WORDS; w++) tx_data[n][w] = '0;
    end
    n_ok = 0; n_bad = 0; c_hit = 0; c_det = 0; defl14 = 0;
    ht_en = 0; ht_mode = HT_LLT; psel = 2'd2;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Trojan idle
    run(10, 6000);
    chk(n_ok == 30 && n_bad == 0, $sformatf("idle Trojan: %0d of 30 delivered, %0d bad", n_ok, n_bad));
    chk(defl14 == 0 && news[14] == 0, "idle Trojan: no alarm");

    // Trojan active
    n_ok = 0; n_bad = 0;
    ht_en = 1;
    run(20, 20000);
    $display("live-lock: delivered=%0d bad=%0d pending=%0d/%0d/%0d payload=%0d detected=%0d news14=%b deflected_at_14=%0d",
             n_ok, n_bad, expect_w[0].size(), expect_w[1].size(), expect_w[2].size(), c_hit, c_det, news[14], defl14);
    chk(c_hit > 0, "Trojan payload applied");
    chk(news[14][DIR_EAST], "router 14 flags router 15");
    chk(defl14 > 0, "router 14 steers packets away from router 15");
    chk(n_ok == 60 && n_bad == 0, $sformatf("active Trojan: %0d of 60 delivered, %0d bad", n_ok, n_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
