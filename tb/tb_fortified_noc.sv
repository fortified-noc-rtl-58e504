// tb_fortified_noc: end-to-end test of the 4x4 Fortified-NoC at its default
// parameters (evaluation Trojan in router 10).
// Traffic is bit-complement (node i sends to node 15-i) mixed with uniform
// random destinations. Each message carries a tag {A5, src, dst, seq} in its
// first word; the receiving monitor looks the tag up among the sent
// messages and checks the whole message.
// Phases, each after a reset, with a different shuffle pattern:
//   0  no Trojan: every message arrives intact at its destination, none is
//      readable elsewhere; an isolated 0->3 message takes 2*4+5 = 13 cycles.
//   1..4  head bit, destination address, packet length and data leakage
//      Trojans active in router 10: altered flits are detected, the
//      neighbours' direction registers point at router 10, later packets
//      are steered around it, and the last traffic round (after isolation)
//      is delivered completely and intact. Messages from trusted cores that
//      reach a wrong node are never readable there. Earlier rounds may lose
//      or garble messages (multi-bit changes are detected but not always
//      corrected, and stalled packets are discarded); at least half of all
//      messages of a phase must arrive intact.
// Mechanism counters (Trojan payload applied, alteration detected,
// direction register set, deflection, shuffle pattern switch, encrypted
// message) must each be non-zero over the run; discarded flits are counted
// and reported.
module tb_fortified_noc;
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

  fortified_noc dut (
    .clk, .rst_n, .pattern_sel(psel), .ht_enable(ht_en), .ht_mode(ht_mode),
    .tx_valid, .tx_ready, .tx_dst, .tx_data, .rx_valid, .rx_src, .rx_data, .rx_len_err,
    .news, .ev_err_det(ev_err), .ev_deflect(ev_defl), .ev_drop(ev_drop), .ev_ht_hit(ev_hit));

  always #5 clk = ~clk;

  localparam logic [15:0] SECURE = 16'h33CC;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---------------------------------------------------------------- traffic
  typedef struct {
    int          dst;
    logic [63:0] w [MSG_WORDS];
    longint      t_sent;
    int          round;
  } msg_t;

  msg_t   sent_db [int];          // key = src*65536 + seq
  int     seq     [NODES];
  int     sent_n  [NODES];
  int     gap     [NODES];
  int     rounds_target;
  bit     running;
  int     cur_round;
  bit     uniform_mix;

  int n_ok, n_garbled, n_misdeliv, n_leak_readable, n_late_bad, n_lenerr;
  int c_hit, c_err, c_defl, c_drop, c_news, c_enc, c_psel;
  longint lat_sum;

  always @(posedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      if (!rst_n) begin
        tx_valid[n] <= 1'b0;
        gap[n]      <= 0;
      end else if (tx_valid[n] && tx_ready[n]) begin
        msg_t m;
        m.dst = int'(tx_dst[n]);
        m.w = tx_data[n];
        m.t_sent = $time;
        m.round = sent_n[n];
        sent_db[n * 65536 + seq[n]] = m;
        if (SECURE[n] && SECURE[m.dst]) c_enc++;
        seq[n]++;
        sent_n[n]++;
        tx_valid[n] <= 1'b0;
        gap[n] <= $urandom_range(0, 30);
      end else if (!tx_valid[n] && running && sent_n[n] < rounds_target) begin
        if (gap[n] > 0) gap[n] <= gap[n] - 1;
        else begin
          int d;
          d = (uniform_mix && ($urandom_range(0, 3) == 0)) ? $urandom_range(0, 15) : 15 - n;
          if (d == n) d = 15 - n;
          tx_valid[n]   <= 1'b1;
          tx_dst[n]     <= addr_t'(d);
          tx_data[n][0] <= {8'hA5, 4'(n), 4'(d), 16'(seq[n]), $urandom};
          for (int w = 1; w < MSG_WORDS; w++) tx_data[n][w] <= {$urandom, $urandom};
        end
      end
    end
  end

  // receive monitor
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (rx_valid[n]) begin
        logic [63:0] w0;
        int key, s;
        w0 = rx_data[n][0];
        s = int'(w0[55:52]);
        key = s * 65536 + int'(w0[47:32]);
        if (w0[63:56] == 8'hA5 && sent_db.exists(key) && sent_db[key].w == rx_data[n]) begin
          if (sent_db[key].dst == n) begin
            n_ok++;
            lat_sum += ($time - sent_db[key].t_sent) / 10;
          end else begin
            n_misdeliv++;
            if (SECURE[s]) n_leak_readable++;
            if (sent_db[key].round >= rounds_target - 1) n_late_bad++;
          end
          sent_db.delete(key);
        end else begin
          n_garbled++;
        end
      end
      if (rx_len_err[n]) n_lenerr++;
      if (ev_hit[n])  c_hit++;
      if (ev_err[n])  c_err++;
      if (ev_defl[n]) c_defl++;
      if (ev_drop[n]) c_drop++;
    end
  end

  task automatic reset_net(logic [1:0] pat);
    running = 0;
    rst_n = 0;
    psel = pat;
    c_psel++;
    for (int n = 0; n < NODES; n++) begin seq[n] = 0; sent_n[n] = 0; end
    sent_db.delete();
    n_ok = 0; n_garbled = 0; n_misdeliv = 0; n_leak_readable = 0; n_late_bad = 0; n_lenerr = 0;
    lat_sum = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  task automatic run_traffic(int rounds, int max_cycles);
    int c, idle;
    rounds_target = rounds;
    running = 1;
    c = 0; idle = 0;
    while (c < max_cycles) begin
      bit all_sent;
      @(posedge clk); c++;
      all_sent = 1;
      for (int n = 0; n < NODES; n++) if (sent_n[n] < rounds || tx_valid[n]) all_sent = 0;
      if (all_sent) idle++;
      if (all_sent && (sent_db.size() == 0 || idle > 600)) break;
    end
    running = 0;
  endtask

  function automatic int news_count();
    int k;
    k = 0;
    for (int n = 0; n < NODES; n++) k += $countones(news[n]);
    return k;
  endfunction

  // ------------------------------------------------------------------ body
  initial begin
    int total_ok;
    for (int n = 0; n < NODES; n++) begin
      tx_valid[n] = 0; tx_dst[n] = '0;
      for (int w = 0; w < MSG_WORDS; w++) tx_data[n][w] = '0;
    end
    c_hit = 0; c_err = 0; c_defl = 0; c_drop = 0; c_news = 0; c_enc = 0; c_psel = 0;
    ht_en = 0; ht_mode = HT_NONE; running = 0; uniform_mix = 0; rounds_target = 0;
    total_ok = 0;

    // ---- phase 0a: latency of one isolated message 0 -> 3
    reset_net(2'd0);
    begin
      longint t0;
      @(negedge clk);
      tx_valid[0] = 1; tx_dst[0] = 4'd3;
      tx_data[0][0] = {8'hA5, 4'd0, 4'd3, 16'd0, 32'h1234};
      @(posedge clk);
      t0 = $time;
      seq[0] = 0;
      @(negedge clk);
      // the traffic process recorded and dropped tx_valid at that edge
      wait (rx_valid[3]);
      chk(($time - t0) / 10 == 13, $sformatf("0->3 latency %0d cycles, expected 13", ($time - t0) / 10));
      @(posedge clk);
      @(negedge clk);
      chk(n_ok == 1, "isolated message delivered");
    end

    // ---- phase 0: clean network
    reset_net(2'd1);
    uniform_mix = 1;
    run_traffic(10, 20000);
    $display("phase clean: ok=%0d garbled=%0d misdelivered=%0d pending=%0d avg latency=%0d",
             n_ok, n_garbled, n_misdeliv, sent_db.size(), n_ok ? lat_sum / n_ok : 0);
    chk(n_ok == 160 && n_garbled == 0 && n_misdeliv == 0 && sent_db.size() == 0, "clean network delivers all");
    chk(c_err == 0 && c_defl == 0 && news_count() == 0, "no alarms without Trojan");
    total_ok += n_ok;

    // ---- phases 1..4: Trojans in router 10
    for (int m = 1; m <= 4; m++) begin
      int nc;
      reset_net(2'(m));
      ht_en = 1;
      ht_mode = ht_mode_e'(m);
      uniform_mix = 0;
      run_traffic(12, 40000);
      nc = news_count();
      c_news += nc;
      $display("phase %s: ok=%0d garbled=%0d misdelivered=%0d (readable from trusted %0d) pending=%0d len_err=%0d news bits=%0d",
               ht_mode.name(), n_ok, n_garbled, n_misdeliv, n_leak_readable, sent_db.size(), n_lenerr, nc);
      chk(nc > 0, $sformatf("%s: Trojan router identified", ht_mode.name()));
      chk(n_leak_readable == 0, $sformatf("%s: no readable leak from trusted cores", ht_mode.name()));
      // the last round, sent after isolation, must be complete
      begin
        int late_pending;
        late_pending = 0;
        foreach (sent_db[k]) if (sent_db[k].round == 11 && (k / 65536) != 10 && sent_db[k].dst != 10) late_pending++;
        chk(late_pending == 0 && n_late_bad == 0,
            $sformatf("%s: last round delivered (missing %0d, misdelivered %0d)", ht_mode.name(), late_pending, n_late_bad));
      end
      chk(n_ok >= 96, $sformatf("%s: at least half of the 192 messages intact (%0d)", ht_mode.name(), n_ok));
      total_ok += n_ok;
      ht_en = 0;
      ht_mode = HT_NONE;
    end

    $display("mechanisms: trojan_payload=%0d detected=%0d news_set=%0d deflected=%0d pattern_switch=%0d encrypted_msgs=%0d stray_dropped=%0d",
             c_hit, c_err, c_news, c_defl, c_psel, c_enc, c_drop);
    chk(c_hit > 0,  "mechanism: Trojan payload applied");
    chk(c_err > 0,  "mechanism: alteration detected by ED");
    chk(c_news > 0, "mechanism: direction register set");
    chk(c_defl > 0, "mechanism: TCRA deflection");
    chk(c_psel > 1, "mechanism: shuffle pattern switch");
    chk(c_enc > 0,  "mechanism: encrypted messages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
