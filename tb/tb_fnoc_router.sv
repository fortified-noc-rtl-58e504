// tb_fnoc_router: one router at x=1, y=1 with the evaluation Trojan model
// fitted (TRIG_COUNT 2). Per-port driver queues feed the inputs, monitors
// compare every output flit with the expected flit (input flit with the
// Hamming parity of its crucial bits in [49:45]; Tr set only where the
// Trojan altered it) and output port.
// Checked: XY routing to all four neighbours and local; head latency of 2
// cycles through an idle router; packets sharing an output are not
// interleaved (wormhole); back-pressure holds flits without loss; a Tr flag
// arriving on the east input sets the east direction register and the next
// east-bound packet is deflected north; a stray body flit is discarded;
// with the head-bit Trojan active every altered flit is corrected and
// leaves with Tr set.
module tb_fnoc_router;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic       in_valid [N_PORTS];
  flit_t      in_flit  [N_PORTS];
  logic       in_ready [N_PORTS];
  logic       out_valid[N_PORTS];
  flit_t      out_flit [N_PORTS];
  logic       out_ready[N_PORTS];
  logic       ht_en;
  ht_mode_e   ht_mode;
  logic [4:1] news;
  logic [N_PORTS-1:0] err_det, deflect, drop, ht_hit;
  logic [1:0] psel;

  fnoc_router #(.X(1), .Y(1), .HAS_TROJAN(1'b1), .TRIG_COUNT(2)) dut (
    .clk, .rst_n, .pattern_sel(psel), .in_valid, .in_flit, .in_ready, .out_valid, .out_flit, .out_ready,
    .ht_enable(ht_en), .ht_mode(ht_mode), .news, .err_det, .deflect, .drop, .ht_hit);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  localparam int CW [19] = '{1, 2, 4, 8, 16, 3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19};
  function automatic flit_t expect_of(flit_t f);
    int s;
    s = 0;
    for (int i = 5; i < 19; i++) if (f[45 + i]) s ^= CW[i];
    f[49:45] = 5'(s);
    f[TR_BIT] = 1'b0;
    return f;
  endfunction

  flit_t drv_q [N_PORTS][$];
  flit_t exp_q [N_PORTS][$];
  int    n_err = 0, n_tr_out = 0, n_defl = 0, n_drop = 0, n_out = 0;
  int    last_pkt_owner [N_PORTS];
  longint t_in_head, t_out_head;

  // drivers
  always @(negedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      in_valid[p] = drv_q[p].size() > 0;
      in_flit[p]  = in_valid[p] ? drv_q[p][0] : '0;
    end
  end
  always @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++)
      if (in_valid[p] && in_ready[p]) void'(drv_q[p].pop_front());
  end

  // monitors: packets bound for one output may leave in either order, but
  // the flits of one packet must leave together and in order
  typedef flit_t pkt_t [$];
  pkt_t  exp_pk [N_PORTS][$];
  flit_t cur_q  [N_PORTS][$];

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N_PORTS; p++) begin
      if (out_valid[p] && out_ready[p]) begin
        flit_t g;
        g = out_flit[p];
        g[TR_BIT] = 1'b0;
        n_out++;
        if (out_flit[p][TR_BIT]) n_tr_out++;
        if (cur_q[p].size() == 0) begin
          int hit;
          hit = -1;
          foreach (exp_pk[p][k]) if (hit < 0 && exp_pk[p][k][0] == g) hit = k;
          chk(hit >= 0, $sformatf("port %0d: flit %h starts no expected packet", p, out_flit[p]));
          if (hit >= 0) begin
            cur_q[p] = exp_pk[p][hit];
            exp_pk[p].delete(hit);
          end
        end
        if (cur_q[p].size() > 0) begin
          flit_t e;
          e = cur_q[p].pop_front();
          chk(g == e, $sformatf("port %0d flit %h expected %h", p, out_flit[p], e));
          void'(exp_q[p].pop_front());
        end
      end
    end
    n_err  += $countones(err_det);
    n_defl += $countones(deflect);
    n_drop += $countones(drop);
  end

  function automatic flit_t head(addr_t src, addr_t dst, int pl);
    flit_t f;
    f = {$urandom, $urandom};
    f[63] = 1; f[62] = 0; f[61:58] = src; f[57:54] = dst; f[53:50] = 4'(pl);
    f[NF_BIT] = 0; f[TR_BIT] = 0;
    return f;
  endfunction

  task automatic pkt(int in_p, int out_p, addr_t dst, int n, bit tr_on_head = 0);
    pkt_t pk;
    for (int k = 0; k < n; k++) begin
      flit_t f;
      if (k == 0) f = head(4'd0, dst, n);
      else begin f = {$urandom, $urandom}; f[63] = 0; f[62] = (k == n - 1); f[TR_BIT] = 0; end
      if (n == 1) f[62] = 1;
      if (k == 0 && tr_on_head) f[TR_BIT] = 1;
      drv_q[in_p].push_back(f);
      exp_q[out_p].push_back(expect_of(f));
      pk.push_back(expect_of(f));
    end
    exp_pk[out_p].push_back(pk);
  endtask

  task automatic drain(int max_cycles = 400);
    int c;
    c = 0;
    while (c < max_cycles) begin
      bit busy;
      busy = 0;
      for (int p = 0; p < N_PORTS; p++) if (drv_q[p].size() || exp_q[p].size()) busy = 1;
      if (!busy) break;
      @(posedge clk); c++;
    end
    chk(c < max_cycles, "traffic drained");
  endtask

  initial begin
    for (int p = 0; p < N_PORTS; p++) begin in_valid[p] = 0; in_flit[p] = '0; out_ready[p] = 1; end
    ht_en = 0; ht_mode = HT_NONE; psel = 2'd1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. XY routing from local to every side and back to local
    pkt(DIR_LOCAL, DIR_EAST,  4'd7,  5);      // (3,1)
    pkt(DIR_LOCAL, DIR_WEST,  4'd4,  5);      // (0,1)
    pkt(DIR_LOCAL, DIR_NORTH, 4'd1,  5);      // (1,0)
    pkt(DIR_LOCAL, DIR_SOUTH, 4'd13, 5);      // (1,3)
    pkt(DIR_EAST,  DIR_LOCAL, 4'd5,  5);      // (1,1)
    pkt(DIR_NORTH, DIR_SOUTH, 4'd9,  5);
    drain();

    // 2. head latency through an idle router
    @(negedge clk);
    pkt(DIR_WEST, DIR_EAST, 4'd6, 1);
    t_in_head = $time;
    wait (out_valid[DIR_EAST]);
    t_out_head = $time;
    // presented before rising edge 1 (input buffer), rising edge 2 writes
    // the output buffer: visible 1.5 clock periods after the falling edge
    chk((t_out_head - t_in_head) == 15,
        $sformatf("head latency %0t ns, expected 2 clock edges", t_out_head - t_in_head));
    drain();

    // 3. two packets to one output from two inputs: no interleaving
    pkt(DIR_WEST,  DIR_EAST, 4'd7, 5);
    pkt(DIR_SOUTH, DIR_EAST, 4'd7, 5);
    drain();

    // 4. back-pressure
    out_ready[DIR_NORTH] = 0;
    pkt(DIR_SOUTH, DIR_NORTH, 4'd1, 5);
    pkt(DIR_LOCAL, DIR_NORTH, 4'd1, 5);
    repeat (30) @(negedge clk);
    chk(exp_q[DIR_NORTH].size() == 10, "nothing leaves while blocked");
    out_ready[DIR_NORTH] = 1;
    drain();

    // 5. Tr on the east input -> east register; next east-bound packet detours
    begin
      flit_t f;
      pkt(DIR_EAST, DIR_WEST, 4'd4, 3, 1'b1);
      drain();
      chk(news == 4'b0010, $sformatf("east register set (news=%b)", news));
      pkt(DIR_LOCAL, DIR_NORTH, 4'd7, 5);     // (3,1): deflected north
      drain();
      chk(n_defl >= 1, "deflection reported");
    end

    // 6. stray body flit
    begin
      flit_t f;
      f = {$urandom, $urandom}; f[63] = 0; f[62] = 0; f[0] = 0;
      drv_q[DIR_SOUTH].push_back(f);
      repeat (10) @(negedge clk);
      chk(n_drop == 1, "stray flit discarded");
    end

    // 7. head-bit Trojan: every altered flit is corrected and flagged
    ht_en = 1; ht_mode = HT_HBT;
    for (int k = 0; k < 12; k++) pkt(DIR_WEST, DIR_LOCAL, 4'd5, 5);
    drain(2000);
    chk(n_err > 0 && n_tr_out == n_err, $sformatf("alterations detected (%0d) and flagged (%0d)", n_err, n_tr_out));
    $display("router: %0d flits out, %0d altered flits corrected, %0d deflections, %0d dropped",
             n_out, n_err, n_defl, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
