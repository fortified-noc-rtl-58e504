// tb_secure_core_if: two tile interfaces wired back to back (A's flits go
// straight into B). Between trusted tiles the words on the wire differ from
// the message and B recovers the message with A's key; from an untrusted
// tile the words travel in clear and still arrive intact.
module tb_secure_core_if;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  // A = node 2 (trusted), C = node 0 (untrusted), B = node 8 (trusted)
  logic        a_txv, a_txr, c_txv, c_txr, b_rxv, b_lerr;
  addr_t       a_dst, c_dst, b_src;
  logic [63:0] a_data [MSG_WORDS];
  logic [63:0] c_data [MSG_WORDS];
  logic [63:0] b_rx   [MSG_WORDS];
  logic [63:0] unused_rx [MSG_WORDS];
  logic [63:0] unused_rx2 [MSG_WORDS];
  logic        a_lov, c_lov, b_liv, b_lir, unused_r1, unused_r2, unused_v1, unused_v2, unused_e1, unused_e2;
  flit_t       a_lof, c_lof, b_lif;
  logic        sel_c;
  addr_t       unused_s1, unused_s2;
  logic        b_tx_ready, b_lov;
  flit_t       b_lof;
  logic [63:0] zero_data [MSG_WORDS];

  assign zero_data = '{default: '0};

  secure_core_if #(.NODE_ID(4'd2)) u_a (.clk, .rst_n, .tx_valid(a_txv), .tx_ready(a_txr), .tx_dst(a_dst),
    .tx_data(a_data), .rx_valid(unused_v1), .rx_src(unused_s1), .rx_data(unused_rx), .rx_len_err(unused_e1),
    .lo_valid(a_lov), .lo_ready(!sel_c), .lo_flit(a_lof), .li_valid(1'b0), .li_ready(unused_r1), .li_flit('0));
  secure_core_if #(.NODE_ID(4'd0)) u_c (.clk, .rst_n, .tx_valid(c_txv), .tx_ready(c_txr), .tx_dst(c_dst),
    .tx_data(c_data), .rx_valid(unused_v2), .rx_src(unused_s2), .rx_data(unused_rx2), .rx_len_err(unused_e2),
    .lo_valid(c_lov), .lo_ready(sel_c), .lo_flit(c_lof), .li_valid(1'b0), .li_ready(unused_r2), .li_flit('0));
  secure_core_if #(.NODE_ID(4'd8)) u_b (.clk, .rst_n, .tx_valid(1'b0), .tx_ready(b_tx_ready), .tx_dst(4'd0),
    .tx_data(zero_data), .rx_valid(b_rxv), .rx_src(b_src), .rx_data(b_rx), .rx_len_err(b_lerr),
    .lo_valid(b_lov), .lo_ready(1'b1), .lo_flit(b_lof), .li_valid(b_liv), .li_ready(b_lir), .li_flit(b_lif));

  assign b_liv = sel_c ? c_lov : a_lov;
  assign b_lif = sel_c ? c_lof : a_lof;

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [266:0] wire_pay;
  int           nfl;
  always @(posedge clk) begin
    if (b_liv && b_lir) begin
      if (b_lif[63]) begin nfl = 0; wire_pay = '0; wire_pay[42:0] = b_lif[44:2]; end
      else begin
        wire_pay[43 + (nfl-1)*56 +: 12] = b_lif[61:50];
        wire_pay[55 + (nfl-1)*56 +: 44] = b_lif[44:1];
      end
      nfl++;
    end
  end

  task automatic run(bit from_c);
    logic [63:0] msg [MSG_WORDS];
    for (int w = 0; w < MSG_WORDS; w++) msg[w] = {$urandom, $urandom};
    @(negedge clk);
    sel_c = from_c;
    if (from_c) begin c_txv = 1; c_dst = 4'd8; c_data = msg; end
    else        begin a_txv = 1; a_dst = 4'd8; a_data = msg; end
    @(negedge clk);
    a_txv = 0; c_txv = 0;
    fork
      begin wait (b_rxv); end
      begin repeat (30) @(posedge clk); end
    join_any
    disable fork;
    #1;
    chk(b_rxv, "message received");
    chk(b_src == (from_c ? 4'd0 : 4'd2), "source");
    for (int w = 0; w < MSG_WORDS; w++) begin
      chk(b_rx[w] == msg[w], $sformatf("word %0d recovered (from_c=%0d)", w, from_c));
      if (from_c) chk(wire_pay[64*w +: 64] == msg[w], "untrusted source sends clear text");
      else        chk(wire_pay[64*w +: 64] != msg[w], "trusted pair sends cipher text");
    end
    chk(!b_lerr, "no length error");
  endtask

  initial begin
    a_txv = 0; c_txv = 0; a_dst = 0; c_dst = 0; sel_c = 0;
    a_data = '{default: '0}; c_data = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) run(1'b0);
    for (int k = 0; k < 2; k++) run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
