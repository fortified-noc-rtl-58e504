// tb_ni_depacketizer: well-formed 5-flit packets built here are delivered
// with the right source and data one cycle after the tail; a packet whose
// length field says 7, one whose length field says 3, and a packet cut off
// by a new head raise len_err and are not delivered; a body flit with no
// open packet is ignored.
module tb_ni_depacketizer;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        fv, fr, mv, lerr;
  flit_t       f;
  addr_t       src, dst;
  logic [63:0] md [MSG_WORDS];
  int          delivered = 0, errs = 0;

  ni_depacketizer dut (.clk, .rst_n, .flit_valid(fv), .flit_ready(fr), .flit(f),
    .msg_valid(mv), .msg_src(src), .msg_dst(dst), .msg_data(md), .len_err(lerr));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (mv) delivered++;
    if (lerr) errs++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [266:0] pay;

  task automatic send_pkt(addr_t s, int pl, int nflits);
    for (int n = 0; n < nflits; n++) begin
      @(negedge clk);
      fv = 1; f = '0;
      if (n == 0) begin
        f[63] = 1; f[61:58] = s; f[57:54] = 4'd9; f[53:50] = 4'(pl); f[44:2] = pay[42:0];
      end else begin
        f[61:50] = pay[43 + (n-1)*56 +: 12];
        f[44:1]  = pay[55 + (n-1)*56 +: 44];
      end
      f[62] = (n == nflits - 1);
      f[49:45] = 5'($urandom);          // parity slots carry anything
    end
    @(negedge clk);
    fv = 0;
  endtask

  initial begin
    fv = 0; f = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      int d0;
      pay = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      d0 = delivered;
      send_pkt(4'(k + 3), 5, 5);
      #1;
      chk(mv && delivered == d0, "delivered one cycle after tail");
      chk(src == 4'(k + 3) && dst == 4'd9, "source/destination");
      for (int w = 0; w < 4; w++) chk(md[w] == pay[64*w +: 64], $sformatf("word %0d", w));
      chk(fr, "always ready");
      @(negedge clk);
    end
    begin
      int d0, e0;
      d0 = delivered; e0 = errs;
      send_pkt(4'd1, 7, 5);                 // PL larger than real length
      repeat (2) @(negedge clk);
      chk(delivered == d0 && errs == e0 + 1, "PL=7 with 5 flits rejected");
      send_pkt(4'd1, 3, 5);                 // PL smaller
      repeat (2) @(negedge clk);
      chk(delivered == d0 && errs == e0 + 2, "PL=3 with 5 flits rejected");
      send_pkt(4'd1, 5, 3);                 // 3 flits, tail early
      repeat (2) @(negedge clk);
      chk(delivered == d0 && errs == e0 + 3, "early tail rejected");
      // stray body flit
      @(negedge clk); fv = 1; f = 64'h4000_0000_0000_0000; @(negedge clk); fv = 0;
      repeat (2) @(negedge clk);
      chk(delivered == d0 && errs == e0 + 3, "stray flit ignored");
      send_pkt(4'd2, 5, 5);
      #1;
      chk(mv && !lerr, "recovers after errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
