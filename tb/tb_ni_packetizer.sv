// tb_ni_packetizer: one message becomes 5 flits: the head carries H=1, SRC,
// DST, PL=5, NF=0, Tr=0; only the last body flit has T=1; parity slots
// [49:45] are zero; the payload, collected back with the mapping written
// here, equals the message. The packet leaves at one flit per cycle when
// the router is ready and waits when it is not.
module tb_ni_packetizer;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        mv, mr, fv, fr;
  addr_t       mdst;
  logic [63:0] mdata [MSG_WORDS];
  flit_t       f;

  ni_packetizer #(.NODE_ID(4'd6)) dut (.clk, .rst_n, .msg_valid(mv), .msg_ready(mr), .msg_dst(mdst),
    .msg_data(mdata), .flit_valid(fv), .flit_ready(fr), .flit(f));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s flit=%h", what, f); end
  endtask

  initial begin
    mv = 0; fr = 0; mdst = 0;
    for (int w = 0; w < MSG_WORDS; w++) mdata[w] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 6; m++) begin
      logic [266:0] got;
      logic [63:0]  sent [MSG_WORDS];
      int n, start, stall;
      @(negedge clk);
      chk(mr && !fv, "idle");
      mv = 1; mdst = 4'($urandom);
      for (int w = 0; w < MSG_WORDS; w++) begin mdata[w] = {$urandom, $urandom}; sent[w] = mdata[w]; end
      @(negedge clk);
      mv = 0;
      n = 0; got = '0; stall = 0;
      start = $time;
      while (n < 5) begin
        fr = (m % 2 == 0) ? 1'b1 : 1'($urandom);
        #1;
        if (fv && fr) begin
          chk(f[49:45] == 5'b0, "parity slots zero");
          chk(f[T_BIT] == (n == 4), $sformatf("tail bit flit %0d", n));
          chk(f[TR_BIT] == 1'b0, "Tr clear");
          if (n == 0) begin
            chk(f[H_BIT] && f[SRC_LSB +: 4] == 4'd6 && f[DST_LSB +: 4] == mdst && f[PL_LSB +: 4] == 4'd5
                && f[NF_BIT] == 1'b0, "head fields");
            got[42:0] = f[44:2];
          end else begin
            chk(!f[H_BIT], "body head bit");
            got[43 + (n-1)*56 +: 12] = f[61:50];
            got[55 + (n-1)*56 +: 44] = f[44:1];
          end
          n++;
        end else if (!fr) stall++;
        @(negedge clk);
      end
      for (int w = 0; w < MSG_WORDS; w++) chk(got[64*w +: 64] == sent[w], $sformatf("payload word %0d", w));
      if (m % 2 == 0) chk(($time - start) == 50, $sformatf("5 flits in 5 cycles (%0t)", $time - start));
      fr = 0;
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
