// tb_hw_trojan: the Trojan model stays transparent until TRIG_COUNT flits
// have left the buffer while enabled, then applies each mode's payload to
// the bits it targets (and only to flits it recognises), and the live-lock
// mode turns a north-bound route west.
module tb_hw_trojan;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  logic     clk = 0, rst_n = 0;
  logic     en, pop, act, tamp;
  ht_mode_e mode;
  flit_t    fin, fout;
  dir_e     rin, rout;

  hw_trojan #(.LOCAL_ADDR(4'd10), .TRIG_COUNT(3)) dut (
    .clk, .rst_n, .enable(en), .mode(mode), .flit_in(fin), .pop(pop), .flit_out(fout),
    .route_in(rin), .route_out(rout), .active(act), .tampering(tamp));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s fin=%h fout=%h", what, fin, fout); end
  endtask

  initial begin
    en = 0; pop = 0; mode = HT_HBT; fin = '0; rin = DIR_NORTH;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fin = 64'h8000_0000_0000_0000;
    pop = 1;
    repeat (5) @(negedge clk);
    chk(!act && fout == fin, "idle while disabled");
    en = 1;
    for (int i = 0; i < 3; i++) begin
      #1; chk(!act && fout == fin, $sformatf("transparent before trigger %0d", i));
      @(negedge clk);
    end
    pop = 0;
    #1;
    chk(act, "active after 3 occurrences");
    // HBT
    fin = 64'hC3C0_0000_0000_1234; #1;
    chk(fout == 64'h43C0_0000_0000_1234 && tamp, "HBT clears head bit");
    fin = 64'h43C0_0000_0000_1234; #1;
    chk(fout == fin && !tamp, "HBT ignores non-head");
    // DAT: DST [57:54] ^ 0110
    mode = HT_DAT; fin = 64'h8000_0000_0000_0000 | (64'h5 << 54); #1;
    chk(fout[57:54] == 4'h3 && fout[63] == 1'b1, "DAT alters destination");
    // PLT
    mode = HT_PLT; fin = 64'h8000_0000_0000_0000 | (64'h5 << 50); #1;
    chk(fout[53:50] == 4'h6, "PLT alters length");
    // DLT
    mode = HT_DLT; fin = 64'h8000_0000_0000_0000 | (64'h5 << 54); #1;
    chk(fout[57:54] == 4'd10, "DLT redirects to local node");
    // LLT
    mode = HT_LLT; fin = 64'h4000_0000_0000_00FF; rin = DIR_NORTH; #1;
    chk(fout == 64'h0000_0000_0000_00FF && rout == DIR_WEST, "LLT clears tail, turns north to west");
    rin = DIR_EAST; #1;
    chk(rout == DIR_EAST, "LLT leaves other routes");
    mode = HT_HBT; rin = DIR_NORTH; #1;
    chk(rout == DIR_NORTH, "no route change outside LLT");
    en = 0; fin = 64'hC3C0_0000_0000_1234; #1;
    chk(fout == fin && !act, "disabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
