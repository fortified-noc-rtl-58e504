// tb_flit_fifo: random push/pop traffic against a queue model at the
// design's depth of 8: order and data, full after 8 pushes, empty, count,
// and simultaneous push/pop while full.
module tb_flit_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [63:0] din, dout;
  logic [3:0]  count;
  logic [63:0] q [$];

  flit_fifo #(.W(64), .DEPTH(8)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty, .count);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full && count == 0, "empty after reset");
    // fill to 8
    for (int i = 0; i < 8; i++) begin
      push = 1; din = {32'hA0A0_0000, 32'(i)};
      @(posedge clk); q.push_back(din);
      @(negedge clk);
    end
    push = 0;
    chk(full && count == 8, "full after 8");
    // push+pop while full
    push = 1; pop = 1; din = 64'hDEAD;
    chk(dout == q[0], "head while full");
    @(posedge clk); void'(q.pop_front()); q.push_back(64'hDEAD);
    @(negedge clk);
    push = 0; pop = 0;
    chk(full && count == 8, "still full after push+pop");
    // random
    for (int n = 0; n < 3000; n++) begin
      push = $urandom_range(0, 1) && (!full || 1'b0);
      pop  = $urandom_range(0, 1) && !empty;
      din  = {$urandom, $urandom};
      if (pop) chk(dout == q[0], $sformatf("data order at %0d", n));
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
      @(negedge clk);
      chk(count == 4'(q.size()), "count");
      chk(empty == (q.size() == 0) && full == (q.size() == 8), "flags");
    end
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
