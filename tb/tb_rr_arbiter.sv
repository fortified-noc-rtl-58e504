// tb_rr_arbiter: grant is one-hot and within the requests, all-request
// traffic is served in rotation 0,1,2,3,4,0,..., the pointer does not move
// without advance, and random traffic never starves a steady requester for
// more than 4 grants.
module tb_rr_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] req, grant;
  logic [2:0] idx;
  logic       adv;

  rr_arbiter #(.N(5)) dut (.clk, .rst_n, .req, .advance(adv), .grant, .grant_idx(idx));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s req=%b grant=%b", what, req, grant); end
  endtask

  initial begin
    int wait0;
    req = 0; adv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req = 5'b11111; adv = 1;
    for (int k = 0; k < 10; k++) begin
      #1;
      chk(grant == (5'd1 << (k % 5)) && idx == 3'(k % 5), $sformatf("rotation step %0d", k));
      @(negedge clk);
    end
    adv = 0;
    #1;
    chk(grant == 5'b00001, "hold without advance before");
    repeat (3) @(negedge clk);
    chk(grant == 5'b00001, "hold without advance after");
    adv = 1;
    wait0 = 0;
    for (int n = 0; n < 2000; n++) begin
      req = 5'($urandom) | 5'b00001;
      #1;
      chk($onehot(grant) && (grant & ~req) == 0 && grant[idx], "one-hot in requests");
      if (grant[0]) wait0 = 0; else wait0++;
      chk(wait0 <= 4, "requester 0 starved");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
