// tb_trojan_dir_regs: a Tr flag on a flit waiting at an input sets that
// direction's register (visible at once on news_eff, registered on the next
// edge), Tr without a flit does nothing, and the registers hold until reset.
module tb_trojan_dir_regs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:1] pres, tr, q, eff;

  trojan_dir_regs dut (.clk, .rst_n, .flit_present(pres), .flit_tr(tr), .news_q(q), .news_eff(eff));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s q=%b eff=%b", what, q, eff); end
  endtask

  initial begin
    pres = 0; tr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(q == 0 && eff == 0, "reset");
    tr = 4'b1111; pres = 4'b0000; #1;
    chk(eff == 0, "Tr without flit");
    @(negedge clk);
    chk(q == 0, "Tr without flit not stored");
    pres = 4'b0010; tr = 4'b0010; #1;       // east
    chk(eff == 4'b0010 && q == 0, "east seen combinationally");
    @(negedge clk);
    pres = 0; tr = 0;
    chk(q == 4'b0010, "east stored");
    pres = 4'b1000; tr = 4'b1000;            // west
    @(negedge clk);
    pres = 0; tr = 0;
    repeat (5) @(negedge clk);
    chk(q == 4'b1010, "sticky");
    rst_n = 0; #1;
    chk(q == 0, "cleared by reset");
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
