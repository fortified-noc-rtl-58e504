// tb_eds_deshuffler: de-shuffling the shuffler's output with the same pattern
// restores the input for random data and all patterns; with a different
// pattern it generally does not.
module tb_eds_deshuffler;
  int checks = 0, failures = 0;
  logic [1:0]  sel, sel_d;
  logic [18:0] din, mid, dout;

  eds_shuffler   u_s (.sel(sel),   .din(din), .dout(mid));
  eds_deshuffler dut (.sel(sel_d), .din(mid), .dout(dout));

  initial begin
    int mism;
    mism = 0;
    for (int t = 0; t < 1000; t++) begin
      sel   = 2'($urandom);
      sel_d = sel;
      din   = 19'($urandom);
      #1;
      checks++;
      if (dout != din) begin failures++; $display("FAIL sel=%0d din=%h dout=%h", sel, din, dout); end
      sel_d = sel + 2'd1;
      #1;
      if (dout != din) mism++;
    end
    checks++;
    if (mism < 900) begin failures++; $display("FAIL patterns not distinct (%0d)", mism); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
