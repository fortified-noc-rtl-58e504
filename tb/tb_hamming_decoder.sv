// tb_hamming_decoder: builds valid codewords with parity computed here,
// checks that a clean word is reported clean, that every single-bit change
// is detected and corrected, and that every double-bit change is detected.
module tb_hamming_decoder;
  int checks = 0, failures = 0;
  logic [18:0] g_in, g_out;
  logic [4:0]  syn;
  logic        det, cor;

  hamming_decoder dut (.g_in(g_in), .g_out(g_out), .syndrome(syn), .err_det(det), .err_cor(cor));

  localparam int CW [19] = '{1, 2, 4, 8, 16, 3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19};

  function automatic logic [18:0] make_cw(logic [13:0] d);
    logic [18:0] g;
    int s;
    g = {d, 5'b0};
    s = 0;
    for (int i = 5; i < 19; i++) if (g[i]) s ^= CW[i];
    g[4:0] = 5'(s);
    return g;
  endfunction

  initial begin
    for (int t = 0; t < 60; t++) begin
      logic [18:0] c;
      c = make_cw(14'($urandom));
      g_in = c; #1;
      checks++;
      if (det || g_out != c) begin failures++; $display("FAIL clean word flagged"); end
      for (int i = 0; i < 19; i++) begin
        g_in = c ^ (19'd1 << i); #1;
        checks++;
        if (!det || !cor || g_out != c || syn != 5'(CW[i])) begin
          failures++; $display("FAIL single flip %0d det=%b cor=%b", i, det, cor);
        end
        for (int j = i + 1; j < 19; j++) begin
          g_in = c ^ (19'd1 << i) ^ (19'd1 << j); #1;
          checks++;
          if (!det) begin failures++; $display("FAIL double flip %0d,%0d undetected", i, j); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
