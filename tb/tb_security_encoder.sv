// tb_security_encoder: checks the stored form of a flit: bits [44:0]
// unchanged, and the 19-bit group equals the shuffle (reference computed
// here from the pattern table) of {flit[63:50], Hamming parity}, the parity
// being the one that makes the syndrome zero.
module tb_security_encoder;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] sel;
  flit_t      fin, fout;

  security_encoder dut (.sel(sel), .flit_in(fin), .flit_out(fout));

  localparam int CW [19] = '{1, 2, 4, 8, 16, 3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19};

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [18:0] g, exp_s;
      int s;
      sel = 2'($urandom);
      fin = {$urandom, $urandom};
      #1;
      g = {fin[63:50], 5'b0};
      s = 0;
      for (int i = 5; i < 19; i++) if (g[i]) s ^= CW[i];
      g[4:0] = 5'(s);
      for (int k = 0; k < 19; k++) exp_s[k] = g[EDS_PAT[sel][k]];
      checks++;
      if (fout[44:0] != fin[44:0]) begin failures++; $display("FAIL low bits changed"); end
      checks++;
      if (fout[63:45] != exp_s) begin failures++; $display("FAIL group sel=%0d got=%h exp=%h", sel, fout[63:45], exp_s); end
    end
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
