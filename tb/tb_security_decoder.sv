// tb_security_decoder: a flit passed through the security encoder and then
// the decoder comes back with its crucial bits intact, the parity written
// into [49:45], and Tr untouched. A single changed stored bit is corrected
// and sets Tr; any run of 1..6 changed adjacent stored bits sets Tr.
module tb_security_decoder;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] sel;
  flit_t      fin, stored, tampered, fout;
  logic       det, cor;

  security_encoder u_enc (.sel(sel), .flit_in(fin), .flit_out(stored));
  security_decoder dut   (.sel(sel), .flit_in(tampered), .flit_out(fout), .err_det(det), .err_cor(cor));

  initial begin
    for (int t = 0; t < 300; t++) begin
      flit_t clean;
      sel = 2'($urandom);
      fin = {$urandom, $urandom};
      fin[TR_BIT] = 1'b0;
      #1;
      tampered = stored;
      #1;
      clean = fout;
      checks++;
      if (det || fout[63:50] != fin[63:50] || fout[44:0] != fin[44:0]) begin
        failures++; $display("FAIL clean roundtrip fin=%h fout=%h", fin, fout);
      end
      for (int k = 45; k < 64; k++) begin
        tampered = stored ^ (64'd1 << k);
        #1;
        checks++;
        if (!det || !cor || fout[TR_BIT] != 1'b1 || fout[63:1] != clean[63:1]) begin
          failures++; $display("FAIL single flip of stored bit %0d", k);
        end
      end
      for (int l = 2; l <= 6; l++)
        for (int k = 45; k + l <= 64; k++) begin
          tampered = stored ^ (((64'd1 << l) - 1) << k);
          #1;
          checks++;
          if (!fout[TR_BIT]) begin failures++; $display("FAIL run %0d+%0d undetected sel=%0d", k, l, sel); end
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
