// tb_address_extractor: for random head flits stored in shuffled form, the
// extractor returns the original H, T, SRC, DST, PL, NF and Tr values, also
// when one bit of the stored 19-bit group has been changed.
module tb_address_extractor;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] sel;
  flit_t      fin, stored;
  logic       h, t, nf, tr;
  addr_t      src, dst;
  logic [3:0] pl;
  flit_t      bad;
  logic       h2, t2, nf2, tr2;
  addr_t      src2, dst2;
  logic [3:0] pl2;

  security_encoder  u_enc (.sel(sel), .flit_in(fin), .flit_out(stored));
  address_extractor dut   (.sel(sel), .flit(stored), .head(h), .tail(t), .src(src), .dst(dst),
                           .pl(pl), .nf(nf), .tr(tr));
  address_extractor dut2  (.sel(sel), .flit(bad), .head(h2), .tail(t2), .src(src2), .dst(dst2),
                           .pl(pl2), .nf(nf2), .tr(tr2));
  assign bad = stored ^ (64'd1 << (45 + (fin[31:0] % 19)));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      sel = 2'($urandom);
      fin = {$urandom, $urandom};
      #1;
      checks++;
      if (h != fin[63] || t != fin[62] || src != fin[61:58] || dst != fin[57:54] ||
          pl != fin[53:50] || nf != fin[1] || tr != fin[0]) begin
        failures++;
        $display("FAIL fin=%h h=%b t=%b src=%h dst=%h pl=%h", fin, h, t, src, dst, pl);
      end
      checks++;
      if (h2 != fin[63] || t2 != fin[62] || src2 != fin[61:58] || dst2 != fin[57:54] ||
          pl2 != fin[53:50]) begin
        failures++;
        $display("FAIL one stored bit changed: fin=%h dst=%h", fin, dst2);
      end
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
