// tb_flit_decryptor: decrypting the output of the encryptor with the same
// key gives back the plain word; with another core's key it does not.
module tb_flit_decryptor;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  pkey_t       key, dkey;
  logic [63:0] plain, cipher, back;

  flit_encryptor u_enc (.key(key),  .plain(plain),  .cipher(cipher));
  flit_decryptor dut   (.key(dkey), .cipher(cipher), .plain(back));

  initial begin
    int wrong_ok;
    wrong_ok = 0;
    for (int t = 0; t < 400; t++) begin
      key   = core_key(t % 16);
      dkey  = key;
      plain = {$urandom, $urandom};
      #1;
      checks++;
      if (back != plain) begin failures++; $display("FAIL key=%h plain=%h back=%h", key, plain, back); end
      dkey = core_key((t + 1) % 16);
      #1;
      if (back == plain) wrong_ok++;
    end
    checks++;
    if (wrong_ok != 0) begin failures++; $display("FAIL %0d words decrypted with a wrong key", wrong_ok); end
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
