// tb_flit_encryptor: compares the encryptor with a reference model written
// here (bit permutation followed by a table look-up per nibble) for random
// keys and data words.
module tb_flit_encryptor;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  pkey_t       key;
  logic [63:0] plain, cipher;

  flit_encryptor dut (.key(key), .plain(plain), .cipher(cipher));

  function automatic logic [63:0] ref_enc(pkey_t k, logic [63:0] p);
    logic [63:0] q, c;
    int m;
    m = int'(k.mult) | 1;
    q = '0;
    for (int i = 0; i < 64; i++) q[(i * m + int'(k.add)) % 64] = p[i];
    for (int s = 0; s < 16; s++) c[4*s +: 4] = SBOX_TAB[s][4*q[4*s +: 4] +: 4];
    return c;
  endfunction

  initial begin
    int same;
    same = 0;
    for (int t = 0; t < 500; t++) begin
      key   = (t < 16) ? core_key(t) : pkey_t'($urandom);
      plain = {$urandom, $urandom};
      #1;
      checks++;
      if (cipher != ref_enc(key, plain)) begin
        failures++;
        $display("FAIL key=%h plain=%h got=%h exp=%h", key, plain, cipher, ref_enc(key, plain));
      end
      if (cipher == plain) same++;
    end
    checks++;
    if (same != 0) begin failures++; $display("FAIL %0d words unchanged", same); end
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
