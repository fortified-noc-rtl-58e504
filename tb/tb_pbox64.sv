// tb_pbox64: the keyed P-box moves bit i to bit (i*mult+add) mod 64 (mult
// forced odd), keeps the number of set bits, and the inverse P-box restores
// the input, for random keys and data.
module tb_pbox64;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  pkey_t       key;
  logic [63:0] din, mid, dout;

  pbox64 #(.INVERSE(1'b0)) u_f (.key(key), .din(din), .dout(mid));
  pbox64 #(.INVERSE(1'b1)) u_i (.key(key), .din(mid), .dout(dout));

  initial begin
    for (int t = 0; t < 300; t++) begin
      key = pkey_t'($urandom);
      din = {$urandom, $urandom};
      #1;
      checks++;
      if (dout != din) begin failures++; $display("FAIL roundtrip key=%h", key); end
      checks++;
      if ($countones(mid) != $countones(din)) begin failures++; $display("FAIL popcount"); end
      // single-bit probe
      for (int i = 0; i < 64; i += 7) begin
        int m, j;
        din = 64'd1 << i;
        #1;
        m = int'(key.mult) | 1;
        j = (i * m + int'(key.add)) % 64;
        checks++;
        if (mid != (64'd1 << j)) begin failures++; $display("FAIL bit %0d -> %0d key=%h mid=%h", i, j, key, mid); end
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
