// tb_hamming_encoder: places the data and parity bits in a 19-position
// codeword (parity at positions 1,2,4,8,16) and checks that the XOR of the
// positions of all set bits is zero, i.e. the parity makes a valid Hamming
// codeword, plus a few hand-worked values.
module tb_hamming_encoder;
  int checks = 0, failures = 0;
  logic [13:0] d;
  logic [4:0]  p;

  hamming_encoder dut (.d(d), .p(p));

  localparam int DPOS [14] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19};

  task automatic expect_p(logic [13:0] dv, logic [4:0] pv);
    d = dv;
    #1;
    checks++;
    if (p != pv) begin failures++; $display("FAIL d=%h p=%b exp=%b", dv, p, pv); end
  endtask

  initial begin
    // d[0] sits at position 3 = 0b00011 -> p[0], p[1]
    expect_p(14'h0001, 5'b00011);
    // d[13] sits at position 19 = 0b10011
    expect_p(14'h2000, 5'b10011);
    // d[4] at position 9 = 0b01001
    expect_p(14'h0010, 5'b01001);
    expect_p(14'h0000, 5'b00000);
    for (int t = 0; t < 2000; t++) begin
      int syn;
      d = 14'($urandom);
      #1;
      syn = 0;
      for (int m = 0; m < 14; m++) if (d[m]) syn ^= DPOS[m];
      for (int j = 0; j < 5; j++)  if (p[j]) syn ^= (1 << j);
      checks++;
      if (syn != 0) begin failures++; $display("FAIL d=%h p=%b syn=%0d", d, p, syn); end
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
