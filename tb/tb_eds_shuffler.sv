// tb_eds_shuffler: for every pattern, the shuffler is a permutation of the 19
// bits with no bit left in place, patterns 0..3 place group bits 6, 5, 14
// and 3 first (output bit 0), and flipping any run of 1..6 adjacent shuffled bits of a valid codeword
// gives a non-zero Hamming syndrome (computed here from the codeword
// positions 1..19 of the unshuffled group).
module tb_eds_shuffler;
  int checks = 0, failures = 0;
  logic [1:0]  sel;
  logic [18:0] din, dout;

  eds_shuffler dut (.sel(sel), .din(din), .dout(dout));

  localparam int CW [19] = '{1, 2, 4, 8, 16, 3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19};

  initial begin
    int src [19];
    for (int p = 0; p < 4; p++) begin
      sel = 2'(p);
      for (int i = 0; i < 19; i++) begin
        din = 19'd1 << i;
        #1;
        checks++;
        if ($countones(dout) != 1) begin failures++; $display("FAIL p=%0d bit %0d not one-hot", p, i); end
        for (int k = 0; k < 19; k++) if (dout[k]) src[k] = i;
        checks++;
        if (dout[i]) begin failures++; $display("FAIL p=%0d fixed point %0d", p, i); end
      end
      // runs of tampered stored bits
      for (int l = 1; l <= 6; l++)
        for (int k = 0; k + l <= 19; k++) begin
          int syn;
          syn = 0;
          for (int j = k; j < k + l; j++) syn ^= CW[src[j]];
          checks++;
          if (syn == 0) begin failures++; $display("FAIL p=%0d run %0d..%0d undetected", p, k, k+l-1); end
        end
    end
    // first stored bit of each pattern: group bits 6, 5, 14 and 3
    for (int p = 0; p < 4; p++) begin
      int first [4] = '{6, 5, 14, 3};
      sel = 2'(p); din = 19'd1 << first[p]; #1;
      checks++;
      if (dout != 19'd1) begin failures++; $display("FAIL pattern %0d bit %0d -> %b", p, first[p], dout); end
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
