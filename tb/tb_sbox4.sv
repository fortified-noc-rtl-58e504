// tb_sbox4: checks all 16 S-box functions: each is a bijection, has no fixed
// point (S(x) != x) and no opposite point (S(x) != ~x), the inverse S-box
// undoes it, and S-box 0 matches its expected table.
module tb_sbox4;
  int checks = 0, failures = 0;
  logic [3:0] x;
  logic [3:0] y    [16];
  logic [3:0] back [16];

  for (genvar s = 0; s < 16; s++) begin : g
    sbox4 #(.INDEX(s), .INVERSE(1'b0)) u_f (.x(x),    .y(y[s]));
    sbox4 #(.INDEX(s), .INVERSE(1'b1)) u_i (.x(y[s]), .y(back[s]));
  end

  // expected S-box 0, entry for x = 0..15
  localparam logic [3:0] EXP0 [16] = '{4'he, 4'h0, 4'hc, 4'h8, 4'h9, 4'h2, 4'hf, 4'h1,
                                       4'h6, 4'hd, 4'h7, 4'h5, 4'h4, 4'ha, 4'h3, 4'hb};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] seen [16];
    for (int s = 0; s < 16; s++) seen[s] = '0;
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      check(y[0] == EXP0[v], $sformatf("sbox0(%0d)=%h", v, y[0]));
      for (int s = 0; s < 16; s++) begin
        check(y[s] != x,     $sformatf("fixed point s=%0d x=%0d", s, v));
        check(y[s] != ~x,    $sformatf("opposite point s=%0d x=%0d", s, v));
        check(back[s] == x,  $sformatf("inverse s=%0d x=%0d", s, v));
        seen[s][y[s]] = 1'b1;
      end
    end
    for (int s = 0; s < 16; s++) check(seen[s] == 16'hFFFF, $sformatf("bijection s=%0d", s));
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
