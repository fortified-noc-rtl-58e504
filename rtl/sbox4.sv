// sbox4: one 4-bit substitution box of the core-side cipher.
// Combinational. With INVERSE = 0 it maps x to S_INDEX(x) taken from the
// table fnoc_pkg::SBOX_TAB; with INVERSE = 1 it maps y back to x. The cipher
// uses a different S-box function at each of its 16 nibble positions, none of
// which has a fixed point or an opposite point, as the design requires; the
// table contents themselves are this design's choice.
module sbox4
  import fnoc_pkg::*;
#(
  parameter int unsigned INDEX   = 0,
  parameter bit          INVERSE = 1'b0
) (
  input  logic [3:0] x,
  output logic [3:0] y
);
  localparam logic [63:0] TAB = SBOX_TAB[INDEX % 16];

  always_comb begin
    y = '0;
    if (!INVERSE) begin
      y = TAB[4*x +: 4];
    end else begin
      for (int v = 0; v < 16; v++)
        if (TAB[4*v +: 4] == x) y = 4'(v);
    end
  end
endmodule
