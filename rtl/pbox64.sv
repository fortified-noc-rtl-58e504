// pbox64: keyed 64-bit bit permutation of the core-side cipher.
// Combinational. Forward direction: input bit i is moved to output bit
// (i*mult + add) mod 64, with mult forced odd so the map is always a
// bijection; output bit o therefore reads input bit (o - add)*mult^-1 mod 64,
// where the inverse of an odd mult modulo 64 is mult*(2 - mult*mult). The
// inverse direction (INVERSE = 1) reads input bit (o*mult + add) mod 64. Each
// bit is one 64:1 multiplexer. Each secure core has its own key
// (fnoc_pkg::core_key), so the permutation is unique per core as the design
// asks; the affine form of the permutation is this design's choice.
module pbox64
  import fnoc_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  pkey_t       key,
  input  logic [63:0] din,
  output logic [63:0] dout
);
  logic [5:0] m, minv;
  assign m    = key.mult | 6'd1;
  assign minv = 6'(m * 6'(6'd2 - 6'(m * m)));

  for (genvar o = 0; o < 64; o++) begin : g_bit
    logic [5:0] src;
    if (INVERSE) begin : g_inv
      assign src = 6'(6'(o) * m + key.add);
    end else begin : g_fwd
      assign src = 6'(6'(6'(o) - key.add) * minv);
    end
    assign dout[o] = din[src];
  end
endmodule
