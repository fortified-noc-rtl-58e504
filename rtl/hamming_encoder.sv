// hamming_encoder: parity generator of the router's security encoder.
// Combinational. The 14 crucial bits d[13:0] (flit[63:50]) are placed at the
// non-power-of-two positions 3,5,6,7,9..15,17,18,19 of a 19-bit Hamming
// codeword; parity bit p[j] is the XOR of the data bits whose codeword position
// has bit j set, so five XOR trees produce p[4:0], as in the parity generator of
// the design. The position assignment is this design's choice.
module hamming_encoder
  import fnoc_pkg::*;
(
  input  logic [N_DATA-1:0] d,
  output logic [N_PAR-1:0]  p
);
  for (genvar j = 0; j < N_PAR; j++) begin : g_par
    localparam logic [N_GRP-1:0] M = syn_mask(j);
    assign p[j] = ^(d & M[N_GRP-1:N_PAR]);
  end
endmodule
