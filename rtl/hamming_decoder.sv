// hamming_decoder: ED and EC blocks of the router's security decoder.
// Combinational. The syndrome is the XOR of the codeword positions of all set
// bits of the 19-bit group (g[4:0] parity, g[18:5] data, positions as in
// hamming_encoder); syndrome bit j is one XOR tree. A non-zero syndrome means
// the group was altered (err_det, the ED output). When the syndrome names one
// of the 19 positions, that bit is flipped back (err_cor, the EC output); a
// multi-bit change can still be detected but may be mis-corrected, which is
// inherent to a Hamming code.
module hamming_decoder
  import fnoc_pkg::*;
(
  input  logic [N_GRP-1:0] g_in,
  output logic [N_GRP-1:0] g_out,
  output logic [4:0]       syndrome,
  output logic             err_det,
  output logic             err_cor
);
  logic [N_GRP-1:0] hit;

  for (genvar j = 0; j < N_PAR; j++) begin : g_syn
    localparam logic [N_GRP-1:0] M = syn_mask(j);
    assign syndrome[j] = ^(g_in & M);
  end

  for (genvar i = 0; i < N_GRP; i++) begin : g_fix
    assign hit[i]   = (syndrome == 5'(CW_POS[i]));
    assign g_out[i] = g_in[i] ^ hit[i];
  end

  assign err_det = (syndrome != '0);
  assign err_cor = |hit;
endmodule
