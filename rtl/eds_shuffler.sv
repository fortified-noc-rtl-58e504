// eds_shuffler: Error Detectable Shuffler.
// Combinational: 19 multiplexers, one per output bit, each choosing one of the
// 19 input bits according to the pattern selection bits (sel), so the crucial
// header bits and their parity bits are stored in an order a Trojan cannot
// rely on. Output bit k = din[EDS_PAT[sel][k]]. The patterns (fnoc_pkg) are
// chosen so that no bit stays in place and any tampering with 1..6 adjacent
// stored bits gives a non-zero Hamming syndrome; four patterns are this
// design's choice.
module eds_shuffler
  import fnoc_pkg::*;
(
  input  logic [PSEL_W-1:0] sel,
  input  logic [N_GRP-1:0]  din,
  output logic [N_GRP-1:0]  dout
);
  for (genvar k = 0; k < N_GRP; k++) begin : g_mux
    logic [N_PAT-1:0] cand;
    for (genvar p = 0; p < N_PAT; p++) begin : g_pat
      assign cand[p] = din[EDS_PAT[p][k]];
    end
    assign dout[k] = cand[sel];
  end
endmodule
