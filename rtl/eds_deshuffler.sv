// eds_deshuffler: Error Detectable De-shuffler, the inverse of eds_shuffler
// for the same pattern selection bits. Combinational: one multiplexer per
// group bit g picks the stored bit at position EDS_INV(sel)[g], the inverse
// of the shuffle pattern.
module eds_deshuffler
  import fnoc_pkg::*;
(
  input  logic [PSEL_W-1:0] sel,
  input  logic [N_GRP-1:0]  din,
  output logic [N_GRP-1:0]  dout
);
  for (genvar p = 0; p < N_PAT; p++) begin : g_inv
    localparam pat_row_t INV = inv_pat(p);
    logic [N_GRP-1:0] cand;
    for (genvar g = 0; g < N_GRP; g++) begin : g_bit
      assign cand[g] = din[INV[g]];
    end
  end

  for (genvar g = 0; g < N_GRP; g++) begin : g_mux
    logic [N_PAT-1:0] c;
    for (genvar p = 0; p < N_PAT; p++) begin : g_sel
      assign c[p] = g_inv[p].cand[g];
    end
    assign dout[g] = c[sel];
  end
endmodule
