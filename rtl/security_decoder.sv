// security_decoder: the block at every router output, after the output
// buffer. Combinational. The de-shuffler restores the 19-bit group
// flit[63:45]; ED computes the Hamming syndrome and EC corrects a single-bit
// change; TE sets the Tr bit (flit[0]) of the outgoing flit when ED found an
// error, so the next router learns that this router altered the flit. A flit
// without error leaves with the Tr value it has (the arbiter cleared it).
module security_decoder
  import fnoc_pkg::*;
(
  input  logic [PSEL_W-1:0] sel,
  input  flit_t             flit_in,
  output flit_t             flit_out,
  output logic              err_det,
  output logic              err_cor
);
  logic [N_GRP-1:0] grp;
  logic [N_GRP-1:0] grp_fix;
  logic [4:0]       syn;

  eds_deshuffler  u_dshuf (.sel(sel), .din(flit_in[63:GRP_LSB]), .dout(grp));
  hamming_decoder u_hdec  (.g_in(grp), .g_out(grp_fix), .syndrome(syn),
                           .err_det(err_det), .err_cor(err_cor));

  always_comb begin
    flit_out              = {grp_fix, flit_in[GRP_LSB-1:0]};
    flit_out[TR_BIT]      = flit_in[TR_BIT] | err_det;   // TE block
  end
endmodule
