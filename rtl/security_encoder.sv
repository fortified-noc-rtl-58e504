// security_encoder: the block at every router input, ahead of the input
// buffer. Combinational. The Hamming encoder computes 5 parity bits over the
// 14 crucial bits flit[63:50] and writes them into flit[49:45] (payload bits
// the sending core leaves as dummies); the Error Detectable Shuffler then
// reorders the 19-bit group flit[63:45] with the pattern chosen by sel. All
// other bits, including NF and Tr, pass unchanged.
module security_encoder
  import fnoc_pkg::*;
(
  input  logic [PSEL_W-1:0] sel,
  input  flit_t             flit_in,
  output flit_t             flit_out
);
  logic [N_PAR-1:0] par;
  logic [N_GRP-1:0] grp_shuf;

  hamming_encoder u_henc (.d(flit_in[63:50]), .p(par));
  eds_shuffler    u_shuf (.sel(sel), .din({flit_in[63:50], par}), .dout(grp_shuf));

  assign flit_out = {grp_shuf, flit_in[GRP_LSB-1:0]};
endmodule
