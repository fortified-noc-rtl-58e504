// address_extractor: recovers the fields the route computer needs from a
// flit stored in shuffled form. Combinational: the 19-bit group is
// de-shuffled with the router's pattern and the head bit, tail bit, source,
// destination and packet length are read at their nominal positions. NF and
// Tr are not shuffled and are read directly. A single altered bit of the
// group is corrected before the fields are read (a Hamming decoder of its
// own), so a flit changed while it sat in this router's buffer is still
// routed on its true header; the security decoder at the output corrects the
// flit itself and reports the alteration. Correcting here as well is this
// design's choice.
module address_extractor
  import fnoc_pkg::*;
(
  input  logic [PSEL_W-1:0] sel,
  input  flit_t             flit,
  output logic              head,
  output logic              tail,
  output addr_t             src,
  output addr_t             dst,
  output logic [3:0]        pl,
  output logic              nf,
  output logic              tr
);
  logic [N_GRP-1:0] raw, grp;
  logic [4:0]       unused_syn;
  logic             unused_det, unused_cor;

  eds_deshuffler u_dshuf (.sel(sel), .din(flit[63:GRP_LSB]), .dout(raw));

  hamming_decoder u_fix (
    .g_in(raw), .g_out(grp), .syndrome(unused_syn),
    .err_det(unused_det), .err_cor(unused_cor)
  );

  // grp[18:5] = flit[63:50] in unshuffled order
  assign head = grp[H_BIT - GRP_LSB];
  assign tail = grp[T_BIT - GRP_LSB];
  assign src  = grp[SRC_LSB - GRP_LSB +: 4];
  assign dst  = grp[DST_LSB - GRP_LSB +: 4];
  assign pl   = grp[PL_LSB - GRP_LSB +: 4];
  assign nf   = flit[NF_BIT];
  assign tr   = flit[TR_BIT];
endmodule
