// flit_decryptor: inverse of flit_encryptor, used by a trusted core on data
// words it receives. Combinational: each 4-bit set goes through the inverse of
// its S-box, then the inverse P-box of the sending core's key restores the bit
// order. The caller supplies the key of the source core.
module flit_decryptor
  import fnoc_pkg::*;
(
  input  pkey_t       key,
  input  logic [63:0] cipher,
  output logic [63:0] plain
);
  logic [63:0] unsubst;

  for (genvar s = 0; s < 16; s++) begin : g_sbox
    sbox4 #(.INDEX(s), .INVERSE(1'b1)) u_sbox (.x(cipher[4*s +: 4]), .y(unsubst[4*s +: 4]));
  end

  pbox64 #(.INVERSE(1'b1)) u_pbox (.key(key), .din(unsubst), .dout(plain));
endmodule
