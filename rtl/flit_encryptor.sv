// flit_encryptor: lightweight cipher applied by a trusted core to each 64-bit
// data word before it is handed to the network interface.
// Two combinational steps: the keyed P-box permutes the 64 bits, then the word
// is cut into sixteen 4-bit sets, each passed through its own S-box
// (sbox4 INDEX 0..15, set s = bits [4s+3:4s]). The structure follows the
// design; key and table values are this design's choice.
module flit_encryptor
  import fnoc_pkg::*;
(
  input  pkey_t       key,
  input  logic [63:0] plain,
  output logic [63:0] cipher
);
  logic [63:0] permuted;

  pbox64 #(.INVERSE(1'b0)) u_pbox (.key(key), .din(plain), .dout(permuted));

  for (genvar s = 0; s < 16; s++) begin : g_sbox
    sbox4 #(.INDEX(s), .INVERSE(1'b0)) u_sbox (.x(permuted[4*s +: 4]), .y(cipher[4*s +: 4]));
  end
endmodule
