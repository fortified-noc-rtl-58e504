// hw_trojan: model of the hardware Trojan threat used to evaluate the
// fortified router; it is not part of the protection. One instance sits on
// the read side of an input buffer and on that port's route-computer output,
// following the Trojan model of a trigger detector, a Trojan design that
// forms modified data, and a payload-delivery multiplexer that replaces the
// normal path.
// Trigger: while enable is high, every flit leaving the buffer is an
// occurrence; after TRIG_COUNT occurrences the Trojan is active. Payload,
// applied to what the Trojan believes are header fields at their nominal
// bit positions (it does not know the shuffle):
//   HBT clears the head bit of flits whose bit 63 is set,
//   DAT flips two destination address bits, PLT flips packet length bits,
//   DLT overwrites the destination with the local node address,
//   LLT clears the tail bit of flits whose bit 62 is set and turns a
//   north-bound route into a west-bound one.
// The trigger counter and the bit choices are this design's choices.
module hw_trojan
  import fnoc_pkg::*;
#(
  parameter addr_t       LOCAL_ADDR = 4'd0,
  parameter int unsigned TRIG_COUNT = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,
  input  ht_mode_e mode,
  input  flit_t    flit_in,
  input  logic     pop,        // the flit on flit_in leaves the buffer
  output flit_t    flit_out,
  input  dir_e     route_in,
  output dir_e     route_out,
  output logic     active,
  output logic     tampering   // payload currently applied to flit_out
);
  logic [7:0] occ;
  flit_t      modified;

  // Trigger detector
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   occ <= '0;
    else if (enable && pop && occ != 8'hFF)       occ <= occ + 1'b1;
  end
  assign active = enable && (mode != HT_NONE) && (occ >= 8'(TRIG_COUNT));

  // Trojan design: the modified data
  always_comb begin
    modified = flit_in;
    unique case (mode)
      HT_HBT:  modified[H_BIT] = 1'b0;
      HT_DAT:  modified[DST_LSB +: 4] = flit_in[DST_LSB +: 4] ^ 4'b0110;
      HT_PLT:  modified[PL_LSB +: 4]  = flit_in[PL_LSB +: 4] ^ 4'b0011;
      HT_DLT:  modified[DST_LSB +: 4] = LOCAL_ADDR;
      HT_LLT:  modified[T_BIT] = 1'b0;
      default: modified = flit_in;
    endcase
  end

  // Payload delivery
  always_comb begin
    tampering = 1'b0;
    if (active) begin
      if (mode == HT_LLT) tampering = flit_in[T_BIT];
      else                tampering = flit_in[H_BIT];
    end
    flit_out  = tampering ? modified : flit_in;
    route_out = (active && mode == HT_LLT && route_in == DIR_NORTH) ? DIR_WEST : route_in;
  end
endmodule
