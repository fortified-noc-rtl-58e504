// trojan_dir_regs: Tr checker and the four Trojan direction indication
// registers (N, E, W, S) of the router's arbiter.
// A flit waiting at the head of the north, east, south or west input buffer
// with its Tr bit set was found altered by the neighbour on that side, so the
// register of that direction is set. The registers are sticky until reset
// (clearing is not described; this is this design's choice). news_eff
// includes a detection in the current cycle so the flit that carries the
// alarm is already routed around the suspect router.
// Index i of every vector is a dir_e value: 1=N, 2=E, 3=S, 4=W.
module trojan_dir_regs (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:1] flit_present,   // input buffer i is not empty
  input  logic [4:1] flit_tr,        // Tr bit of the flit at its head
  output logic [4:1] news_q,
  output logic [4:1] news_eff
);
  logic [4:1] det;
  assign det      = flit_present & flit_tr;
  assign news_eff = news_q | det;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) news_q <= '0;
    else        news_q <= news_q | det;
  end
endmodule
