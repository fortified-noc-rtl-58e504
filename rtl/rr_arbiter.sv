// rr_arbiter: round-robin arbiter used once per router output.
// Combinational grant (one-hot, at most one bit) among the request bits,
// starting the search at the position after the last accepted grant. The
// priority pointer moves only when advance is high, i.e. when the granted
// flit was actually transferred. Round-robin is this design's choice; the
// design only names an arbiter.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [$clog2(N)-1:0] grant_idx
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] ptr;

  always_comb begin
    int unsigned idx;
    logic        found;
    grant     = '0;
    grant_idx = '0;
    found     = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(ptr) + k) % N;
      if (!found && req[idx]) begin
        found      = 1'b1;
        grant[idx] = 1'b1;
        grant_idx  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                ptr <= '0;
    else if (advance && |req)  ptr <= (grant_idx == IW'(N-1)) ? '0 : grant_idx + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
