// tcra_route: route computer running the Trojan Cognizant Routing Algorithm.
// Combinational. With no Trojan direction register set it is plain XY
// (X-first) routing. When the next hop in the preferred direction is flagged
// by a NEWS register, it steps around it: in the destination column it moves
// one column aside (east at the west edge, west otherwise) and sets the
// packet's North-First flag; travelling in X it moves one row up (down at the
// top edge), or towards the destination row. A flagged neighbour is still
// used when it is the destination itself. The branch structure follows the
// published algorithm. Two points are this design's reading: the "destination
// is the next router" test in the X branches also requires the same row, and
// a packet whose NF flag is set travels Y-first (it goes straight towards the
// destination row, sidestepping towards the destination column if that
// direction is flagged) and keeps NF set.
// news[1]=N, news[2]=E, news[3]=S, news[4]=W (dir_e numbering).
module tcra_route
  import fnoc_pkg::*;
(
  input  logic [1:0] lx,
  input  logic [1:0] ly,
  input  logic [1:0] dx,
  input  logic [1:0] dy,
  input  logic       nf_in,
  input  logic [4:1] news,
  output dir_e       dir,
  output logic       nf_out
);
  logic n_b, e_b, s_b, w_b;
  assign n_b = news[DIR_NORTH];
  assign e_b = news[DIR_EAST];
  assign s_b = news[DIR_SOUTH];
  assign w_b = news[DIR_WEST];

  always_comb begin
    dir_e xd;
    logic xnf;
    // ---- X-first branch (Algorithm 1) ----
    xnf = 1'b0;
    if (dx == lx) begin
      if (dy == ly)                            xd = DIR_LOCAL;
      else if (dy < ly) begin
        if (!n_b)                              xd = DIR_NORTH;
        else if (ly - dy == 2'd1)              xd = DIR_NORTH;
        else if (lx == 2'd0) begin             xd = DIR_EAST; xnf = 1'b1; end
        else begin                             xd = DIR_WEST; xnf = 1'b1; end
      end else begin
        if (!s_b)                              xd = DIR_SOUTH;
        else if (dy - ly == 2'd1)              xd = DIR_SOUTH;
        else if (lx == 2'd0) begin             xd = DIR_EAST; xnf = 1'b1; end
        else begin                             xd = DIR_WEST; xnf = 1'b1; end
      end
    end else if (dx > lx) begin
      if (!e_b)                                xd = DIR_EAST;
      else if (dx - lx == 2'd1 && dy == ly)    xd = DIR_EAST;
      else if (dy == ly)                       xd = (ly == 2'd0) ? DIR_SOUTH : DIR_NORTH;
      else if (dy > ly)                        xd = DIR_SOUTH;
      else                                     xd = DIR_NORTH;
    end else begin
      if (!w_b)                                xd = DIR_WEST;
      else if (lx - dx == 2'd1 && dy == ly)    xd = DIR_WEST;
      else if (dy == ly)                       xd = (ly == 2'd0) ? DIR_SOUTH : DIR_NORTH;
      else if (dy > ly)                        xd = DIR_SOUTH;
      else                                     xd = DIR_NORTH;
    end

    dir    = xd;
    nf_out = nf_in | xnf;

    // ---- Y-first phase once NF is set ----
    if (nf_in && dy != ly && dx != lx) begin
      if (dy < ly) begin
        if (!n_b)            dir = DIR_NORTH;
        else if (dx > lx)    dir = DIR_EAST;
        else                 dir = DIR_WEST;
      end else begin
        if (!s_b)            dir = DIR_SOUTH;
        else if (dx > lx)    dir = DIR_EAST;
        else                 dir = DIR_WEST;
      end
    end
  end
endmodule
