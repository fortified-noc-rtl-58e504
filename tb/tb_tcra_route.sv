// tb_tcra_route: (1) with no Trojan direction flagged the route is plain XY
// for every source/destination pair; (2) the live-lock case of the design:
// at router 14 (x=2,y=3), destination 3 (x=3,y=0), east flagged -> north;
// (3) walking packets hop by hop through the 4x4 mesh with the neighbours of
// a Trojan router having their direction registers pointing at it, every
// packet not addressed to that router reaches its destination within 12
// hops without entering it, never leaves the mesh, and packets addressed to
// it still arrive.
module tb_tcra_route;
  import fnoc_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] lx, ly, dx, dy;
  logic       nf_in, nf_out;
  logic [4:1] news;
  dir_e       dir;

  tcra_route dut (.lx, .ly, .dx, .dy, .nf_in, .news, .dir, .nf_out);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [4:1] news_for(int x, int y, int tx, int ty);
    logic [4:1] n;
    n = '0;
    if (x == tx && y == ty + 1) n[1] = 1'b1;   // Trojan to the north
    if (y == ty && x == tx - 1) n[2] = 1'b1;   // east
    if (x == tx && y == ty - 1) n[3] = 1'b1;   // south
    if (y == ty && x == tx + 1) n[4] = 1'b1;   // west
    return n;
  endfunction

  initial begin
    // (1) plain XY
    #1;
    nf_in = 0; news = 0;
    #1;
    for (int s = 0; s < 16; s++)
      for (int d = 0; d < 16; d++) begin
        dir_e e;
        lx = 2'(s % 4); ly = 2'(s / 4); dx = 2'(d % 4); dy = 2'(d / 4);
        #1;
        if (dx > lx)      e = DIR_EAST;
        else if (dx < lx) e = DIR_WEST;
        else if (dy < ly) e = DIR_NORTH;
        else if (dy > ly) e = DIR_SOUTH;
        else              e = DIR_LOCAL;
        chk(dir == e && !nf_out, $sformatf("XY %0d->%0d got %s", s, d, dir.name()));
      end
    // (2) live-lock reroute at router 14
    lx = 2; ly = 3; dx = 3; dy = 0; nf_in = 0; news = 4'b0010; #1;
    chk(dir == DIR_NORTH, $sformatf("router 14 east flagged -> %s", dir.name()));
    // column detour sets NF: at (2,3) going to (2,0) with north flagged
    lx = 2; ly = 3; dx = 2; dy = 0; news = 4'b0001; #1;
    chk(dir == DIR_WEST && nf_out, "column detour west with NF");
    lx = 0; ly = 3; dx = 0; dy = 0; news = 4'b0001; #1;
    chk(dir == DIR_EAST && nf_out, "column detour east at west edge");
    // (3) walks
    for (int t = 0; t < 16; t++) begin
      int tx, ty;
      tx = t % 4; ty = t / 4;
      for (int s = 0; s < 16; s++) begin
        if (s == t) continue;
        for (int d = 0; d < 16; d++) begin
          int x, y, hops;
          logic nf;
          bit hit_t, off, arrived;
          x = s % 4; y = s / 4; nf = 0; hops = 0; hit_t = 0; off = 0; arrived = 0;
          while (hops < 12 && !arrived && !off && !(hit_t && d != t)) begin
            lx = 2'(x); ly = 2'(y); dx = 2'(d % 4); dy = 2'(d / 4); nf_in = nf;
            news = news_for(x, y, tx, ty);
            #1;
            nf = nf_out;
            case (dir)
              DIR_LOCAL: arrived = 1;
              DIR_NORTH: if (y == 0) off = 1; else y--;
              DIR_SOUTH: if (y == 3) off = 1; else y++;
              DIR_EAST:  if (x == 3) off = 1; else x++;
              DIR_WEST:  if (x == 0) off = 1; else x--;
              default:   off = 1;
            endcase
            if (!arrived) hops++;
            if (x == tx && y == ty && !arrived) hit_t = (d != t);
          end
          chk(!off, $sformatf("T=%0d %0d->%0d leaves mesh", t, s, d));
          chk(arrived, $sformatf("T=%0d %0d->%0d not delivered (hops %0d, via T %0b)", t, s, d, hops, hit_t));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
