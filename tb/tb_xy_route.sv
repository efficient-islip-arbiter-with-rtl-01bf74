// tb_xy_route: every pair of (current, destination) nodes in the 8 x 8 mesh
// is checked against the x-first, then y rule.
module tb_xy_route;
  import islip_pkg::*;
  node_addr_t cur, dst;
  port_e port;
  int checks = 0, failures = 0;

  xy_route dut (.cur(cur), .dst(dst), .port(port));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        port_e exp;
        cur = node_addr_t'(a);
        dst = node_addr_t'(b);
        #1;
        if (int'(dst.x) > int'(cur.x)) exp = PORT_EAST;
        else if (int'(dst.x) < int'(cur.x)) exp = PORT_WEST;
        else if (int'(dst.y) > int'(cur.y)) exp = PORT_NORTH;
        else if (int'(dst.y) < int'(cur.y)) exp = PORT_SOUTH;
        else exp = PORT_LOCAL;
        checks++;
        if (port != exp) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
