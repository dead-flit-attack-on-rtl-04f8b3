// tb_route_xy: exhaustive check of XY routing for every router position and
// every destination tile, against coordinates worked out in the testbench,
// plus the document's example path from tile 4 to tile 15.
module tb_route_xy;
  import noc_pkg::*;
  logic [3:0] did;
  logic [1:0] cur_x, cur_y;
  port_e out_port;
  int checks = 0, failures = 0;

  route_xy dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_e exp;
    for (int r = 0; r < 16; r++) begin
      for (int d = 0; d < 16; d++) begin
        int rx, ry, dx, dy;
        rx = r % 4; ry = r / 4; dx = d % 4; dy = d / 4;
        if (dx > rx)      exp = PORT_EAST;
        else if (dx < rx) exp = PORT_WEST;
        else if (dy > ry) exp = PORT_SOUTH;
        else if (dy < ry) exp = PORT_NORTH;
        else              exp = PORT_LOCAL;
        cur_x = 2'(rx); cur_y = 2'(ry); did = 4'(d);
        #1;
        checks++;
        if (out_port != exp) begin
          failures++;
          $display("FAIL router %0d did %0d: %0d expected %0d", r, d, out_port, exp);
        end
      end
    end
    // Walk tile 4 -> tile 15: expect 4,5,6,7,11,15.
    begin
      int path[$], here;
      here = 4;
      path.push_back(here);
      while (here != 15 && path.size() < 10) begin
        cur_x = 2'(here % 4); cur_y = 2'(here / 4); did = 4'd15;
        #1;
        case (out_port)
          PORT_EAST:  here = here + 1;
          PORT_WEST:  here = here - 1;
          PORT_SOUTH: here = here + 4;
          PORT_NORTH: here = here - 4;
          default:    here = 15;
        endcase
        path.push_back(here);
      end
      checks++;
      if (path != '{4, 5, 6, 7, 11, 15}) begin
        failures++;
        $display("FAIL path 4->15 %p", path);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
