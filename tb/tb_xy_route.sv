// tb_xy_route: exhaustive check of XY routing over a 4x4 coordinate space:
// x is corrected first, then y, then the local port.
module tb_xy_route;
  import snn_pkg::*;
  naddr_t dst;
  logic [1:0] my_x, my_y;
  port_e out_port, exp_port;
  int checks = 0, failures = 0;

  xy_route dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mx = 0; mx < 4; mx++)
      for (int my = 0; my < 4; my++)
        for (int dx = 0; dx < 4; dx++)
          for (int dy = 0; dy < 4; dy++) begin
            my_x = 2'(mx); my_y = 2'(my);
            dst = '{y: 2'(dy), x: 2'(dx), slot: 4'($urandom)};
            if (dx > mx)      exp_port = PORT_E;
            else if (dx < mx) exp_port = PORT_W;
            else if (dy > my) exp_port = PORT_S;
            else if (dy < my) exp_port = PORT_N;
            else              exp_port = PORT_L;
            #1;
            checks++;
            if (out_port != exp_port) begin
              failures++;
              $display("FAIL: at (%0d,%0d) dst (%0d,%0d) got %0d want %0d", mx, my, dx, dy, out_port, exp_port);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
