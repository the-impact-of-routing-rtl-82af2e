// tb_lasio_xyz_route - exhaustive check of the XYZ routing decision.
//
// Every (router, destination) pair of a 4x4x4 mesh is applied and the chosen
// port compared with a reference that walks the axis differences in x, y, z
// order. A final group checks the largest coordinates of the 4-bit fields.
module tb_lasio_xyz_route;
  import lasio_pkg::*;

  addr_t here, dst;
  port_e out_port;
  int    checks = 0, failures = 0;

  lasio_xyz_route dut (.here(here), .dst(dst), .out_port(out_port));

  function automatic port_e ref_route(input int hx, hy, hz, dx, dy, dz);
    if (dx != hx) return (dx > hx) ? P_EAST : P_WEST;
    if (dy != hy) return (dy > hy) ? P_NORTH : P_SOUTH;
    if (dz != hz) return (dz > hz) ? P_TOP : P_BOTTOM;
    return P_LOCAL;
  endfunction

  task automatic check(input int hx, hy, hz, dx, dy, dz);
    here = '{x: COORD_W'(hx), y: COORD_W'(hy), z: COORD_W'(hz)};
    dst  = '{x: COORD_W'(dx), y: COORD_W'(dy), z: COORD_W'(dz)};
    #1;
    checks++;
    if (out_port !== ref_route(hx, hy, hz, dx, dy, dz)) begin
      failures++;
      if (failures < 10)
        $display("FAIL here=%0d%0d%0d dst=%0d%0d%0d got %s", hx, hy, hz, dx, dy, dz, out_port.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int hx = 0; hx < 4; hx++) for (int hy = 0; hy < 4; hy++) for (int hz = 0; hz < 4; hz++)
      for (int dx = 0; dx < 4; dx++) for (int dy = 0; dy < 4; dy++) for (int dz = 0; dz < 4; dz++)
        check(hx, hy, hz, dx, dy, dz);
    check(15, 15, 15, 0, 15, 15);
    check(0, 0, 0, 15, 0, 0);
    check(7, 7, 0, 7, 7, 15);
    check(15, 15, 15, 15, 15, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
