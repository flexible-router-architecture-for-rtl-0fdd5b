// tb_xy_route: exhaustive check of the XY routing logic.
// Three instances at different positions of a 5 x 5 mesh (corner, centre,
// edge) see every destination; the expected direction is worked out from
// the X-first rule separately.
module tb_xy_route;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  coord_t dx, dy;
  dir_e   d00, d22, d41;

  xy_route #(.X(0), .Y(0)) u00 (.dst_x(dx), .dst_y(dy), .dir(d00));
  xy_route #(.X(2), .Y(2)) u22 (.dst_x(dx), .dst_y(dy), .dir(d22));
  xy_route #(.X(4), .Y(1)) u41 (.dst_x(dx), .dst_y(dy), .dir(d41));

  function automatic dir_e ref_dir(int x, int y, int tx, int ty);
    if (tx != x) return (tx > x) ? DIR_E : DIR_W;
    if (ty != y) return (ty > y) ? DIR_N : DIR_S;
    return DIR_L;
  endfunction

  task automatic check(dir_e got, dir_e exp, string who);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s dst (%0d,%0d) got %s expected %s", who, dx, dy, got.name(), exp.name());
    end
  endtask

  initial begin
    for (int tx = 0; tx < 8; tx++)
      for (int ty = 0; ty < 8; ty++) begin
        dx = coord_t'(tx); dy = coord_t'(ty);
        #1;
        check(d00, ref_dir(0, 0, tx, ty), "(0,0)");
        check(d22, ref_dir(2, 2, tx, ty), "(2,2)");
        check(d41, ref_dir(4, 1, tx, ty), "(4,1)");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
