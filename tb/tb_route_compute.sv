// tb_route_compute: self-checking test of the routing unit.
// Every (current, destination) pair of a 7x7 mesh is tried with random
// neighbour metrics, and with equal metrics, against a reference written
// from the routing rules: local when arrived; straight when the row or column
// matches; otherwise the productive neighbour with the lower metric, X on a
// tie. The Y-channel VC classes (eastbound VC0, westbound VC1, same column VC2)
// are checked too.
module tb_route_compute;
  import noc_pkg::*;
  coord_t cur_x, cur_y, dst_x, dst_y;
  cm_t [NUM_PORTS-1:0] nbr_cm;
  port_e out_port;
  logic [NUM_VCS-1:0] vc_mask;
  logic adaptive, chose_y, cm_tie;
  int checks = 0, failures = 0, n_adapt = 0, n_y = 0, n_tie = 0;

  route_compute dut (.cur_x, .cur_y, .dst_x, .dst_y, .nbr_cm, .out_port, .vc_mask,
                     .adaptive, .chose_y, .cm_tie);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++)
    for (int cx = 0; cx < MESH_X; cx++) for (int cy = 0; cy < MESH_Y; cy++)
    for (int dx = 0; dx < MESH_X; dx++) for (int dy = 0; dy < MESH_Y; dy++) begin
      port_e exp_p;
      logic [NUM_VCS-1:0] exp_m;
      port_e xp, yp;
      int cmx, cmy;
      cur_x = cx; cur_y = cy; dst_x = dx; dst_y = dy;
      for (int p = 0; p < NUM_PORTS; p++) nbr_cm[p] = cm_t'($urandom % 257);
      if (rep == 2) for (int p = 1; p < NUM_PORTS; p++) nbr_cm[p] = 9'd100;
      #1;
      xp = (dx > cx) ? P_EAST : P_WEST;
      yp = (dy < cy) ? P_NORTH : P_SOUTH;
      cmx = nbr_cm[xp]; cmy = nbr_cm[yp];
      if (dx == cx && dy == cy)      exp_p = P_LOCAL;
      else if (dx == cx)             exp_p = yp;
      else if (dy == cy)             exp_p = xp;
      else                           exp_p = (cmy < cmx) ? yp : xp;
      exp_m = 3'b111;
      if (exp_p == P_NORTH || exp_p == P_SOUTH) begin
        if (dx > cx) exp_m = 3'b001;
        else if (dx < cx) exp_m = 3'b010;
        else exp_m = 3'b100;
      end
      checks++;
      if (out_port != exp_p || vc_mask != exp_m ||
          adaptive != (dx != cx && dy != cy)) begin
        failures++;
        $display("(%0d,%0d)->(%0d,%0d): port=%0d exp=%0d mask=%b exp=%b", cx, cy, dx, dy,
                 out_port, exp_p, vc_mask, exp_m);
      end
      if (adaptive) begin
        n_adapt++;
        if (chose_y) n_y++;
        if (cm_tie) n_tie++;
      end
    end
    checks++;
    if (n_y == 0 || n_tie == 0 || n_y == n_adapt) begin
      failures++;
      $display("adaptive choices not exercised: %0d %0d %0d", n_adapt, n_y, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
