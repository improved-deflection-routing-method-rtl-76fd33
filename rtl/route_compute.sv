// route_compute: productive output ports of one flit in a 2D mesh.
//
// A port is productive when a hop through it brings the flit one step closer
// to its destination. In a 2D mesh a flit has 0 productive ports (it is
// addressed to this router), 1 (it is already on one axis of its
// destination) or 2 (otherwise). An invalid flit has none. The router
// coordinates are inputs so one module serves every mesh position.
// Purely combinational.
module route_compute
  import noc_pkg::*;
(
  input  flit_t               flit,
  input  coord_t              cur_x,
  input  coord_t              cur_y,
  output logic [NUM_DIRS-1:0] prod,      // productive ports, bit index = dir_e
  output logic                is_local   // valid flit addressed to this router
);

  always_comb begin
    prod = '0;
    if (flit.valid) begin
      prod[DIR_N] = (flit.dst_y < cur_y);
      prod[DIR_S] = (flit.dst_y > cur_y);
      prod[DIR_E] = (flit.dst_x > cur_x);
      prod[DIR_W] = (flit.dst_x < cur_x);
    end
    is_local = flit.valid && (flit.dst_x == cur_x) && (flit.dst_y == cur_y);
  end

endmodule
