// tb_route_compute: checks the productive-port computation against a model
// that works on signed coordinate differences, for random and exhaustive
// cases on an 8x8 grid, including invalid flits and locally addressed flits.
module tb_route_compute;
  import noc_pkg::*;

  flit_t  flit;
  coord_t cur_x, cur_y;
  logic [NUM_DIRS-1:0] prod;
  logic   is_local;
  int checks = 0, failures = 0;

  route_compute dut (.flit, .cur_x, .cur_y, .prod, .is_local);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int dx, dy;
    logic [3:0] exp_p;
    logic exp_l;
    dx = int'(flit.dst_x) - int'(cur_x);
    dy = int'(flit.dst_y) - int'(cur_y);
    exp_p = flit.valid ? {dx < 0, dy > 0, dx > 0, dy < 0} : 4'b0;  // {W,S,E,N}
    exp_l = flit.valid && dx == 0 && dy == 0;
    checks++;
    if (prod !== exp_p || is_local !== exp_l) begin
      failures++;
      $display("FAIL dst=(%0d,%0d) cur=(%0d,%0d) v=%0b prod=%b exp=%b local=%b",
               flit.dst_x, flit.dst_y, cur_x, cur_y, flit.valid, prod, exp_p, is_local);
    end
    if (flit.valid) begin
      checks++;
      if ($countones(prod) != (dx != 0) + (dy != 0)) failures++;
    end
  endtask

  initial begin
    flit = '0;
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
      for (int c = 0; c < 8; c++) for (int d = 0; d < 8; d++) begin
        flit.valid = 1'b1;
        flit.dst_x = coord_t'(a); flit.dst_y = coord_t'(b);
        cur_x = coord_t'(c); cur_y = coord_t'(d);
        #1 check_one();
      end
    for (int k = 0; k < 200; k++) begin
      flit = flit_t'({$urandom, $urandom});
      flit.valid = $urandom_range(0, 1);
      cur_x = coord_t'($urandom); cur_y = coord_t'($urandom);
      #1 check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
