// tb_chipper_permnet: random flit sets and priorities at random router
// positions. Checks that the network is a permutation (every input flit,
// tagged by a unique payload, leaves on exactly one output), that a flit
// alone in the router always reaches a productive port, and compares every
// output with a behavioural model of the two-stage network (stage 1: N/E and
// S/W blocks steering to the Y or X half; stage 2: N/S and E/W blocks).
module tb_chipper_permnet;
  import noc_pkg::*;

  flit_t [NUM_DIRS-1:0] in_flits, out_flits;
  coord_t cur_x, cur_y;
  logic [3:0] prio;
  int checks = 0, failures = 0;

  chipper_permnet dut (.in_flits, .cur_x, .cur_y, .prio, .out_flits);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] prodm(flit_t f);
    if (!f.valid) return 4'b0;
    return {f.dst_x < cur_x, f.dst_y > cur_y, f.dst_x > cur_x, f.dst_y < cur_y};
  endfunction

  // 2x2 block model: returns {out1, out0}
  function automatic void blk(input flit_t a, input flit_t b, input logic [1:0] wa,
                              input logic [1:0] wb, input logic p,
                              output flit_t o0, output flit_t o1);
    logic bw;
    logic [1:0] w;
    int to;
    bw = b.valid && (!a.valid || p);
    w = bw ? wb : wa;
    to = w[0] ? 0 : (w[1] ? 1 : 0);
    if (bw) begin
      if (to == 0) begin o0 = b; o1 = a; end else begin o1 = b; o0 = a; end
    end else begin
      if (to == 0) begin o0 = a; o1 = b; end else begin o1 = a; o0 = b; end
    end
  endfunction

  initial begin
    flit_t a0, a1, b0, b1;
    flit_t [3:0] e;
    logic [3:0] pm;
    int cnt, nvalid;
    int lone = 0;
    for (int k = 0; k < 5000; k++) begin
      cur_x = coord_t'($urandom); cur_y = coord_t'($urandom);
      prio = 4'($urandom);
      nvalid = 0;
      for (int i = 0; i < 4; i++) begin
        in_flits[i] = flit_t'({$urandom, $urandom});
        in_flits[i].valid = (k % 4 == 0) ? (i == k / 4 % 4) : ($urandom_range(0, 3) != 0);
        in_flits[i].data = 32'(k * 4 + i);
        if (in_flits[i].valid) nvalid++;
      end
      #1;
      // permutation
      for (int i = 0; i < 4; i++) if (in_flits[i].valid) begin
        cnt = 0;
        for (int o = 0; o < 4; o++) if (out_flits[o] === in_flits[i]) cnt++;
        checks++;
        if (cnt != 1) begin failures++; $display("FAIL flit %0d appears %0d times", i, cnt); end
      end
      // lone flit is routed productively
      if (nvalid == 1)
        for (int o = 0; o < 4; o++) if (out_flits[o].valid) begin
          pm = prodm(out_flits[o]);
          lone++;
          checks++;
          if (pm != 0 && !pm[o]) begin failures++; $display("FAIL lone flit deflected"); end
        end
      // reference network
      blk(in_flits[0], in_flits[1],
          {prodm(in_flits[0])[1] | prodm(in_flits[0])[3], prodm(in_flits[0])[0] | prodm(in_flits[0])[2]},
          {prodm(in_flits[1])[1] | prodm(in_flits[1])[3], prodm(in_flits[1])[0] | prodm(in_flits[1])[2]},
          prio[0], a0, a1);
      blk(in_flits[2], in_flits[3],
          {prodm(in_flits[2])[1] | prodm(in_flits[2])[3], prodm(in_flits[2])[0] | prodm(in_flits[2])[2]},
          {prodm(in_flits[3])[1] | prodm(in_flits[3])[3], prodm(in_flits[3])[0] | prodm(in_flits[3])[2]},
          prio[1], b0, b1);
      blk(a0, b0, {prodm(a0)[2], prodm(a0)[0]}, {prodm(b0)[2], prodm(b0)[0]}, prio[2], e[0], e[2]);
      blk(a1, b1, {prodm(a1)[3], prodm(a1)[1]}, {prodm(b1)[3], prodm(b1)[1]}, prio[3], e[1], e[3]);
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (out_flits[o] !== e[o]) begin failures++; $display("FAIL output %0d vs model", o); end
      end
    end
    checks++;
    if (lone == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
