// tb_deflection_router: one BLESS router and one CHIPPER router at mesh
// position (3,4) are fed random flit sets (some addressed to the router
// itself) and random injection requests. One cycle after a set is presented
// on in_flits, the outputs are checked against a model:
//   - the oldest local flit is ejected, at most one per cycle;
//   - a flit is injected exactly when a slot is free after ejection;
//   - every remaining flit leaves on exactly one output, with age + 1;
//   - p is set exactly on ports productive for the flit they hold;
//   - BLESS: a strictly oldest flit with a productive port is not deflected.
// Counts deflections, ejections, injections and refused injections, and fails
// if any of them never happened. Reset must empty the router.
module tb_deflection_router;
  import noc_pkg::*;

  localparam int X = 3, Y = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t [NUM_DIRS-1:0] in_flits;
  logic  inj_valid;
  flit_t inj_flit;

  flit_t [1:0][NUM_DIRS-1:0] out_flits;
  logic  [1:0][NUM_DIRS-1:0] out_p, out_defl;
  logic  [1:0] inj_ready, ej_valid;
  flit_t [1:0] ej_flit;

  int checks = 0, failures = 0;
  int n_defl = 0, n_ej = 0, n_inj = 0, n_refused = 0, n_oldest = 0;

  deflection_router #(.ARCH(ARCH_BLESS), .X_POS(X), .Y_POS(Y)) dut_bless (
    .clk, .rst_n, .in_flits, .out_flits(out_flits[0]), .out_p(out_p[0]), .out_defl(out_defl[0]),
    .inj_valid, .inj_flit, .inj_ready(inj_ready[0]), .ej_valid(ej_valid[0]), .ej_flit(ej_flit[0]));
  deflection_router #(.ARCH(ARCH_CHIPPER), .X_POS(X), .Y_POS(Y)) dut_chipper (
    .clk, .rst_n, .in_flits, .out_flits(out_flits[1]), .out_p(out_p[1]), .out_defl(out_defl[1]),
    .inj_valid, .inj_flit, .inj_ready(inj_ready[1]), .ej_valid(ej_valid[1]), .ej_flit(ej_flit[1]));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] prodm(flit_t f);
    if (!f.valid) return 4'b0;
    return {f.dst_x < X, f.dst_y > Y, f.dst_x > X, f.dst_y < Y};
  endfunction

  function automatic logic same_flit(flit_t a, flit_t b);  // equal except age
    a.age = '0; b.age = '0;
    return a == b;
  endfunction

  task automatic check(int r, flit_t [NUM_DIRS-1:0] prev);
    int ej = -1, free_slot = -1, cnt, nflit, maxage, nmax, oldest;
    flit_t exp_out [$];
    for (int i = 0; i < NUM_DIRS; i++)
      if (prev[i].valid && prev[i].dst_x == X && prev[i].dst_y == Y &&
          (ej < 0 || prev[i].age > prev[ej].age)) ej = i;
    checks++;
    if (ej_valid[r] !== (ej >= 0) || (ej >= 0 && ej_flit[r] !== prev[ej])) begin
      failures++; $display("FAIL r%0d eject", r);
    end
    for (int i = 0; i < NUM_DIRS; i++) begin
      if (i != ej && prev[i].valid) exp_out.push_back(prev[i]);
      else if (free_slot < 0) free_slot = i;
    end
    checks++;
    if (inj_ready[r] !== (free_slot >= 0)) begin failures++; $display("FAIL r%0d inj_ready", r); end
    if (inj_valid && free_slot >= 0) begin
      flit_t f;
      f = inj_flit; f.valid = 1'b1; f.age = '0;
      exp_out.push_back(f);
    end
    // every expected flit exactly once, age incremented
    nflit = 0;
    for (int o = 0; o < NUM_DIRS; o++) if (out_flits[r][o].valid) nflit++;
    checks++;
    if (nflit != exp_out.size()) begin failures++; $display("FAIL r%0d flit count %0d/%0d", r, nflit, exp_out.size()); end
    foreach (exp_out[k]) begin
      cnt = 0;
      for (int o = 0; o < NUM_DIRS; o++)
        if (out_flits[r][o].valid && same_flit(out_flits[r][o], exp_out[k]) &&
            out_flits[r][o].age == exp_out[k].age + 1) cnt++;
      checks++;
      if (cnt != 1) begin failures++; $display("FAIL r%0d flit %0d seen %0d times", r, k, cnt); end
    end
    // productivity flags
    for (int o = 0; o < NUM_DIRS; o++) begin
      logic [3:0] pm;
      pm = prodm(out_flits[r][o]);
      checks++;
      if (out_p[r][o] !== pm[o] || out_defl[r][o] !== (out_flits[r][o].valid && !pm[o])) begin
        failures++; $display("FAIL r%0d p flag port %0d", r, o);
      end
      if (out_defl[r][o]) n_defl++;
    end
    // BLESS: strictly oldest flit is routed productively when it can be
    if (r == 0) begin
      maxage = -1; nmax = 0; oldest = -1;
      for (int o = 0; o < NUM_DIRS; o++) if (out_flits[r][o].valid) begin
        if (int'(out_flits[r][o].age) > maxage) begin maxage = out_flits[r][o].age; nmax = 1; oldest = o; end
        else if (int'(out_flits[r][o].age) == maxage) nmax++;
      end
      if (nmax == 1 && prodm(out_flits[r][oldest]) != 0) begin
        n_oldest++;
        checks++;
        if (!out_p[r][oldest]) begin failures++; $display("FAIL oldest flit deflected"); end
      end
      if (ej >= 0) n_ej++;
      if (inj_valid && free_slot >= 0) n_inj++;
      if (inj_valid && free_slot < 0) n_refused++;
    end
  endtask

  initial begin
    flit_t [NUM_DIRS-1:0] prev;
    int tag = 0;
    in_flits = '0; inj_valid = 1'b0; inj_flit = '0;
    repeat (3) @(posedge clk);
    #1;
    for (int r = 0; r < 2; r++) begin
      checks++;
      if (out_flits[r] != '0 || ej_valid[r] || !inj_ready[r]) begin failures++; $display("FAIL reset"); end
    end
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_DIRS; i++) begin
        in_flits[i] = '0;
        in_flits[i].valid = ($urandom_range(0, 9) < 7);
        in_flits[i].dst_x = ($urandom_range(0, 3) == 0) ? coord_t'(X) : coord_t'($urandom);
        in_flits[i].dst_y = ($urandom_range(0, 3) == 0) ? coord_t'(Y) : coord_t'($urandom);
        in_flits[i].src_x = coord_t'($urandom);
        in_flits[i].src_y = coord_t'($urandom);
        in_flits[i].age   = age_t'($urandom_range(0, 20));
        in_flits[i].data  = 32'(tag++);
      end
      prev = in_flits;
      @(posedge clk);
      #1;
      inj_valid = $urandom_range(0, 1);
      inj_flit = '0;
      inj_flit.dst_x = coord_t'($urandom); inj_flit.dst_y = coord_t'($urandom);
      inj_flit.age = age_t'($urandom);  // router must reset it to 0
      inj_flit.data = 32'(tag++);
      #1;
      check(0, prev);
      check(1, prev);
    end
    checks++;
    if (n_defl == 0 || n_ej == 0 || n_inj == 0 || n_refused == 0 || n_oldest == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: defl=%0d ej=%0d inj=%0d refused=%0d oldest=%0d",
               n_defl, n_ej, n_inj, n_refused, n_oldest);
    end
    $display("deflections=%0d ejections=%0d injections=%0d refused=%0d", n_defl, n_ej, n_inj, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
