// noc_workload_bench: the evaluated workload for one router type (shared by
// tb_noc_workload_bless and tb_noc_workload_chipper). Two 8x8 meshes with
// ARCH routers run side by side under the same uniform random traffic with
// Bernoulli (approximately Poisson) injection: one with two-mode links, one
// with conventional fixed links. The injection rate is swept from low load to
// beyond saturation; for each rate the bench reports the accepted
// throughput, the average latency of flits delivered in the window and the
// misrouting ratio (non-productive link traversals / all link traversals).
// Checked: every flit of both networks is delivered exactly once after a
// final drain; at every rate the two-mode links give a lower misrouting
// ratio than fixed links; and the saturation throughput (accepted
// throughput at the highest rate) with two-mode links is not below the one
// with fixed links.
module noc_workload_bench
  import noc_pkg::*;
#(
  parameter router_arch_e ARCH = ARCH_BLESS
) (
  output logic done   // the sweep has finished and TB_RESULT is printed
);

  localparam int MX = 8, MY = 8, NODES = MX * MY;
  localparam int NRATES = 7;
  localparam int RATES [NRATES] = '{50, 100, 150, 200, 250, 300, 600};
  localparam int WARM = 400, WINDOW = 1200;

  logic clk = 1'b0, rst_n = 1'b0;
  initial done = 1'b0;
  int   rate_pm = 0;
  int checks = 0, failures = 0;

  logic  [1:0][NODES-1:0] inj_valid, inj_ready, ej_valid;
  flit_t [1:0][NODES-1:0] inj_flit, ej_flit;
  logic  [1:0][NODES-1:0][NUM_DIRS-1:0] port_valid, port_p, port_loopback;

  // 0: two-mode links, 1: fixed links
  noc_mesh #(.ARCH(ARCH), .LINK_CTRL_EN(1'b1)) m0 (.clk, .rst_n,
    .inj_valid(inj_valid[0]), .inj_flit(inj_flit[0]), .inj_ready(inj_ready[0]), .ej_valid(ej_valid[0]),
    .ej_flit(ej_flit[0]), .port_valid(port_valid[0]), .port_p(port_p[0]), .port_loopback(port_loopback[0]));
  noc_mesh #(.ARCH(ARCH), .LINK_CTRL_EN(1'b0)) m1 (.clk, .rst_n,
    .inj_valid(inj_valid[1]), .inj_flit(inj_flit[1]), .inj_ready(inj_ready[1]), .ej_valid(ej_valid[1]),
    .ej_flit(ej_flit[1]), .port_valid(port_valid[1]), .port_p(port_p[1]), .port_loopback(port_loopback[1]));

  for (genvar c = 0; c < 2; c++) begin : g_cores
    noc_traffic #(.MESH_X(MX), .MESH_Y(MY)) cores (
      .clk, .rst_n, .rate_pm, .inj_valid(inj_valid[c]), .inj_flit(inj_flit[c]),
      .inj_ready(inj_ready[c]), .ej_valid(ej_valid[c]), .ej_flit(ej_flit[c]),
      .port_valid(port_valid[c]), .port_p(port_p[c]), .port_loopback(port_loopback[c]));
  end

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     st_del [2], st_hops [2], st_mis [2], st_cyc [2];
  longint st_lat [2];
  real    thr [2], mr [2], lat [2];

  task automatic snapshot();
    st_del[0] = g_cores[0].cores.delivered; st_hops[0] = g_cores[0].cores.hops;
    st_mis[0] = g_cores[0].cores.misroutes; st_cyc[0] = g_cores[0].cores.cycle;
    st_lat[0] = g_cores[0].cores.latency_sum;
    st_del[1] = g_cores[1].cores.delivered; st_hops[1] = g_cores[1].cores.hops;
    st_mis[1] = g_cores[1].cores.misroutes; st_cyc[1] = g_cores[1].cores.cycle;
    st_lat[1] = g_cores[1].cores.latency_sum;
  endtask

  task automatic measure();
    int d [2], h [2], m [2], cy [2];
    longint l [2];
    d[0] = g_cores[0].cores.delivered; h[0] = g_cores[0].cores.hops;
    m[0] = g_cores[0].cores.misroutes; cy[0] = g_cores[0].cores.cycle; l[0] = g_cores[0].cores.latency_sum;
    d[1] = g_cores[1].cores.delivered; h[1] = g_cores[1].cores.hops;
    m[1] = g_cores[1].cores.misroutes; cy[1] = g_cores[1].cores.cycle; l[1] = g_cores[1].cores.latency_sum;
    for (int c = 0; c < 2; c++) begin
      thr[c] = real'(d[c] - st_del[c]) / real'((cy[c] - st_cyc[c]) * NODES);
      mr[c]  = (h[c] == st_hops[c]) ? 0.0 : real'(m[c] - st_mis[c]) / real'(h[c] - st_hops[c]);
      lat[c] = (d[c] == st_del[c]) ? 0.0 : real'(l[c] - st_lat[c]) / real'(d[c] - st_del[c]);
    end
  endtask

  function automatic int total(string what);
    int s = 0;
    case (what)
      "outstanding": s = g_cores[0].cores.outstanding + g_cores[1].cores.outstanding;
      "errors":      s = g_cores[0].cores.errors + g_cores[1].cores.errors;
      default:       s = g_cores[0].cores.delivered + g_cores[1].cores.delivered;
    endcase
    return s;
  endfunction

  initial begin
    string name;
    name = (ARCH == ARCH_BLESS) ? "BLESS" : "CHIPPER";
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    $display("%s routers, 8x8 mesh, uniform random traffic", name);
    $display("rate  | two-mode links      | fixed links");
    $display("      | thr   lat    misr   | thr   lat    misr");
    for (int r = 0; r < NRATES; r++) begin
      rate_pm = RATES[r];
      repeat (WARM) @(posedge clk);
      snapshot();
      repeat (WINDOW) @(posedge clk);
      measure();
      $display("%0.3f | %0.3f %6.1f %0.3f  | %0.3f %6.1f %0.3f",
               real'(RATES[r]) / 1000.0, thr[0], lat[0], mr[0], thr[1], lat[1], mr[1]);
      checks++;
      if (!(mr[0] < mr[1])) begin failures++; $display("FAIL misrouting not reduced"); end
    end
    $display("%s saturation throughput: fixed %0.3f, two-mode %0.3f (%0.1f%% change); misrouting ratio %0.3f -> %0.3f",
             name, thr[1], thr[0], 100.0 * (thr[0] / thr[1] - 1.0), mr[1], mr[0]);
    checks++;
    if (thr[0] < thr[1]) begin failures++; $display("FAIL saturation throughput lower with two-mode links"); end
    rate_pm = 0;
    for (int k = 0; k < 200000 && total("outstanding") > 0; k++) @(posedge clk);
    checks += 2;
    if (total("outstanding") != 0) begin failures++; $display("FAIL %0d flits undelivered", total("outstanding")); end
    if (total("errors") != 0) begin failures++; $display("FAIL %0d delivery errors", total("errors")); end
    checks += total("delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  end
endmodule
