// tb_noc_mesh: end-to-end test of the full 8x8 mesh at its default
// parameters (BLESS routers, two-mode links). Uniform random traffic runs at
// a low load, then at a load above saturation, then the network drains.
// Every flit must be delivered exactly once, to its destination, with its
// payload and source intact. Counted, and required at least once: injection,
// refused injection (no free slot), ejection, productive hop, deflection,
// loop-back of a deflected flit on an inner link, misrouting of a deflected
// flit (exchanged because the other side was productive) and loop-back at
// the mesh edge, and delivery at exactly one cycle per hop (no flit may be
// faster). Also reports throughput, latency and misrouting ratio.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int MX = 8, MY = 8, NODES = MX * MY;

  logic clk = 1'b0, rst_n = 1'b0;
  int   rate_pm = 0;
  logic  [NODES-1:0] inj_valid, inj_ready, ej_valid;
  flit_t [NODES-1:0] inj_flit, ej_flit;
  logic  [NODES-1:0][NUM_DIRS-1:0] port_valid, port_p, port_loopback;
  int checks = 0, failures = 0;

  noc_mesh dut (.clk, .rst_n, .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit,
                .port_valid, .port_p, .port_loopback);

  noc_traffic #(.MESH_X(MX), .MESH_Y(MY)) cores (
    .clk, .rst_n, .rate_pm, .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit,
    .port_valid, .port_p, .port_loopback);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog: generated=%0d delivered=%0d", cores.generated, cores.delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    int t0, d0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // low load
    rate_pm = 50;
    repeat (1000) @(posedge clk);
    checks++;
    if (cores.delivered == 0) begin failures++; $display("FAIL nothing delivered at low load"); end
    // overload: measure accepted throughput
    rate_pm = 600;
    repeat (500) @(posedge clk);
    t0 = cores.cycle; d0 = cores.delivered;
    repeat (1500) @(posedge clk);
    $display("accepted throughput at overload: %0.3f flits/node/cycle",
             real'(cores.delivered - d0) / real'((cores.cycle - t0) * NODES));
    // drain
    rate_pm = 0;
    for (int k = 0; k < 60000 && cores.outstanding > 0; k++) @(posedge clk);
    checks++;
    if (cores.outstanding != 0) begin
      failures++; $display("FAIL %0d flits not delivered", cores.outstanding);
    end
    checks++;
    if (cores.errors != 0) begin failures++; $display("FAIL %0d delivery errors", cores.errors); end
    checks++;
    if (cores.generated != cores.injected) failures++;
    checks += cores.delivered;   // each delivery was checked by the scoreboard
    $display("generated=%0d injected=%0d delivered=%0d avg latency=%0.2f max=%0d",
             cores.generated, cores.injected, cores.delivered,
             real'(cores.latency_sum) / real'(cores.delivered), cores.max_latency);
    $display("misrouting ratio=%0.4f (misroutes %0d / hops %0d)",
             real'(cores.misroutes) / real'(cores.hops), cores.misroutes, cores.hops);
    $display("mechanisms:");
    need("injection", cores.injected);
    need("refused injection", cores.refused);
    need("ejection", cores.delivered);
    need("productive hop", cores.productive);
    need("deflection", cores.deflections);
    need("inner-link loop-back", cores.loopbacks);
    need("misroute (exchange)", cores.misroutes);
    need("edge loop-back", cores.edge_loopbacks);
    need("one-cycle-per-hop delivery", cores.min_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
