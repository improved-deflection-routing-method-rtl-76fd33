// tb_noc_workload_chipper: injection-rate sweep on two 8x8 meshes of CHIPPER
// routers, with two-mode links and with fixed links; see noc_workload_bench
// for what is measured and checked.
module tb_noc_workload_chipper;
  import noc_pkg::*;
  logic done;
  noc_workload_bench #(.ARCH(ARCH_CHIPPER)) bench (.done);
  initial begin
    wait (done);
    $finish;
  end
endmodule
