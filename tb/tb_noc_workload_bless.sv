// tb_noc_workload_bless: injection-rate sweep on two 8x8 meshes of BLESS
// routers, with two-mode links and with fixed links; see noc_workload_bench
// for what is measured and checked.
module tb_noc_workload_bless;
  import noc_pkg::*;
  logic done;
  noc_workload_bench #(.ARCH(ARCH_BLESS)) bench (.done);
  initial begin
    wait (done);
    $finish;
  end
endmodule
