// tb_link_controller: for the three link modes and all four combinations of
// productivity flags, checks the selected flit and the reported mode. In
// two-mode operation the link must loop back exactly when both flags are 0.
module tb_link_controller;
  import noc_pkg::*;

  flit_t own_out, remote_out;
  logic  own_p, remote_p;
  flit_t in2, inx, inl;
  logic  lb2, lbx, lbl;
  int checks = 0, failures = 0;

  link_controller #(.MODE(LINK_TWO_MODE)) dut (
    .own_out, .own_p, .remote_out, .remote_p, .in_flit(in2), .loopback(lb2));
  link_controller #(.MODE(LINK_FIXED_EXCHANGE)) dut_x (
    .own_out, .own_p, .remote_out, .remote_p, .in_flit(inx), .loopback(lbx));
  link_controller #(.MODE(LINK_FIXED_LOOPBACK)) dut_l (
    .own_out, .own_p, .remote_out, .remote_p, .in_flit(inl), .loopback(lbl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_lb;
    for (int k = 0; k < 200; k++) begin
      own_out = flit_t'({$urandom, $urandom});
      remote_out = flit_t'({$urandom, $urandom});
      own_p = k[0]; remote_p = k[1];
      #1;
      exp_lb = (k[1:0] == 2'b00);
      checks += 3;
      if (lb2 !== exp_lb || in2 !== (exp_lb ? own_out : remote_out)) begin
        failures++; $display("FAIL two-mode p=%0b/%0b lb=%0b", own_p, remote_p, lb2);
      end
      if (lbx !== 1'b0 || inx !== remote_out) begin failures++; $display("FAIL fixed exchange"); end
      if (lbl !== 1'b1 || inl !== own_out) begin failures++; $display("FAIL fixed loop-back"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
