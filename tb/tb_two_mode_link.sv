// tb_two_mode_link: drives both sides of a link with random flits and flags.
// Exchange mode must cross the flits, loop-back mode (both flags 0) must
// return each flit to its own side; a fixed link must always exchange.
module tb_two_mode_link;
  import noc_pkg::*;

  flit_t a_out, b_out, a_in, b_in, fa_in, fb_in;
  logic  a_p, b_p, loopback, f_loopback;
  int checks = 0, failures = 0;
  int n_lb = 0, n_ex = 0;

  two_mode_link dut (.a_out, .a_p, .b_out, .b_p, .a_in, .b_in, .loopback);
  two_mode_link #(.FIXED(1'b1)) dut_f (.a_out, .a_p, .b_out, .b_p,
                                       .a_in(fa_in), .b_in(fb_in), .loopback(f_loopback));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_lb;
    for (int k = 0; k < 400; k++) begin
      a_out = flit_t'({$urandom, $urandom});
      b_out = flit_t'({$urandom, $urandom});
      a_p = $urandom_range(0, 1); b_p = $urandom_range(0, 1);
      #1;
      exp_lb = !a_p && !b_p;
      if (exp_lb) n_lb++; else n_ex++;
      checks += 2;
      if (loopback !== exp_lb || a_in !== (exp_lb ? a_out : b_out) || b_in !== (exp_lb ? b_out : a_out)) begin
        failures++; $display("FAIL p=%0b/%0b lb=%0b", a_p, b_p, loopback);
      end
      if (f_loopback !== 1'b0 || fa_in !== b_out || fb_in !== a_out) begin
        failures++; $display("FAIL fixed link");
      end
    end
    checks++;
    if (n_lb == 0 || n_ex == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
