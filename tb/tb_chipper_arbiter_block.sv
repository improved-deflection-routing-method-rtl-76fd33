// tb_chipper_arbiter_block: all combinations of input validity, wants and
// priority. A reference model picks the winner and its output; the block
// must route both flits to distinct outputs accordingly.
module tb_chipper_arbiter_block;
  import noc_pkg::*;

  flit_t in_a, in_b, out_0, out_1;
  logic [1:0] want_a, want_b;
  logic prio, swap;
  int checks = 0, failures = 0;

  chipper_arbiter_block dut (.in_a, .in_b, .want_a, .want_b, .prio, .out_0, .out_1, .swap);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b_wins, wsel, e_swap;
    logic [1:0] ww;
    for (int rep = 0; rep < 4; rep++)
    for (int v = 0; v < 4; v++)
    for (int wa = 0; wa < 4; wa++)
    for (int wb = 0; wb < 4; wb++)
    for (int p = 0; p < 2; p++) begin
      in_a = flit_t'({$urandom, $urandom}); in_a.valid = v[0];
      in_b = flit_t'({$urandom, $urandom}); in_b.valid = v[1];
      want_a = 2'(wa); want_b = 2'(wb); prio = p[0];
      #1;
      b_wins = v[1] && (!v[0] || p[0]);
      ww = b_wins ? want_b : want_a;
      wsel = ww[0] ? 1'b0 : (ww[1] ? 1'b1 : 1'b0);   // winner's output
      e_swap = b_wins ? (wsel == 1'b0) : (wsel == 1'b1);
      checks++;
      if (swap !== e_swap || out_0 !== (e_swap ? in_b : in_a) || out_1 !== (e_swap ? in_a : in_b)) begin
        failures++;
        $display("FAIL v=%0d wa=%0d wb=%0d p=%0d swap=%b", v, wa, wb, p, swap);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
