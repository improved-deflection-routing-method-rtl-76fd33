// tb_bless_allocator: random flit sets with frequent age ties. A reference
// model sorts the flits oldest-first (ties: lower input) and assigns ports one
// flit at a time; the allocator must match it exactly. Also checked: every
// valid flit leaves on exactly one port, and the oldest flit is never
// deflected when it has a productive port.
module tb_bless_allocator;
  import noc_pkg::*;

  logic [NUM_DIRS-1:0] in_valid, out_valid, deflected;
  age_t [NUM_DIRS-1:0] in_age;
  logic [NUM_DIRS-1:0][NUM_DIRS-1:0] in_prod;
  logic [NUM_DIRS-1:0][1:0] out_sel;
  int checks = 0, failures = 0;
  int n_defl = 0;

  bless_allocator dut (.in_valid, .in_age, .in_prod, .out_valid, .out_sel, .deflected);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[4];
    int tmp, cnt, port;
    logic [3:0] taken, e_valid, e_defl;
    logic [3:0][1:0] e_sel;
    for (int k = 0; k < 5000; k++) begin
      for (int i = 0; i < NUM_DIRS; i++) begin
        in_valid[i] = ($urandom_range(0, 4) != 0);
        in_age[i]   = age_t'($urandom_range(0, 5));
        case ($urandom_range(0, 3))            // 0, 1 or 2 productive ports
          0: in_prod[i] = 4'b0000;
          1: in_prod[i] = 4'(1 << $urandom_range(0, 3));
          default: in_prod[i] = $urandom_range(0, 1) ? 4'b0011 << (2 * $urandom_range(0, 1))
                                                      : (($urandom_range(0,1)) ? 4'b1001 : 4'b0110);
        endcase
      end
      #1;
      // reference: sort by age (desc), then index (asc)
      for (int i = 0; i < 4; i++) order[i] = i;
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 3 - a; b++)
          if (in_age[order[b+1]] > in_age[order[b]]) begin
            tmp = order[b]; order[b] = order[b+1]; order[b+1] = tmp;
          end
      taken = '0; e_valid = '0; e_sel = '0; e_defl = '0;
      for (int r = 0; r < 4; r++) begin
        int i;
        i = order[r];
        if (!in_valid[i]) continue;
        port = -1;
        for (int o = 0; o < 4; o++) if (port < 0 && in_prod[i][o] && !taken[o]) port = o;
        if (port < 0) begin
          e_defl[i] = 1'b1;
          for (int o = 0; o < 4; o++) if (port < 0 && !taken[o]) port = o;
        end
        taken[port] = 1'b1; e_valid[port] = 1'b1; e_sel[port] = 2'(i);
      end
      checks++;
      if (out_valid !== e_valid || deflected !== e_defl) begin
        failures++;
        $display("FAIL valid %b/%b defl %b/%b", out_valid, e_valid, deflected, e_defl);
      end
      for (int o = 0; o < 4; o++) if (e_valid[o]) begin
        checks++;
        if (out_sel[o] !== e_sel[o]) begin failures++; $display("FAIL sel %0d", o); end
      end
      // conservation: each valid input on exactly one output
      for (int i = 0; i < 4; i++) begin
        cnt = 0;
        for (int o = 0; o < 4; o++) if (out_valid[o] && out_sel[o] == 2'(i)) cnt++;
        checks++;
        if (cnt != (in_valid[i] ? 1 : 0)) begin failures++; $display("FAIL conservation %0d", i); end
      end
      if (in_valid[order[0]] && in_prod[order[0]] != 0) begin
        checks++;
        if (deflected[order[0]]) begin failures++; $display("FAIL oldest deflected"); end
      end
      n_defl += $countones(deflected);
    end
    checks++;
    if (n_defl == 0) begin failures++; $display("FAIL no deflection exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
