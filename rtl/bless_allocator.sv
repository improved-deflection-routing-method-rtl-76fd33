// bless_allocator: BLESS switch allocator, sequential oldest-first.
//
// The flits present in the router are served one after another in order of
// age, oldest first (equal ages: lowest input port first). Each flit takes a
// free productive output port if one is left (of two, the lower-numbered);
// otherwise it is deflected to the lowest-numbered free port. Because there
// are never more flits than output ports, every flit gets a port. The oldest
// flit therefore always moves productively. Sequential, oldest-first
// allocation follows the BLESS router description; the port preference order
// and tie-break are this design's choices. Combinational: the sequential
// order is unrolled into a chain of four allocation steps.
//
// out_valid[o]/out_sel[o] say which input flit goes to output o; deflected[i]
// marks an input flit that did not get a productive port.
module bless_allocator
  import noc_pkg::*;
(
  input  logic [NUM_DIRS-1:0]               in_valid,
  input  age_t [NUM_DIRS-1:0]               in_age,
  input  logic [NUM_DIRS-1:0][NUM_DIRS-1:0] in_prod,    // [input][output]
  output logic [NUM_DIRS-1:0]               out_valid,
  output logic [NUM_DIRS-1:0][1:0]          out_sel,    // input index per output
  output logic [NUM_DIRS-1:0]               deflected
);

  logic [NUM_DIRS-1:0][1:0] rank;  // 0 = oldest

  always_comb begin
    for (int i = 0; i < NUM_DIRS; i++) begin
      rank[i] = '0;
      for (int j = 0; j < NUM_DIRS; j++)
        if (j != i && in_valid[j] &&
            (in_age[j] > in_age[i] || (in_age[j] == in_age[i] && j < i)))
          rank[i] = rank[i] + 2'd1;
    end
  end

  always_comb begin
    logic [NUM_DIRS-1:0] taken;
    logic                got;
    got       = 1'b0;
    taken     = '0;
    out_valid = '0;
    out_sel   = '0;
    deflected = '0;
    for (int r = 0; r < NUM_DIRS; r++) begin
      for (int i = 0; i < NUM_DIRS; i++) begin
        if (in_valid[i] && rank[i] == r[1:0]) begin
          got = 1'b0;
          for (int o = 0; o < NUM_DIRS; o++)
            if (!got && in_prod[i][o] && !taken[o]) begin
              got = 1'b1;
              taken[o] = 1'b1;
              out_valid[o] = 1'b1;
              out_sel[o] = i[1:0];
            end
          if (!got) begin
            deflected[i] = 1'b1;
            for (int o = 0; o < NUM_DIRS; o++)
              if (!got && !taken[o]) begin
                got = 1'b1;
                taken[o] = 1'b1;
                out_valid[o] = 1'b1;
                out_sel[o] = i[1:0];
              end
          end
        end
      end
    end
  end

endmodule
