// deflection_router: single-cycle bufferless deflection router for a 2D mesh.
//
// The router holds only one pipeline register per network input port; it has
// no flit buffers. Every flit that is in the router must leave it in the same
// cycle, through one of the four network output ports (N, E, S, W), or to the
// local IP core. Per cycle, on the registered input flits:
//   1. eject: the oldest flit addressed to this router goes to the core;
//   2. inject: if a slot is now empty, a waiting flit from the core enters;
//   3. port allocation and switching (PAS): every flit gets an output port,
//      a productive one if possible, otherwise it is deflected.
// ARCH selects the PAS stage: BLESS (sequential oldest-first allocator and a
// full 4x4 crossbar) or CHIPPER (two-stage permutation network of 2x2 arbiter
// blocks with random priority from a 16-bit LFSR). Flits leaving the router
// have their age incremented (saturating). Each output port also carries the
// productivity flag p used by the two-mode link controllers: p=1 when the
// port holds a flit and is a productive port for it.
//
// Timing: in_flits is registered on the rising clock edge; out_flits, out_p,
// ej_* and inj_ready are combinational from those registers (and from the
// inj_* inputs). One hop costs one cycle. rst_n is active-low, synchronous,
// and empties the input registers. The three-stage organisation and the p
// flag follow the document; slot choice, tie-breaks, LFSR and reset are this
// design's own choices.
module deflection_router
  import noc_pkg::*;
#(
  parameter router_arch_e ARCH = ARCH_BLESS,
  parameter int unsigned  X_POS = 0,
  parameter int unsigned  Y_POS = 0,
  parameter logic [15:0]  SEED  = 16'hACE1   // CHIPPER LFSR seed, non-zero
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  flit_t [NUM_DIRS-1:0] in_flits,   // from the link controllers
  output flit_t [NUM_DIRS-1:0] out_flits,  // to the link controllers
  output logic  [NUM_DIRS-1:0] out_p,      // productivity flags
  output logic  [NUM_DIRS-1:0] out_defl,   // valid flit on a non-productive port
  input  logic                 inj_valid,
  input  flit_t                inj_flit,
  output logic                 inj_ready,
  output logic                 ej_valid,
  output flit_t                ej_flit
);

  localparam coord_t CUR_X = coord_t'(X_POS);
  localparam coord_t CUR_Y = coord_t'(Y_POS);

  flit_t [NUM_DIRS-1:0] in_q, after_ej, after_inj, switched;
  logic  [NUM_DIRS-1:0] in_local;
  logic  [NUM_DIRS-1:0] ej_sel;

  always_ff @(posedge clk) begin
    if (!rst_n) in_q <= '0;
    else        in_q <= in_flits;
  end

  // ---- eject ----
  for (genvar i = 0; i < NUM_DIRS; i++) begin : g_rc_in
    logic [NUM_DIRS-1:0] prod_unused;
    route_compute u_rc (.flit(in_q[i]), .cur_x(CUR_X), .cur_y(CUR_Y),
                        .prod(prod_unused), .is_local(in_local[i]));
  end

  eject_stage u_eject (
    .in_flits(in_q), .in_local, .out_flits(after_ej),
    .ej_valid, .ej_flit, .ej_sel);

  // ---- inject ----
  inject_stage u_inject (
    .in_flits(after_ej), .inj_valid, .inj_flit, .inj_ready, .out_flits(after_inj));

  // ---- port allocation and switching ----
  if (ARCH == ARCH_BLESS) begin : g_bless
    logic [NUM_DIRS-1:0][NUM_DIRS-1:0] prod;
    logic [NUM_DIRS-1:0]               loc_unused;
    logic [NUM_DIRS-1:0]               valid, sel_valid, defl_unused;
    age_t [NUM_DIRS-1:0]               age;
    logic [NUM_DIRS-1:0][1:0]          sel;
    for (genvar i = 0; i < NUM_DIRS; i++) begin : g_rc
      route_compute u_rc (.flit(after_inj[i]), .cur_x(CUR_X), .cur_y(CUR_Y),
                          .prod(prod[i]), .is_local(loc_unused[i]));
      assign valid[i] = after_inj[i].valid;
      assign age[i]   = after_inj[i].age;
    end
    bless_allocator u_alloc (
      .in_valid(valid), .in_age(age), .in_prod(prod),
      .out_valid(sel_valid), .out_sel(sel), .deflected(defl_unused));
    switch_fabric u_xbar (
      .in_flits(after_inj), .out_valid(sel_valid), .out_sel(sel), .out_flits(switched));
  end else begin : g_chipper
    logic [15:0] lfsr;
    always_ff @(posedge clk) begin
      if (!rst_n) lfsr <= SEED;
      else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    end
    chipper_permnet u_pn (
      .in_flits(after_inj), .cur_x(CUR_X), .cur_y(CUR_Y),
      .prio({lfsr[12], lfsr[8], lfsr[4], lfsr[0]}), .out_flits(switched));
  end

  // ---- outputs: age update and productivity flags ----
  for (genvar o = 0; o < NUM_DIRS; o++) begin : g_out
    logic [NUM_DIRS-1:0] prod_o;
    logic                loc_unused;
    route_compute u_rc (.flit(switched[o]), .cur_x(CUR_X), .cur_y(CUR_Y),
                        .prod(prod_o), .is_local(loc_unused));
    always_comb begin
      out_flits[o] = switched[o];
      if (switched[o].valid && switched[o].age != '1)
        out_flits[o].age = switched[o].age + 1'b1;
    end
    assign out_p[o]    = switched[o].valid && prod_o[o];
    assign out_defl[o] = switched[o].valid && !prod_o[o];
  end

  // flits are conserved: none is lost or duplicated inside the router
  always_ff @(posedge clk) begin
    if (rst_n)
      assert ($countones({after_inj[0].valid, after_inj[1].valid, after_inj[2].valid,
                          after_inj[3].valid}) ==
              $countones({switched[0].valid, switched[1].valid, switched[2].valid,
                          switched[3].valid}))
        else $error("router (%0d,%0d) lost or duplicated a flit", X_POS, Y_POS);
  end

endmodule
