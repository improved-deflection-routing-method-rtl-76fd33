// two_mode_link: full-duplex link between two routers, with a link
// controller on each side.
//
// Side A and side B each present the flit on their output port toward the
// other router and its productivity flag. In exchange mode the flits cross
// (A's flit goes to B's input and B's to A's), as in conventional deflection
// routing. In loop-back mode, chosen when neither flag is set, each flit
// returns to the input port of the router that sent it, so a deflected flit
// is not moved a hop away from its destination. FIXED=1 builds a
// conventional link that always exchanges (for comparison only).
// Combinational; both routers register their inputs.
module two_mode_link
  import noc_pkg::*;
#(
  parameter bit FIXED = 1'b0
) (
  input  flit_t a_out,
  input  logic  a_p,
  input  flit_t b_out,
  input  logic  b_p,
  output flit_t a_in,
  output flit_t b_in,
  output logic  loopback
);

  localparam link_mode_e MODE = FIXED ? LINK_FIXED_EXCHANGE : LINK_TWO_MODE;

  logic lb_a, lb_b;

  link_controller #(.MODE(MODE)) u_ctrl_a (
    .own_out(a_out), .own_p(a_p), .remote_out(b_out), .remote_p(b_p),
    .in_flit(a_in), .loopback(lb_a));
  link_controller #(.MODE(MODE)) u_ctrl_b (
    .own_out(b_out), .own_p(b_p), .remote_out(a_out), .remote_p(a_p),
    .in_flit(b_in), .loopback(lb_b));

  assign loopback = lb_a;

  // both sides decide from the same pair of flags
  always_comb assert (lb_a == lb_b) else $error("link sides disagree on mode");

endmodule
