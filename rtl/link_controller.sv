// link_controller: one side of a two-mode full-duplex router-to-router link.
//
// A two-input, flit-wide multiplexer feeds the router's input port with
// either the flit the opposite router sends over the link (exchange mode) or
// the flit this router itself put on the matching output port (loop-back
// mode). Each router marks its output port with a productivity flag p: 1
// when the port holds a flit for which it is a productive port. By the
// flit-deflection rule the link loops back only when both p flags are 0, so
// a productive flit is never held back, and a deflected flit is sent one hop
// away only when the opposite side has a productive flit. Both controllers
// of a link see the same two flags and so always agree on the mode.
// MODE selects this rule (LINK_TWO_MODE), a conventional always-exchanging
// link (LINK_FIXED_EXCHANGE, for comparison) or, at a mesh edge with no
// neighbour, permanent loop-back (LINK_FIXED_LOOPBACK, this design's choice
// for the boundary). Combinational; the router registers its inputs.
module link_controller
  import noc_pkg::*;
#(
  parameter link_mode_e MODE = LINK_TWO_MODE
) (
  input  flit_t own_out,     // flit on this router's output port
  input  logic  own_p,       // its productivity flag
  input  flit_t remote_out,  // flit arriving from the opposite router
  input  logic  remote_p,    // productivity flag of the opposite router
  output flit_t in_flit,     // to this router's input port
  output logic  loopback     // 1: loop-back mode this cycle
);

  always_comb begin
    unique case (MODE)
      LINK_FIXED_EXCHANGE: loopback = 1'b0;
      LINK_FIXED_LOOPBACK: loopback = 1'b1;
      default:             loopback = !(own_p || remote_p);
    endcase
    in_flit = loopback ? own_out : remote_out;
  end

endmodule
