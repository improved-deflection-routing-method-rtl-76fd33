// noc_mesh: 2D mesh network-on-chip of bufferless deflection routers joined
// by two-mode full-duplex links.
//
// MESH_X x MESH_Y routers (8x8 by default, the evaluated size) each connect to
// one local IP core and to up to four neighbours. Node n = y*MESH_X + x sits
// at column x (growing East) and row y (growing South). Every pair of
// neighbouring routers shares a two_mode_link: each cycle the link either
// exchanges the two routers' flits or, when neither side sends a flit
// productively, loops each flit back into the router that sent it. A port at
// the mesh boundary has no neighbour; its output is always looped back to
// its own input (this design's choice for the boundary). LINK_CTRL_EN=0
// replaces the two-mode links with conventional always-exchanging links, for
// comparison. ARCH selects the routers' port allocation: BLESS (default) or
// CHIPPER.
//
// Local interface per node (valid/ready): a core offers a flit on inj_*; it
// is taken in a cycle with inj_valid and inj_ready high. Ejected flits appear
// on ej_valid/ej_flit for one cycle and are always accepted. Status outputs
// show, per node and output port, a flit on the port (port_valid), its
// productivity flag (port_p), and per node and input port, whether the port
// was fed by loop-back this cycle (port_loopback). All are combinational from
// the routers' input registers; a hop costs one clock cycle.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned  MESH_X       = 8,
  parameter int unsigned  MESH_Y       = 8,
  parameter router_arch_e ARCH         = ARCH_BLESS,
  parameter bit           LINK_CTRL_EN = 1'b1,
  localparam int unsigned NODES        = MESH_X * MESH_Y
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic  [NODES-1:0]                 inj_valid,
  input  flit_t [NODES-1:0]                 inj_flit,
  output logic  [NODES-1:0]                 inj_ready,
  output logic  [NODES-1:0]                 ej_valid,
  output flit_t [NODES-1:0]                 ej_flit,
  output logic  [NODES-1:0][NUM_DIRS-1:0]   port_valid,
  output logic  [NODES-1:0][NUM_DIRS-1:0]   port_p,
  output logic  [NODES-1:0][NUM_DIRS-1:0]   port_loopback
);

  flit_t [NODES-1:0][NUM_DIRS-1:0] out_f, in_f;
  logic  [NODES-1:0][NUM_DIRS-1:0] out_p, defl_unused;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int unsigned N = y * MESH_X + x;

      deflection_router #(
        .ARCH(ARCH), .X_POS(x), .Y_POS(y),
        .SEED(16'(16'hACE1 ^ (N * 16'h9E37)) | 16'h0001)
      ) u_router (
        .clk, .rst_n,
        .in_flits(in_f[N]), .out_flits(out_f[N]), .out_p(out_p[N]), .out_defl(defl_unused[N]),
        .inj_valid(inj_valid[N]), .inj_flit(inj_flit[N]), .inj_ready(inj_ready[N]),
        .ej_valid(ej_valid[N]), .ej_flit(ej_flit[N]));

      for (genvar d = 0; d < NUM_DIRS; d++) begin : g_port
        assign port_valid[N][d] = out_f[N][d].valid;
        assign port_p[N][d]     = out_p[N][d];
      end

      // East link: shared with the router at (x+1, y), owned by the west node
      if (x + 1 < MESH_X) begin : g_link_e
        logic lb;
        two_mode_link #(.FIXED(!LINK_CTRL_EN)) u_link (
          .a_out(out_f[N][DIR_E]),   .a_p(out_p[N][DIR_E]),
          .b_out(out_f[N+1][DIR_W]), .b_p(out_p[N+1][DIR_W]),
          .a_in(in_f[N][DIR_E]),     .b_in(in_f[N+1][DIR_W]),
          .loopback(lb));
        assign port_loopback[N][DIR_E]   = lb;
        assign port_loopback[N+1][DIR_W] = lb;
      end else begin : g_edge_e
        link_controller #(.MODE(LINK_FIXED_LOOPBACK)) u_edge (
          .own_out(out_f[N][DIR_E]), .own_p(out_p[N][DIR_E]), .remote_out('0), .remote_p(1'b0),
          .in_flit(in_f[N][DIR_E]), .loopback(port_loopback[N][DIR_E]));
      end
      if (x == 0) begin : g_edge_w
        link_controller #(.MODE(LINK_FIXED_LOOPBACK)) u_edge (
          .own_out(out_f[N][DIR_W]), .own_p(out_p[N][DIR_W]), .remote_out('0), .remote_p(1'b0),
          .in_flit(in_f[N][DIR_W]), .loopback(port_loopback[N][DIR_W]));
      end

      // South link: shared with the router at (x, y+1), owned by the north node
      if (y + 1 < MESH_Y) begin : g_link_s
        logic lb;
        two_mode_link #(.FIXED(!LINK_CTRL_EN)) u_link (
          .a_out(out_f[N][DIR_S]),        .a_p(out_p[N][DIR_S]),
          .b_out(out_f[N+MESH_X][DIR_N]), .b_p(out_p[N+MESH_X][DIR_N]),
          .a_in(in_f[N][DIR_S]),          .b_in(in_f[N+MESH_X][DIR_N]),
          .loopback(lb));
        assign port_loopback[N][DIR_S]        = lb;
        assign port_loopback[N+MESH_X][DIR_N] = lb;
      end else begin : g_edge_s
        link_controller #(.MODE(LINK_FIXED_LOOPBACK)) u_edge (
          .own_out(out_f[N][DIR_S]), .own_p(out_p[N][DIR_S]), .remote_out('0), .remote_p(1'b0),
          .in_flit(in_f[N][DIR_S]), .loopback(port_loopback[N][DIR_S]));
      end
      if (y == 0) begin : g_edge_n
        link_controller #(.MODE(LINK_FIXED_LOOPBACK)) u_edge (
          .own_out(out_f[N][DIR_N]), .own_p(out_p[N][DIR_N]), .remote_out('0), .remote_p(1'b0),
          .in_flit(in_f[N][DIR_N]), .loopback(port_loopback[N][DIR_N]));
      end
    end
  end

endmodule
