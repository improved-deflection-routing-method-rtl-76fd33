// noc_traffic: behavioural model of the local IP cores of a whole mesh, for
// testbenches only (not synthesizable).
//
// Every cycle each core generates a new flit with probability RATE_PM/1000
// (a Bernoulli approximation of Poisson arrivals), addressed to a uniformly
// random other node, and queues it; the head of the queue is offered to the
// router with inj_valid until accepted. Each flit carries a unique id in its
// payload. The sink side is a scoreboard: every ejected flit must be known,
// not yet delivered, ejected at its own destination and carry its source.
// The model also watches the mesh status outputs and counts link traversals
// (productive and misrouted), loop-backs on inner links and at the mesh edge,
// refused injections and latency, and checks that no flit travels faster
// than one hop per cycle (latency counted from generation to ejection). Everything is sampled at the falling clock
// edge, half a cycle after the routers' registers update.
module noc_traffic
  import noc_pkg::*;
#(
  parameter int MESH_X = 8,
  parameter int MESH_Y = 8,
  parameter int MAX_FLITS = 1 << 20,
  localparam int NODES = MESH_X * MESH_Y
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  int                              rate_pm,     // injection rate, flits/node/cycle x 1000
  output logic  [NODES-1:0]               inj_valid,
  output flit_t [NODES-1:0]               inj_flit,
  input  logic  [NODES-1:0]               inj_ready,
  input  logic  [NODES-1:0]               ej_valid,
  input  flit_t [NODES-1:0]               ej_flit,
  input  logic  [NODES-1:0][NUM_DIRS-1:0] port_valid,
  input  logic  [NODES-1:0][NUM_DIRS-1:0] port_p,
  input  logic  [NODES-1:0][NUM_DIRS-1:0] port_loopback
);

  int cycle = 0;
  int generated = 0, injected = 0, delivered = 0, errors = 0;
  int refused = 0, hops = 0, misroutes = 0, loopbacks = 0, edge_loopbacks = 0;
  int deflections = 0, productive = 0, multi_eject_cycles = 0;
  longint latency_sum = 0;
  int max_latency = 0;
  int min_latency = 0;   // flits delivered in exactly one cycle per hop

  flit_t queue [NODES][$];
  int    gen_cycle [];
  int    gen_src [];
  bit    done [];
  int    outstanding;

  initial begin
    gen_cycle = new[MAX_FLITS];
    gen_src = new[MAX_FLITS];
    done = new[MAX_FLITS];
    inj_valid = '0;
    inj_flit = '0;
  end

  assign outstanding = generated - delivered;

  function automatic bit is_edge(int n, int d);
    int x = n % MESH_X, y = n / MESH_X;
    case (d)
      0: return y == 0;
      1: return x == MESH_X - 1;
      2: return y == MESH_Y - 1;
      default: return x == 0;
    endcase
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      // new traffic
      for (int n = 0; n < NODES; n++) begin
        if ($urandom_range(0, 999) < rate_pm && generated < MAX_FLITS) begin
          flit_t f;
          int d;
          d = $urandom_range(0, NODES - 2);
          if (d >= n) d++;
          f = '0;
          f.dst_x = coord_t'(d % MESH_X);
          f.dst_y = coord_t'(d / MESH_X);
          f.src_x = coord_t'(n % MESH_X);
          f.src_y = coord_t'(n / MESH_X);
          f.data  = 32'(generated);
          gen_cycle[generated] = cycle;
          gen_src[generated] = n;
          generated++;
          queue[n].push_back(f);
        end
        inj_valid[n] = queue[n].size() > 0;
        inj_flit[n]  = inj_valid[n] ? queue[n][0] : '0;
      end
      #1;
      for (int n = 0; n < NODES; n++) begin
        if (inj_valid[n] && inj_ready[n]) begin
          void'(queue[n].pop_front());
          injected++;
        end else if (inj_valid[n]) refused++;
        if (ej_valid[n]) begin
          int id, lat, n_hops;
          id = int'(ej_flit[n].data);
          if (id < 0 || id >= generated || done[id] ||
              int'(ej_flit[n].dst_x) + MESH_X * int'(ej_flit[n].dst_y) != n) begin
            errors++;
            $display("ERROR flit %0d wrongly ejected at node %0d", id, n);
          end else begin
            done[id] = 1'b1;
            delivered++;
            lat = cycle - gen_cycle[id];
            latency_sum += longint'(lat);
            if (lat > max_latency) max_latency = lat;
            if (int'(ej_flit[n].src_x) + MESH_X * int'(ej_flit[n].src_y) != gen_src[id]) begin
              errors++;
              $display("ERROR flit %0d has a wrong source", id);
            end
            // one cycle per hop: never faster than the Manhattan distance
            n_hops = (gen_src[id] % MESH_X > n % MESH_X ? gen_src[id] % MESH_X - n % MESH_X
                                                       : n % MESH_X - gen_src[id] % MESH_X) +
                   (gen_src[id] / MESH_X > n / MESH_X ? gen_src[id] / MESH_X - n / MESH_X
                                                       : n / MESH_X - gen_src[id] / MESH_X);
            if (lat < n_hops) begin
              errors++;
              $display("ERROR flit %0d arrived in %0d cycles over %0d hops", id, lat, n_hops);
            end
            if (lat == n_hops) min_latency++;
          end
        end
        for (int d = 0; d < NUM_DIRS; d++) if (port_valid[n][d]) begin
          if (!port_p[n][d]) deflections++;
          if (is_edge(n, d)) edge_loopbacks++;
          else if (port_loopback[n][d]) loopbacks++;
          else begin
            hops++;
            if (port_p[n][d]) productive++;
            else misroutes++;
          end
        end
      end
    end
  end

endmodule
