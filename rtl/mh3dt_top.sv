// mh3dt_top: Level-2 Modified Hierarchical 3D-Torus network, MH3DT(m, n, 2, q).
//
// N*N*N basic modules (mh3dt_bm), each an M x M x M 3D torus of wormhole
// routers, are themselves joined as an N x N x N 3D torus. BM (bz,by,bx) has
// index (bz*N + by)*N + bx; node k of BM b has the global index b*M^3 + k and
// the address {bz,by,bx,az,ay,ax}. The network whose traffic the document
// simulates is m = n = 4, L = 2, q = 2 (4096 nodes, 2 virtual channels,
// 2-flit buffers). Here N defaults to 2 (8 BMs, 512 nodes): at n = 4 the
// netlist of 4096 routers needs about 60 GB in Verilator's lint, about 15 MB
// per router instance. Setting N = 4 gives the full network.
//
// Higher-level links: gate node (dimension d, corner c) of a BM connects its
// g+ port to the g- port of the same gate node in the next BM along d, and
// its g- port to the g+ port of the previous one, with wrap-around, so the
// 2^q gate nodes of each dimension form 2^q parallel n-node rings per line
// of BMs. Each link carries two virtual channels and its per-VC
// "buffer has room" flags.
//
// Interface: one local channel pair per node (loc_in/loc_in_room towards the
// network, loc_out/loc_out_room out of it), indexed by global node index,
// plus `ev`, the OR of all routers' event pulses. A packet is injected on
// loc_in as a head flit with the destination address in its low bits, a
// second header flit, body flits and a tail flit, one flit per cycle at
// most, on a VC whose loc_in_room bit is set. Only the Level-2 network of
// the document's evaluation is built; deeper hierarchies are not.
module mh3dt_top
  import mh3dt_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned N = 2,   // 4 in the full network (see above)
  parameter int unsigned Q = 2,
  parameter int unsigned BUF_DEPTH  = 2,
  parameter int unsigned OBUF_DEPTH = 2,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NODES_BM = M * M * M,
  localparam int unsigned NBM = N * N * N,
  localparam int unsigned NODES = NBM * NODES_BM,
  localparam int unsigned NGATE = 3 * (1 << Q) * 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  link_t       loc_in       [NODES],
  output credit_t     loc_in_room  [NODES],
  output link_t       loc_out      [NODES],
  input  credit_t     loc_out_room [NODES],
  output router_ev_t  ev
);
  link_t      g_out  [NBM][NGATE];
  link_t      g_in   [NBM][NGATE];
  credit_t    g_oroom[NBM][NGATE];
  credit_t    g_iroom[NBM][NGATE];
  router_ev_t bev    [NBM];

  for (genvar z = 0; z < N; z++) begin : g_z
    for (genvar y = 0; y < N; y++) begin : g_y
      for (genvar x = 0; x < N; x++) begin : g_x
        localparam int unsigned B = (z * N + y) * N + x;
        // neighbouring BM in + and - of dimension d (z = 0, y = 1, x = 2)
        localparam int unsigned NBP [3] = '{(((z + 1) % N) * N + y) * N + x,
                                            (z * N + (y + 1) % N) * N + x,
                                            (z * N + y) * N + (x + 1) % N};
        localparam int unsigned NBM_ [3] = '{(((z + N - 1) % N) * N + y) * N + x,
                                             (z * N + (y + N - 1) % N) * N + x,
                                             (z * N + y) * N + (x + N - 1) % N};

        for (genvar d = 0; d < 3; d++) begin : g_d
          for (genvar c = 0; c < (1 << Q); c++) begin : g_c
            localparam int unsigned GP = (d * (1 << Q) + c) * 2;
            localparam int unsigned GM = GP + 1;
            // my + side receives what the + neighbour sends on its - side
            assign g_in[B][GP]    = g_out[NBP[d]][GM];
            assign g_oroom[B][GP] = g_iroom[NBP[d]][GM];
            assign g_in[B][GM]    = g_out[NBM_[d]][GP];
            assign g_oroom[B][GM] = g_iroom[NBM_[d]][GP];
          end
        end

        mh3dt_bm #(
          .M(M), .N(N), .Q(Q), .BUF_DEPTH(BUF_DEPTH), .OBUF_DEPTH(OBUF_DEPTH)
        ) u_bm (
          .clk, .rst_n,
          .bm_addr      ({NW'(z), NW'(y), NW'(x)}),
          .loc_in       (loc_in      [B*NODES_BM +: NODES_BM]),
          .loc_in_room  (loc_in_room [B*NODES_BM +: NODES_BM]),
          .loc_out      (loc_out     [B*NODES_BM +: NODES_BM]),
          .loc_out_room (loc_out_room[B*NODES_BM +: NODES_BM]),
          .gate_out     (g_out[B]),
          .gate_out_room(g_oroom[B]),
          .gate_in      (g_in[B]),
          .gate_in_room (g_iroom[B]),
          .ev           (bev[B])
        );
      end
    end
  end

  always_comb begin
    ev = '0;
    for (int b = 0; b < NBM; b++) ev |= bev[b];
  end

endmodule
