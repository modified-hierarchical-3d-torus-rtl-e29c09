// mh3dt_bm: basic module (BM) of the MH3DT network, an m x m x m 3D torus.
//
// M*M*M routers (mh3dt_router) are joined by wrap-around links in z, y and x,
// so every node uses all six of its torus ports inside the BM. Node (az,ay,ax)
// has index (az*M + ay)*M + ax and the address {bm_addr, az, ay, ax}. Its
// local port is brought out as loc_in/loc_out.
//
// Gate nodes carry the links of the higher-level torus. The gate node for BM
// dimension d (z = 0, y = 1, x = 2) sits at az = d in a corner column of the
// BM and uses its two free ports g+ and g-. The document places them in a
// corner of the xy-plane with az = 0, 1, 2 for z, y, x and uses 2^q gate
// nodes per dimension; which corners are used for q = 1 and q = 2 is this
// design's choice: corner c has ax = M-1 if bit 0 of c is set (q >= 1) and
// ay = M-1 if bit 1 is set (q = 2), else 0.
// The gate links are brought out as gate_out/gate_in, index
// g = (d * 2^Q + c) * 2 + s with s = 0 for the + side and 1 for the - side.
// gate_out[g] is what the gate node sends on that side, gate_in[g] what it
// receives from the neighbouring BM on that side; the *_room signals are the
// per-VC "buffer has room" flags that go the opposite way.
// The free ports of nodes that are not gate nodes are left idle.
//
// Timing: as mh3dt_router; all outputs are registered or come from
// registered state through multiplexers.
module mh3dt_bm
  import mh3dt_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned N = 4,
  parameter int unsigned Q = 2,
  parameter int unsigned BUF_DEPTH  = 2,
  parameter int unsigned OBUF_DEPTH = 2,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NODES = M * M * M,
  localparam int unsigned NCORN = 1 << Q,
  localparam int unsigned NGATE = 3 * NCORN * 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3*NW-1:0]   bm_addr,
  input  link_t             loc_in       [NODES],
  output credit_t           loc_in_room  [NODES],
  output link_t             loc_out      [NODES],
  input  credit_t           loc_out_room [NODES],
  output link_t             gate_out     [NGATE],
  input  credit_t           gate_out_room[NGATE],
  input  link_t             gate_in      [NGATE],
  output credit_t           gate_in_room [NGATE],
  output router_ev_t        ev
);
  link_t      il [NODES][NUM_PORTS];
  link_t      ol [NODES][NUM_PORTS];
  credit_t    ir [NODES][NUM_PORTS];
  credit_t    orm[NODES][NUM_PORTS];
  router_ev_t rev[NODES];

  for (genvar z = 0; z < M; z++) begin : g_z
    for (genvar y = 0; y < M; y++) begin : g_y
      for (genvar x = 0; x < M; x++) begin : g_x
        localparam int unsigned K  = (z * M + y) * M + x;
        localparam int unsigned ZP = (((z + 1) % M) * M + y) * M + x;
        localparam int unsigned ZM = (((z + M - 1) % M) * M + y) * M + x;
        localparam int unsigned YP = (z * M + (y + 1) % M) * M + x;
        localparam int unsigned YM = (z * M + (y + M - 1) % M) * M + x;
        localparam int unsigned XP = (z * M + y) * M + (x + 1) % M;
        localparam int unsigned XM = (z * M + y) * M + (x + M - 1) % M;
        // neighbours in + and - of each dimension, in port order
        localparam int unsigned NB [6] = '{ZP, ZM, YP, YM, XP, XM};
        // gate node: az < 3 in one of the 2^Q corner columns
        localparam bit CY = (Q >= 2) && (y == M - 1);
        localparam bit CX = (Q >= 1) && (x == M - 1);
        localparam bit IS_GATE = (z < 3) && (y == 0 || CY) && (x == 0 || CX);
        localparam int unsigned GP = (z * NCORN + 2 * int'(CY) + int'(CX)) * 2;
        localparam int unsigned GM = GP + 1;

        // torus links: my port P receives what the neighbour sends on P^1
        for (genvar p = 0; p < 6; p++) begin : g_t
          assign il[K][p]  = ol[NB[p]][p ^ 1];
          assign orm[K][p] = ir[NB[p]][p ^ 1];
        end

        if (IS_GATE) begin : g_gate
          assign il[K][P_GP]     = gate_in[GP];
          assign il[K][P_GM]     = gate_in[GM];
          assign orm[K][P_GP]    = gate_out_room[GP];
          assign orm[K][P_GM]    = gate_out_room[GM];
          assign gate_out[GP]    = ol[K][P_GP];
          assign gate_out[GM]    = ol[K][P_GM];
          assign gate_in_room[GP] = ir[K][P_GP];
          assign gate_in_room[GM] = ir[K][P_GM];
        end else begin : g_nogate
          assign il[K][P_GP]  = '0;
          assign il[K][P_GM]  = '0;
          assign orm[K][P_GP] = '0;
          assign orm[K][P_GM] = '0;
        end

        assign il[K][P_LOC]  = loc_in[K];
        assign orm[K][P_LOC] = loc_out_room[K];
        assign loc_out[K]    = ol[K][P_LOC];
        assign loc_in_room[K] = ir[K][P_LOC];

        mh3dt_router #(
          .M(M), .N(N), .Q(Q), .BUF_DEPTH(BUF_DEPTH), .OBUF_DEPTH(OBUF_DEPTH)
        ) u_router (
          .clk, .rst_n,
          .my_addr  ({bm_addr, MW'(z), MW'(y), MW'(x)}),
          .in_link  (il[K]),
          .in_room  (ir[K]),
          .out_link (ol[K]),
          .out_room (orm[K]),
          .ev       (rev[K])
        );
      end
    end
  end

  always_comb begin
    ev = '0;
    for (int k = 0; k < NODES; k++) ev |= rev[k];
  end

endmodule
