// mh3dt_router: wormhole router of one MH3DT node.
//
// Every node has eight network ports (node degree 8): six links of its basic
// module's 3D torus (z+, z-, y+, y-, x+, x-) and two free links (g+, g-) that
// a gate node uses for the higher-level torus; a node that is not a gate
// node leaves g+/g- unconnected. A ninth port connects the local processing
// element. Each physical channel carries NUM_VC = 2 virtual channels.
//
// Flit path, as in the document's simulator: one flit per cycle moves from
// an input VC buffer to an output VC buffer, and one flit per cycle moves
// from an output buffer over the link into the next node's input buffer when
// that buffer has room. A body flit therefore needs 2 cycles per hop. A
// header flit needs one more cycle, in which the routing decision
// (mh3dt_route) is made and an output VC is allocated to the packet.
//   * Input stage: a flit_fifo of BUF_DEPTH flits per input VC.
//   * VC allocation: a header at the head of an idle input VC requests the
//     output VC chosen by mh3dt_route, if that VC is free. One round-robin
//     arbiter per output port grants one such request per cycle. The output VC then belongs to
//     that packet until its tail flit has passed (wormhole switching).
//   * Crossbar: each output VC is written only by the input VC that holds
//     it, so no switch arbitration is needed. Each input VC moves at most one
//     flit per cycle.
//   * Output stage: a flit_fifo of OBUF_DEPTH flits per output VC. A
//     round-robin arbiter per physical link picks which VC sends this cycle,
//     among the VCs whose downstream buffer has room.
// The document fixes: 2 VCs, round-robin VC arbitration on a link, input and
// output buffers, the 2-cycle hop and a 2-flit buffer. The crossbar
// organisation, the credit signalling (a registered per-VC "room" bit) and
// the event outputs are this design's own.
//
// Interface: in_link[p]/in_room[p] is the receiving side of port p (in_room
// tells the upstream sender which VC buffers have room); out_link[p]/
// out_room[p] the sending side. All outputs come from registers or from
// registered state through multiplexers, so routers can be chained without
// combinational loops. my_addr is the node address {bz,by,bx,az,ay,ax}; it
// is an input, not a parameter, so that every node is the same module.
module mh3dt_router
  import mh3dt_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned N = 4,
  parameter int unsigned Q = 2,
  parameter int unsigned BUF_DEPTH  = 2,
  parameter int unsigned OBUF_DEPTH = 2,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned ADDR_W = 3 * NW + 3 * MW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] my_addr,
  input  link_t             in_link  [NUM_PORTS],
  output credit_t           in_room  [NUM_PORTS],
  output link_t             out_link [NUM_PORTS],
  input  credit_t           out_room [NUM_PORTS],
  output router_ev_t        ev
);
  localparam int unsigned NI = NUM_PORTS * NUM_VC;  // input VCs = output VCs
  localparam int unsigned IW = $clog2(NI);

  initial begin
    assert (ADDR_W <= FLIT_W) else $error("node address does not fit a flit");
    assert (M >= 3) else $error("a basic module needs m >= 3 for its gate nodes");
  end

  // ---------------------------------------------------------------- input VCs
  flit_t            ib_dout  [NI];
  logic [NI-1:0]    ib_valid, ib_pop;
  logic [NI-1:0]    ib_room;

  // ---------------------------------------------------------------- state
  logic [NI-1:0]    active_q;          // input VC holds an output VC
  logic [IW-1:0]    ovc_q   [NI];      // which one
  logic [NI-1:0]    owned_q;           // output VC held by a packet
  logic [IW-1:0]    owner_q [NI];      // by which input VC

  // ---------------------------------------------------------------- routing
  port_e            r_port  [NI];
  logic [VC_W-1:0]  r_vc    [NI];
  logic [IW-1:0]    r_ovc   [NI];
  logic [NI-1:0]    hd_req;            // header waiting for VC allocation

  // ---------------------------------------------------------------- output VCs
  logic [NI-1:0]    ob_push, ob_pop, ob_valid, ob_room;
  flit_t            ob_din  [NI];
  flit_t            ob_dout [NI];

  // VC allocation results
  logic [NI-1:0]    va_gnt  [NUM_PORTS]; // [output port] one-hot over input VCs
  logic [IW-1:0]    va_idx  [NUM_PORTS];
  logic [NI-1:0]    va_won;            // [input VC] granted this cycle
  logic [NI-1:0]    move;
  logic [NUM_PORTS-1:0] contend;       // both VCs of a link want to send

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      localparam int unsigned I = p * NUM_VC + v;

      flit_fifo #(.DEPTH(BUF_DEPTH)) u_ibuf (
        .clk, .rst_n,
        .push     (in_link[p].valid && (in_link[p].vc == VC_W'(v))),
        .din      (in_link[p].flit),
        .pop      (ib_pop[I]),
        .dout     (ib_dout[I]),
        .valid    (ib_valid[I]),
        .has_room (ib_room[I])
      );
      assign in_room[p][v] = ib_room[I];

      mh3dt_route #(.M(M), .N(N), .Q(Q)) u_route (
        .my_addr  (my_addr),
        .dst_addr (ib_dout[I].data[ADDR_W-1:0]),
        .in_port  (port_e'(p)),
        .in_vc    (VC_W'(v)),
        .out_port (r_port[I]),
        .out_vc   (r_vc[I])
      );
      assign r_ovc[I]  = IW'(int'(r_port[I]) * NUM_VC + int'(r_vc[I]));
      assign hd_req[I] = !active_q[I] && ib_valid[I] && (ib_dout[I].ftype == FT_HEAD);
      assign move[I]   = active_q[I] && ib_valid[I] && ob_room[ovc_q[I]];
      assign ib_pop[I] = move[I];
    end
  end

  // One round-robin VC allocator per output port: among the headers that
  // want a free VC of this port, one is granted per cycle.
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_va
    logic [NI-1:0] r;
    always_comb begin
      for (int i = 0; i < NI; i++)
        r[i] = hd_req[i] && (r_port[i] == port_e'(p)) && !owned_q[r_ovc[i]];
    end
    rr_arbiter #(.N(NI)) u_arb (
      .clk, .rst_n, .req(r), .advance(1'b1), .grant(va_gnt[p]), .grant_idx(va_idx[p])
    );
  end

  always_comb begin
    va_won = '0;
    for (int p = 0; p < NUM_PORTS; p++) va_won |= va_gnt[p];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q <= '0;
      owned_q  <= '0;
      for (int i = 0; i < NI; i++) begin
        ovc_q[i]   <= '0;
        owner_q[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NI; i++) begin
        // tail leaves: release both ends of the wormhole
        if (move[i] && ib_dout[i].ftype == FT_TAIL) begin
          active_q[i]       <= 1'b0;
          owned_q[ovc_q[i]] <= 1'b0;
        end
      end
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (|va_gnt[p]) begin
          owned_q[r_ovc[va_idx[p]]] <= 1'b1;
          owner_q[r_ovc[va_idx[p]]] <= va_idx[p];
          active_q[va_idx[p]]       <= 1'b1;
          ovc_q[va_idx[p]]          <= r_ovc[va_idx[p]];
        end
      end
    end
  end

  // ---------------------------------------------------------------- output side
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_out
    logic [NUM_VC-1:0] lreq, lgnt;
    logic [VC_W-1:0]   lidx;
    assign contend[p] = &lreq;
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      localparam int unsigned O = p * NUM_VC + v;
      assign ob_push[O] = owned_q[O] && move[owner_q[O]];
      assign ob_din[O]  = ib_dout[owner_q[O]];
      flit_fifo #(.DEPTH(OBUF_DEPTH)) u_obuf (
        .clk, .rst_n,
        .push     (ob_push[O]),
        .din      (ob_din[O]),
        .pop      (ob_pop[O]),
        .dout     (ob_dout[O]),
        .valid    (ob_valid[O]),
        .has_room (ob_room[O])
      );
      assign lreq[v]   = ob_valid[O] && out_room[p][v];
      assign ob_pop[O] = lgnt[v];
    end
    rr_arbiter #(.N(NUM_VC)) u_link_arb (
      .clk, .rst_n, .req(lreq), .advance(1'b1), .grant(lgnt), .grant_idx(lidx)
    );
    always_comb begin
      out_link[p].valid = |lgnt;
      out_link[p].vc    = lidx;
      out_link[p].flit  = ob_dout[p * NUM_VC + int'(lidx)];
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    ev = '0;
    for (int i = 0; i < NI; i++) begin
      if (hd_req[i] && owned_q[r_ovc[i]]) ev.vc_wait = 1'b1;
      if (active_q[i] && ib_valid[i] && !ob_room[ovc_q[i]]) ev.xbar_block = 1'b1;
    end
    for (int p = 0; p < NUM_PORTS; p++) begin
      if ((|va_gnt[p]) && r_vc[va_idx[p]] != '0 && p != int'(P_LOC)) ev.vc1_alloc = 1'b1;
      if ((|va_gnt[p]) && (p == int'(P_GP) || p == int'(P_GM))) ev.gate_hop = 1'b1;
      for (int v = 0; v < NUM_VC; v++)
        if (ob_valid[p * NUM_VC + v] && !out_room[p][v]) ev.link_block = 1'b1;
    end
    ev.vc_contend = |contend;
  end

  // A held output VC is written only by its owner, and only after a grant.
  assert property (@(posedge clk) disable iff (!rst_n) (ob_push & ~owned_q) == '0);
  // Only a waiting header can win an output VC.
  assert property (@(posedge clk) disable iff (!rst_n) (va_won & ~hd_req) == '0);

endmodule
