// mh3dt_route: routing decision of one MH3DT node for one packet header.
//
// Given the node's own address, the packet's destination, the port the
// header arrived on and the virtual channel it arrived on, it returns the
// output port and output virtual channel for the next hop.
//
// Addresses are {bz, by, bx, az, ay, ax}: the coordinates of the basic
// module (BM) in the n x n x n Level-2 torus, then the coordinates of the
// node inside its m x m x m BM torus. Routing follows the document's
// top-down, dimension-ordered algorithm:
//   * If the destination is in another BM, take the first BM coordinate, in
//     the order z, y, x, that differs. A gate node of that dimension sits at
//     az = 0 (z), 1 (y) or 2 (x) in a corner column of the BM. A node that is
//     such a gate node forwards on its free link (g+ or g-). Any other node
//     routes inside the BM, z then y then x, towards the gate node.
//   * Inside the destination BM the packet is routed z, then y, then x, to
//     the destination node and is then delivered to the local port.
// m and n must be powers of two (the document's m = n = 4 are).
// On every torus ring the direction is the shorter way round. When both ways
// are equally long (offset exactly k/2) a positive offset d - s goes in the
// + direction and a negative one in the - direction, which is the document's
// rule for m = n = 4 written for any ring size k.
//
// Virtual channels follow the dateline rule of the deadlock-freedom proof:
// a packet travels on VC0 and moves to VC1 when it takes a wrap-around link
// (from coordinate k-1 to 0 going +, or 0 to k-1 going -). It stays on VC1
// while it keeps going the same way on the same ring and returns to VC0 when
// it turns into another ring.
//
// This design's own choices: which corner columns hold gate nodes for the
// inter-level connectivity Q (Q = 2: all four corners; Q = 1: corners with
// ay = 0; Q = 0: the corner ay = ax = 0); the packet uses the corner nearest
// to it in each of y and x; a packet delivered locally keeps its VC.
//
// Purely combinational; no clock.
module mh3dt_route
  import mh3dt_pkg::*;
#(
  parameter int unsigned M = 4,   // BM size per dimension
  parameter int unsigned N = 4,   // Level-2 torus size per dimension
  parameter int unsigned Q = 2,   // inter-level connectivity
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned ADDR_W = 3 * NW + 3 * MW
) (
  input  logic [ADDR_W-1:0] my_addr,
  input  logic [ADDR_W-1:0] dst_addr,
  input  port_e             in_port,
  input  logic [VC_W-1:0]   in_vc,
  output port_e             out_port,
  output logic [VC_W-1:0]   out_vc
);

  initial begin
    assert ((1 << MW) == M && (1 << NW) == N)
      else $error("m and n must be powers of two");
  end

  // On a ring, is "+" the way from s to d (s != d)? The offset f = d - s
  // wraps modulo the ring size because the ring size is 2^width.
  function automatic logic plus_m(input logic [MW-1:0] s, input logic [MW-1:0] d);
    logic [MW-1:0] f;
    f = d - s;
    return (f[MW-1] == 1'b0) || (f == MW'(M / 2) && d > s);
  endfunction
  function automatic logic plus_n(input logic [NW-1:0] s, input logic [NW-1:0] d);
    logic [NW-1:0] f;
    f = d - s;
    return (N == 2) ? (d > s) : ((f[NW-1] == 1'b0) || (f == NW'(N / 2) && d > s));
  endfunction

  logic [NW-1:0] bm [3], dbm [3];   // BM coordinates, index 0 = z, 1 = y, 2 = x
  logic [MW-1:0] nd [3], dnd [3];   // node coordinates inside the BM
  logic [MW-1:0] tgt [3];           // intra-BM target of this hop
  logic [1:0]    gdim;              // BM dimension still to be corrected
  logic          inter, at_gate, plus, wrap, cont;
  logic [NW-1:0] gb, gdb;
  logic [1:0]    idim;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      bm[i]  = my_addr [ADDR_W-1-NW*i -: NW];
      dbm[i] = dst_addr[ADDR_W-1-NW*i -: NW];
      nd[i]  = my_addr [3*MW-1-MW*i -: MW];
      dnd[i] = dst_addr[3*MW-1-MW*i -: MW];
    end

    inter = 1'b1;
    if      (bm[0] != dbm[0]) gdim = 2'd0;
    else if (bm[1] != dbm[1]) gdim = 2'd1;
    else if (bm[2] != dbm[2]) gdim = 2'd2;
    else begin
      gdim  = 2'd0;
      inter = 1'b0;
    end

    // gate node of dimension gdim in the corner column nearest in y and x
    if (inter) begin
      tgt[0] = MW'(gdim);
      tgt[1] = (Q >= 2 && nd[1][MW-1]) ? MW'(M - 1) : '0;
      tgt[2] = (Q >= 1 && nd[2][MW-1]) ? MW'(M - 1) : '0;
    end else begin
      tgt = dnd;
    end
    at_gate = inter && (nd[0] == tgt[0]) && (nd[1] == tgt[1]) && (nd[2] == tgt[2]);

    gb  = bm[gdim];
    gdb = dbm[gdim];
    if      (nd[0] != tgt[0]) idim = 2'd0;
    else if (nd[1] != tgt[1]) idim = 2'd1;
    else                      idim = 2'd2;

    if (at_gate) begin
      plus     = plus_n(gb, gdb);
      out_port = plus ? P_GP : P_GM;
      wrap     = plus ? (gb == NW'(N - 1)) : (gb == '0);
    end else if (nd[idim] != tgt[idim]) begin
      plus     = plus_m(nd[idim], tgt[idim]);
      out_port = port_e'({1'b0, idim, !plus});
      wrap     = plus ? (nd[idim] == MW'(M - 1)) : (nd[idim] == '0);
    end else begin
      plus     = 1'b0;
      out_port = P_LOC;
      wrap     = 1'b0;
    end

    // Same ring, same direction: arrived on the opposite port of the pair.
    cont = (out_port != P_LOC) && (in_port != P_LOC)
           && (in_port[PORT_W-1:1] == out_port[PORT_W-1:1])
           && (in_port[0] != out_port[0]);

    if (out_port == P_LOC) out_vc = in_vc;
    else if (wrap)         out_vc = VC_W'(1);
    else if (cont)         out_vc = in_vc;
    else                   out_vc = '0;
  end

endmodule
