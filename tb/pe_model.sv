// pe_model: behavioural processing element used by the network testbenches.
//
// Stands in for the compute node at a router's local port. It injects NPKT
// packets of PKT_LEN flits to destinations drawn uniformly from all other
// nodes (the uniform traffic pattern), starting a new packet in a cycle with
// probability RATE/1000, and checks every packet it receives:
// head flit = its own address, second header flit = a valid source address,
// body and tail flits carry (src * 31 + seq) so a flit that strays into
// another packet is caught. Packets arriving on the two VCs of the ejection
// link are reassembled separately. Not synthesizable (uses $urandom).
module pe_model
  import mh3dt_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned N = 4,
  parameter int unsigned NPKT = 4,
  parameter int unsigned PKT_LEN = 16,
  parameter int unsigned RATE = 100,
  parameter int unsigned DST_BASE = 0,    // destinations are drawn from
  parameter int unsigned DST_COUNT = 0,   // [DST_BASE, DST_BASE+DST_COUNT), 0: all
  localparam int unsigned MW = $clog2(M),
  localparam int unsigned NW = $clog2(N),
  localparam int unsigned ADDR_W = 3 * NW + 3 * MW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  int unsigned      my_idx,
  output link_t            inj,
  input  credit_t          inj_room,
  input  link_t            ej,
  output credit_t          ej_room,
  output int unsigned      sent,
  output int unsigned      received,
  output int unsigned      errors,
  output logic             done
);
  localparam int unsigned NODES = M * M * M * N * N * N;

  function automatic logic [ADDR_W-1:0] addr_of(input int unsigned g);
    int unsigned b, k;
    b = g / (M * M * M);
    k = g % (M * M * M);
    return {NW'(b / (N * N)), NW'((b / N) % N), NW'(b % N),
            MW'(k / (M * M)), MW'((k / M) % M), MW'(k % M)};
  endfunction

  function automatic logic [15:0] body(input logic [ADDR_W-1:0] src, input int unsigned seq);
    return 16'(int'(src) * 31 + int'(seq));
  endfunction

  logic [ADDR_W-1:0] me;
  assign me      = addr_of(my_idx);
  assign ej_room = '1;

  // ------------------------------------------------------------ sender
  int unsigned pos;          // next flit of the current packet, 0 = idle
  logic [ADDR_W-1:0] dst;
  int unsigned t0;
  int unsigned cyc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos  <= 0;
      sent <= 0;
      inj  <= '0;
      dst  <= '0;
      cyc  <= 0;
    end else begin
      cyc <= cyc + 1;
      inj <= '0;
      // the flit driven last cycle has been taken; drive the next one
      if (pos == 0) begin
        if (sent < NPKT && ($urandom % 1000) < RATE && inj_room[0] && !inj.valid) begin
          int unsigned g;
          automatic int unsigned cnt = (DST_COUNT == 0) ? NODES : DST_COUNT;
          g = DST_BASE + $urandom % (cnt - 1);
          if (g >= my_idx) g++;
          dst            <= addr_of(g);
          inj.valid      <= 1'b1;
          inj.vc         <= '0;
          inj.flit.ftype <= FT_HEAD;
          inj.flit.data  <= FLIT_W'(addr_of(g));
          pos            <= 1;
        end
      end else if (inj_room[0] && !inj.valid) begin
        inj.valid <= 1'b1;
        inj.vc    <= '0;
        if (pos == 1) begin
          inj.flit.ftype <= FT_HEAD2;
          inj.flit.data  <= FLIT_W'(me);
        end else begin
          inj.flit.ftype <= (pos == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
          inj.flit.data  <= body(me, pos);
        end
        if (pos == PKT_LEN - 1) begin
          pos  <= 0;
          sent <= sent + 1;
        end else pos <= pos + 1;
      end
    end
  end
  // Sending only when the previous cycle sent nothing keeps the local
  // channel within its buffer credit (room is a registered count).

  // ------------------------------------------------------------ receiver
  int unsigned       rpos [NUM_VC];
  logic [ADDR_W-1:0] rsrc [NUM_VC];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      received <= 0;
      errors   <= 0;
      for (int v = 0; v < NUM_VC; v++) begin
        rpos[v] <= 0;
        rsrc[v] <= '0;
      end
    end else if (ej.valid) begin
      automatic int v = int'(ej.vc);
      automatic int unsigned p = rpos[v];
      automatic logic ok = 1'b1;
      if (p == 0)      ok = (ej.flit.ftype == FT_HEAD) && (ej.flit.data[ADDR_W-1:0] == me);
      else if (p == 1) begin
        ok = (ej.flit.ftype == FT_HEAD2);
        rsrc[v] <= ej.flit.data[ADDR_W-1:0];
      end
      else if (p == PKT_LEN - 1)
        ok = (ej.flit.ftype == FT_TAIL) && (ej.flit.data == body(rsrc[v], p));
      else
        ok = (ej.flit.ftype == FT_BODY) && (ej.flit.data == body(rsrc[v], p));
      if (!ok) begin
        errors <= errors + 1;
        $display("pe %0d: bad flit type %0d data %h at position %0d on vc %0d",
                 my_idx, ej.flit.ftype, ej.flit.data, p, v);
      end
      if (p == PKT_LEN - 1) begin
        rpos[v]  <= 0;
        received <= received + 1;
      end else rpos[v] <= p + 1;
    end
  end

  assign done = (sent == NPKT) && (pos == 0);
endmodule
