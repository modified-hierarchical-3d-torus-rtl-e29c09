// tb_mh3dt_router: self-checking test of one MH3DT router (m = n = 4, q = 2,
// 2-flit buffers). The testbench drives the router's input links and output
// credits directly and records every flit that leaves on each port.
// Checked:
//   * route, VC and flit order of single packets (torus, wrap-around,
//     continuation on the same ring, gate links, delivery to the PE);
//   * timing: a header leaves 3 cycles after it is offered, a body flit 2
//     cycles (one buffer-to-buffer transfer inside, one over the link);
//   * wormhole: two packets that need the same output VC leave one after the
//     other, never interleaved, and the second header waits;
//   * two packets on different VCs of one link share it flit by flit
//     (round robin) at the full rate of one flit per cycle;
//   * back-pressure: no flit leaves while the next buffer has no room, and
//     none is lost when room returns.
module tb_mh3dt_router;
  import mh3dt_pkg::*;
  localparam int AW = 12;
  localparam int LEN = 16;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] my_addr;
  link_t   in_link  [NUM_PORTS];
  credit_t in_room  [NUM_PORTS];
  link_t   out_link [NUM_PORTS];
  credit_t out_room [NUM_PORTS];
  router_ev_t ev;

  mh3dt_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int vc_wait_cycles = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev.vc_wait) vc_wait_cycles++;
  end

  typedef struct {int vc; flit_t f; int t;} cap_t;
  cap_t cap [NUM_PORTS][$];
  int   sent_t [$];           // offer cycle of each flit of the last send

  always @(posedge clk) begin
    for (int p = 0; p < NUM_PORTS; p++)
      if (rst_n && out_link[p].valid) cap[p].push_back('{int'(out_link[p].vc), out_link[p].flit, cyc});
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] A(input int bz, by, bx, z, y, x);
    return {2'(bz), 2'(by), 2'(bx), 2'(z), 2'(y), 2'(x)};
  endfunction

  function automatic flit_t pf(input logic [AW-1:0] dst, input int id, input int i);
    flit_t f;
    f.ftype = (i == 0) ? FT_HEAD : (i == 1) ? FT_HEAD2 : (i == LEN - 1) ? FT_TAIL : FT_BODY;
    f.data  = (i == 0) ? 16'(dst) : {8'(id), 8'(i)};
    return f;
  endfunction

  // Offer one packet on input port p, VC v, one flit per cycle while room.
  task automatic send(input int p, input int v, input logic [AW-1:0] dst, input int id,
                      input bit record = 0);
    if (record) sent_t = {};
    for (int i = 0; i < LEN; i++) begin
      while (!in_room[p][v]) @(negedge clk);
      in_link[p].valid = 1; in_link[p].vc = VC_W'(v); in_link[p].flit = pf(dst, id, i);
      if (record) sent_t.push_back(cyc);
      @(negedge clk);
      in_link[p] = '0;
    end
  endtask

  task automatic clear();
    for (int p = 0; p < NUM_PORTS; p++) cap[p] = {};
  endtask

  task automatic settle();
    repeat (60) @(negedge clk);
  endtask

  // The flits of packet `id` on port p must all be on VC v, complete, in order.
  task automatic expect_pkt(input string what, input int p, input int v,
                            input logic [AW-1:0] dst, input int id);
    int n = 0;
    logic ok = 1;
    foreach (cap[p][k]) begin
      if (cap[p][k].f == pf(dst, id, n) && (n > 0 || cap[p][k].f.ftype == FT_HEAD)) begin
        if (cap[p][k].vc != v) ok = 0;
        n++;
        if (n == LEN) break;
      end
    end
    checks++;
    if (!ok || n != LEN) begin
      failures++;
      $display("%s: port %0d vc %0d got %0d of %0d flits (vc ok %0b)", what, p, v, n, LEN, ok);
    end
  endtask

  task automatic expect_quiet(input string what, input int except);
    for (int p = 0; p < NUM_PORTS; p++) if (p != except) begin
      checks++;
      if (cap[p].size() != 0) begin
        failures++; $display("%s: %0d stray flits on port %0d", what, cap[p].size(), p);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NUM_PORTS; p++) begin in_link[p] = '0; out_room[p] = '1; end
    my_addr = A(1, 1, 1, 1, 0, 0);      // y-axis gate node of BM (1,1,1)
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- T1: local -> +z neighbour, timing
    clear();
    send(P_LOC, 0, A(1, 1, 1, 2, 0, 0), 1, 1);
    settle();
    expect_pkt("T1 route", P_ZP, 0, A(1, 1, 1, 2, 0, 0), 1);
    expect_quiet("T1", P_ZP);
    if (cap[P_ZP].size() == LEN) begin
      // header: 3 cycles; every later flit 2 cycles after it was offered,
      // but not before the cycle after the flit ahead of it
      for (int i = 0; i < LEN; i++) begin
        automatic int exp_t = (i == 0) ? sent_t[0] + 3
                  : ((sent_t[i] + 2 > cap[P_ZP][i-1].t + 1) ? sent_t[i] + 2 : cap[P_ZP][i-1].t + 1);
        checks++;
        if (cap[P_ZP][i].t != exp_t) begin
          failures++;
          $display("T1 flit %0d left at %0d, expected %0d", i, cap[P_ZP][i].t, exp_t);
        end
      end
      checks++;
      if (cap[P_ZP][LEN-1].t - sent_t[LEN-1] != 2) begin
        failures++; $display("T1 tail latency %0d, expected 2", cap[P_ZP][LEN-1].t - sent_t[LEN-1]);
      end
    end

    // ---- T2: wrap-around link takes VC1; -z without wrap keeps VC0
    my_addr = A(1, 1, 1, 3, 2, 2);
    clear();
    send(P_LOC, 0, A(1, 1, 1, 0, 2, 2), 2);
    send(P_LOC, 0, A(1, 1, 1, 2, 2, 2), 3);
    settle();
    expect_pkt("T2 wrap", P_ZP, 1, A(1, 1, 1, 0, 2, 2), 2);
    expect_pkt("T2 -z", P_ZM, 0, A(1, 1, 1, 2, 2, 2), 3);

    // ---- T3: two VCs share the +z link, round robin at full rate
    my_addr = A(1, 1, 1, 1, 0, 0);
    clear();
    fork
      send(P_LOC, 0, A(1, 1, 1, 2, 0, 0), 4);
      send(P_ZM, 1, A(1, 1, 1, 3, 0, 0), 5);    // arrived on VC1 going +z: keeps VC1
    join
    settle();
    expect_pkt("T3 vc0", P_ZP, 0, A(1, 1, 1, 2, 0, 0), 4);
    expect_pkt("T3 vc1", P_ZP, 1, A(1, 1, 1, 3, 0, 0), 5);
    begin
      int sw = 0, gaps = 0;
      for (int k = 1; k < cap[P_ZP].size(); k++) begin
        if (cap[P_ZP][k].vc != cap[P_ZP][k-1].vc) sw++;
      end
      // while both packets stream the link must alternate and never idle
      for (int k = 1; k < 2 * LEN - 4; k++)
        if (cap[P_ZP][k].t != cap[P_ZP][k-1].t + 1) gaps++;
      checks++;
      if (sw < LEN) begin failures++; $display("T3: link switched VC only %0d times", sw); end
      checks++;
      if (gaps != 0) begin failures++; $display("T3: %0d idle cycles on shared link", gaps); end
    end

    // ---- T4: same output VC wanted twice: wormhole, no interleaving
    clear();
    vc_wait_cycles = 0;
    fork
      send(P_LOC, 0, A(1, 1, 1, 2, 0, 0), 6);
      send(P_XM, 0, A(1, 1, 1, 2, 0, 0), 7);
    join
    settle();
    expect_pkt("T4 a", P_ZP, 0, A(1, 1, 1, 2, 0, 0), 6);
    expect_pkt("T4 b", P_ZP, 0, A(1, 1, 1, 2, 0, 0), 7);
    begin
      int bad = 0;
      for (int k = 0; k < cap[P_ZP].size(); k++) begin
        automatic int base = k - k % LEN;
        if (cap[P_ZP][k].f.ftype != pf(0, 0, k % LEN).ftype) bad++;
        if (k % LEN > 1 && cap[P_ZP][k].f.data[15:8] != cap[P_ZP][base + 1].f.data[15:8]) bad++;
      end
      checks++;
      if (bad != 0) begin
        failures++; $display("T4: packets interleaved on one VC");
        foreach (cap[P_ZP][k]) $display("  %0d vc%0d %0d %h", cap[P_ZP][k].t, cap[P_ZP][k].vc, cap[P_ZP][k].f.ftype, cap[P_ZP][k].f.data);
      end
      checks++;
      if (vc_wait_cycles == 0) begin failures++; $display("T4: second header never waited"); end
    end

    // ---- T5: back-pressure on +z
    clear();
    out_room[P_ZP] = '0;
    fork
      send(P_LOC, 0, A(1, 1, 1, 2, 0, 0), 8);
      begin
        repeat (30) @(negedge clk);
        checks++;
        if (cap[P_ZP].size() != 0) begin failures++; $display("T5: flit sent without room"); end
        out_room[P_ZP] = '1;
      end
    join
    settle();
    expect_pkt("T5", P_ZP, 0, A(1, 1, 1, 2, 0, 0), 8);

    // ---- T6: higher-level links at the y gate node
    clear();
    send(P_LOC, 0, A(1, 2, 1, 3, 3, 3), 9);     // by 1 -> 2: g+
    settle();
    expect_pkt("T6 g+", P_GP, 0, A(1, 2, 1, 3, 3, 3), 9);
    clear();
    send(P_YP, 0, A(1, 0, 2, 0, 0, 0), 10);     // by 1 -> 0: g-
    settle();
    expect_pkt("T6 g-", P_GM, 0, A(1, 0, 2, 0, 0, 0), 10);
    my_addr = A(1, 3, 1, 1, 0, 0);
    clear();
    send(P_GM, 1, A(1, 0, 1, 0, 0, 0), 11);     // by 3 -> 0 going +: wraps, VC1
    settle();
    expect_pkt("T6 wrap", P_GP, 1, A(1, 0, 1, 0, 0, 0), 11);
    clear();
    send(P_LOC, 0, A(2, 0, 0, 0, 0, 0), 12);    // bz differs: go to z gate (0,0,0)
    settle();
    expect_pkt("T6 to z gate", P_ZM, 0, A(2, 0, 0, 0, 0, 0), 12);

    // ---- T7: delivery to the local PE keeps the VC
    clear();
    send(P_GP, 1, A(1, 3, 1, 1, 0, 0), 13);
    settle();
    expect_pkt("T7", P_LOC, 1, A(1, 3, 1, 1, 0, 0), 13);
    expect_quiet("T7", P_LOC);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
