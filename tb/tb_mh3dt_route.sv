// tb_mh3dt_route: self-checking test of the MH3DT routing decision, m = n = 4,
// q = 2.
// 1. Random (node, destination, input port, input VC) cases are compared
//    with a reference written from the routing rules: the direction rule is
//    taken literally from the tag t = d - s (positive for 0 < t <= k/2 or
//    t = -(k-1), negative otherwise), the gate node of the first differing
//    BM dimension sits at az = 0/1/2 in the nearest corner column, and a
//    wrap-around link moves the packet to VC1.
// 2. The worked example (123)(211) -> (333)(111) is walked hop by hop and
//    must pass (123)(000), (323)(000), (323)(100) and (333)(100).
// 3. Every source/destination pair walked from a sample of sources must
//    arrive, with a hop count no larger than the bound of the hierarchy.
module tb_mh3dt_route;
  import mh3dt_pkg::*;
  localparam int M = 4, N = 4, Q = 2;
  localparam int AW = 12;

  logic [AW-1:0] my_addr, dst_addr;
  port_e in_port, out_port;
  logic [VC_W-1:0] in_vc, out_vc;
  int checks = 0, failures = 0;

  mh3dt_route #(.M(M), .N(N), .Q(Q)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int unsigned dig6_t [6];   // bz by bx az ay ax

  function automatic dig6_t split(input logic [AW-1:0] a);
    dig6_t r;
    for (int i = 0; i < 6; i++) r[i] = (a >> (2 * (5 - i))) & 3;
    return r;
  endfunction
  function automatic logic [AW-1:0] join6(input dig6_t r);
    logic [AW-1:0] a = '0;
    for (int i = 0; i < 6; i++) a |= AW'(r[i]) << (2 * (5 - i));
    return a;
  endfunction

  // +1, -1 or 0 from the tag t = d - s on a ring of k = 4
  function automatic int rdir(input int s, input int d, input int k);
    int t = d - s;
    if (t == 0) return 0;
    if ((t > 0 && t <= k / 2) || (t < 0 && t == -(k - 1))) return 1;
    return -1;
  endfunction

  function automatic void ref_route(input logic [AW-1:0] me, input logic [AW-1:0] dst,
                                    input port_e ip, input int ivc,
                                    output port_e op, output int ovc);
    dig6_t a = split(me), d = split(dst);
    int g = -1;
    int tgt [3];
    int dir = 0, dim = -1;
    logic wrap;
    for (int i = 0; i < 3; i++) if (g < 0 && a[i] != d[i]) g = i;
    if (g >= 0) begin
      tgt[0] = g;
      tgt[1] = (a[4] >= 2) ? 3 : 0;
      tgt[2] = (a[5] >= 2) ? 3 : 0;
    end else begin
      tgt[0] = d[3]; tgt[1] = d[4]; tgt[2] = d[5];
    end
    if (g >= 0 && a[3] == tgt[0] && a[4] == tgt[1] && a[5] == tgt[2]) begin
      dir  = rdir(a[g], d[g], N);
      op   = (dir > 0) ? P_GP : P_GM;
      wrap = (dir > 0) ? (a[g] == N - 1) : (a[g] == 0);
    end else begin
      for (int i = 0; i < 3; i++)
        if (dim < 0 && a[3 + i] != tgt[i]) dim = i;
      if (dim < 0) begin
        op = P_LOC; ovc = ivc; return;
      end
      dir  = rdir(a[3 + dim], tgt[dim], M);
      op   = port_e'(2 * dim + ((dir > 0) ? 0 : 1));
      wrap = (dir > 0) ? (a[3 + dim] == M - 1) : (a[3 + dim] == 0);
    end
    if (wrap) ovc = 1;
    else if (ip != P_LOC && (int'(ip) / 2 == int'(op) / 2) && ip != op) ovc = ivc;
    else ovc = 0;
  endfunction

  // address of the neighbour reached through port p
  function automatic logic [AW-1:0] step(input logic [AW-1:0] me, input port_e p);
    dig6_t a = split(me);
    dig6_t d = a;
    int g = -1;
    case (p)
      P_ZP: a[3] = (a[3] + 1) % M;     P_ZM: a[3] = (a[3] + M - 1) % M;
      P_YP: a[4] = (a[4] + 1) % M;     P_YM: a[4] = (a[4] + M - 1) % M;
      P_XP: a[5] = (a[5] + 1) % M;     P_XM: a[5] = (a[5] + M - 1) % M;
      P_GP: a[d[3]] = (a[d[3]] + 1) % N;
      P_GM: a[d[3]] = (a[d[3]] + N - 1) % N;
      default: ;
    endcase
    return join6(a);
  endfunction

  function automatic port_e opposite(input port_e p);
    return port_e'(int'(p) ^ 1);
  endfunction

  task automatic walk(input logic [AW-1:0] s, input logic [AW-1:0] d,
                      output int hops, output logic [AW-1:0] path [$]);
    port_e ip = P_LOC;
    int ivc = 0;
    my_addr = s;
    hops = 0;
    path = {};
    path.push_back(s);
    for (int h = 0; h < 60; h++) begin
      dst_addr = d; in_port = ip; in_vc = VC_W'(ivc);
      #1;
      if (out_port == P_LOC) return;
      ip = opposite(out_port);
      ivc = int'(out_vc);
      my_addr = step(my_addr, out_port);
      path.push_back(my_addr);
      hops++;
    end
    hops = -1;
  endtask

  initial begin
    port_e eop; int evc;
    // 1. random single decisions
    for (int t = 0; t < 20000; t++) begin
      my_addr  = AW'($urandom);
      dst_addr = (t % 3 == 0) ? {my_addr[11:6], 6'($urandom)} : AW'($urandom);
      in_port  = port_e'($urandom % 9);
      in_vc    = VC_W'($urandom);
      #1;
      ref_route(my_addr, dst_addr, in_port, int'(in_vc), eop, evc);
      checks++;
      if (out_port != eop || int'(out_vc) != evc) begin
        failures++;
        if (failures < 10)
          $display("route %h -> %h in %0d/%0d: got %0d/%0d expected %0d/%0d", my_addr,
                   dst_addr, in_port, in_vc, out_port, out_vc, eop, evc);
      end
    end
    // 2. worked example: PE(123)(211) -> PE(333)(111)
    begin
      logic [AW-1:0] path [$];
      int hops;
      logic [AW-1:0] must [4];
      must[0] = {2'd1, 2'd2, 2'd3, 6'o00};
      must[1] = {2'd3, 2'd2, 2'd3, 6'o00};
      must[2] = {2'd3, 2'd2, 2'd3, 2'd1, 2'd0, 2'd0};
      must[3] = {2'd3, 2'd3, 2'd3, 2'd1, 2'd0, 2'd0};
      walk({2'd1, 2'd2, 2'd3, 2'd2, 2'd1, 2'd1}, {2'd3, 2'd3, 2'd3, 2'd1, 2'd1, 2'd1},
           hops, path);
      checks++;
      if (hops < 0 || path[path.size() - 1] != {2'd3, 2'd3, 2'd3, 2'd1, 2'd1, 2'd1}) begin
        failures++; $display("example did not arrive");
      end
      foreach (must[i]) begin
        automatic int found = 0;
        foreach (path[j]) if (path[j] == must[i]) found = 1;
        checks++;
        if (!found) begin failures++; $display("example misses node %o", must[i]); end
      end
      // intra (2,1,1)->(0,0,0): 4 hops, z: 2 hops, y 1 -> 3 hops at level 2... total:
      // 4 (to z gate) + 2 (z ring) + 1 (to y gate) + 1 (y ring) + 2 (to node) = 10
      checks++;
      if (hops != 10) begin failures++; $display("example took %0d hops, expected 10", hops); end
    end
    // 3. many full walks must arrive
    for (int t = 0; t < 3000; t++) begin
      logic [AW-1:0] path [$];
      int hops;
      logic [AW-1:0] s = AW'($urandom), d = AW'($urandom);
      walk(s, d, hops, path);
      checks++;
      // bound: inside BMs at most 6 hops per segment (4 segments), 2 per ring (3 rings)
      if (hops < 0 || path[path.size() - 1] != d || hops > 4 * 6 + 3 * 2) begin
        failures++;
        if (failures < 10) $display("walk %h -> %h failed, hops %0d", s, d, hops);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
