// tb_mh3dt_bm: self-checking test of one basic module, a 4 x 4 x 4 3D torus
// of routers with 2 VCs and 2-flit buffers, under uniform random traffic
// inside the module.
// Every node runs a pe_model that sends NPKT packets of 16 flits to random
// other nodes of the same module and checks each packet it receives. The
// test passes when every packet arrives intact at its destination, nothing
// leaves on a gate link, and the mechanisms of the router have all been
// exercised: dateline VC changes on wrap-around links, headers waiting for a
// busy output VC, both VCs competing for one link, and full next buffers.
module tb_mh3dt_bm;
  import mh3dt_pkg::*;
  localparam int M = 4, N = 4, Q = 2;
  localparam int NODES = M * M * M;
  localparam int NGATE = 3 * (1 << Q) * 2;
  localparam int NPKT = 6;
  localparam int BM_IDX = (1 * N + 2) * N + 3;    // BM (1,2,3)

  logic clk = 0, rst_n = 0;
  link_t   loc_in [NODES], loc_out [NODES];
  credit_t loc_in_room [NODES], loc_out_room [NODES];
  link_t   gate_out [NGATE], gate_in [NGATE];
  credit_t gate_out_room [NGATE], gate_in_room [NGATE];
  router_ev_t ev;
  int unsigned sent [NODES], received [NODES], errors [NODES];
  logic [NODES-1:0] done;

  always #5 clk = ~clk;

  mh3dt_bm dut (
    .clk, .rst_n, .bm_addr(6'b01_10_11),
    .loc_in, .loc_in_room, .loc_out, .loc_out_room,
    .gate_out, .gate_out_room, .gate_in, .gate_in_room, .ev
  );

  for (genvar k = 0; k < NODES; k++) begin : g_pe
    pe_model #(.M(M), .N(N), .NPKT(NPKT), .RATE(300),
               .DST_BASE(BM_IDX * NODES), .DST_COUNT(NODES)) u_pe (
      .clk, .rst_n, .my_idx(BM_IDX * NODES + k),
      .inj(loc_in[k]), .inj_room(loc_in_room[k]),
      .ej(loc_out[k]), .ej_room(loc_out_room[k]),
      .sent(sent[k]), .received(received[k]), .errors(errors[k]), .done(done[k])
    );
  end

  always_comb begin
    for (int g = 0; g < NGATE; g++) begin
      gate_in[g] = '0;
      gate_out_room[g] = '1;
    end
  end

  int checks = 0, failures = 0;
  int n_vc1 = 0, n_wait = 0, n_contend = 0, n_block = 0, n_xblock = 0, n_gate_out = 0;
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ev.vc1_alloc)  n_vc1++;
    if (ev.vc_wait)    n_wait++;
    if (ev.vc_contend) n_contend++;
    if (ev.link_block) n_block++;
    if (ev.xbar_block) n_xblock++;
    for (int g = 0; g < NGATE; g++) if (gate_out[g].valid) n_gate_out++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ts = 0, tr = 0, te = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    // let the network drain
    begin
      int last = -1, now = 0;
      while (last != now) begin
        last = now;
        repeat (200) @(posedge clk);
        now = 0;
        for (int k = 0; k < NODES; k++) now += received[k];
      end
    end
    for (int k = 0; k < NODES; k++) begin
      ts += sent[k]; tr += received[k]; te += errors[k];
    end
    $display("cycles %0d sent %0d received %0d errors %0d", cyc, ts, tr, te);
    $display("events: vc1 %0d vc_wait %0d vc_contend %0d link_block %0d xbar_block %0d",
             n_vc1, n_wait, n_contend, n_block, n_xblock);
    checks++; if (ts != NODES * NPKT) begin failures++; $display("not all packets sent"); end
    checks++; if (tr != ts) begin failures++; $display("packets lost"); end
    checks++; if (te != 0) begin failures++; $display("corrupt packets"); end
    checks++; if (n_gate_out != 0) begin failures++; $display("flits left on a gate link"); end
    checks++; if (n_vc1 == 0) begin failures++; $display("no dateline VC change"); end
    checks++; if (n_wait == 0) begin failures++; $display("no header ever waited"); end
    checks++; if (n_contend == 0) begin failures++; $display("VCs never competed"); end
    checks++; if (n_block == 0 && n_xblock == 0) begin failures++; $display("no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
