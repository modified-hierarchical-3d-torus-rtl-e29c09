// tb_mh3dt_top: end-to-end test of the Level-2 MH3DT network at the top's
// default size (m = 4, n = 2, q = 2: 8 basic modules, 512 nodes).
// Every node runs a pe_model that sends NPKT packets of 16 flits (2 header
// flits) to destinations drawn uniformly from all other nodes, and checks
// every packet it receives. The test passes when every packet arrives intact
// and each mechanism of the network has happened at least once: a header
// taking a higher-level gate link, a dateline change to VC1 on a wrap-around
// link, a header waiting for a busy output VC, both VCs of a link competing
// (round robin), and a flit held back by a full buffer.
module tb_mh3dt_top;
  import mh3dt_pkg::*;
  localparam int M = 4, N = 2;
  localparam int NODES = M * M * M * N * N * N;
  localparam int NPKT = 2;

  logic clk = 0, rst_n = 0;
  link_t   loc_in [NODES], loc_out [NODES];
  credit_t loc_in_room [NODES], loc_out_room [NODES];
  router_ev_t ev;
  int unsigned sent [NODES], received [NODES], errors [NODES];
  logic [NODES-1:0] done;

  always #5 clk = ~clk;

  mh3dt_top dut (.clk, .rst_n, .loc_in, .loc_in_room, .loc_out, .loc_out_room, .ev);

  for (genvar k = 0; k < NODES; k++) begin : g_pe
    pe_model #(.M(M), .N(N), .NPKT(NPKT), .RATE(200)) u_pe (
      .clk, .rst_n, .my_idx(k),
      .inj(loc_in[k]), .inj_room(loc_in_room[k]),
      .ej(loc_out[k]), .ej_room(loc_out_room[k]),
      .sent(sent[k]), .received(received[k]), .errors(errors[k]), .done(done[k])
    );
  end

  int checks = 0, failures = 0;
  int n_vc1 = 0, n_gate = 0, n_wait = 0, n_contend = 0, n_block = 0;
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ev.vc1_alloc)  n_vc1++;
    if (ev.gate_hop)   n_gate++;
    if (ev.vc_wait)    n_wait++;
    if (ev.vc_contend) n_contend++;
    if (ev.link_block || ev.xbar_block) n_block++;
  end

  initial begin
    repeat (30000) @(posedge clk);
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
    begin
      int last = -1, now = 0;
      while (last != now) begin
        last = now;
        repeat (300) @(posedge clk);
        now = 0;
        for (int k = 0; k < NODES; k++) now += received[k];
      end
    end
    for (int k = 0; k < NODES; k++) begin
      ts += sent[k]; tr += received[k]; te += errors[k];
    end
    $display("cycles %0d sent %0d received %0d errors %0d", cyc, ts, tr, te);
    $display("events: gate %0d vc1 %0d vc_wait %0d vc_contend %0d blocked %0d",
             n_gate, n_vc1, n_wait, n_contend, n_block);
    checks++; if (ts != NODES * NPKT) begin failures++; $display("not all packets sent"); end
    checks++; if (tr != ts) begin failures++; $display("packets lost"); end
    checks++; if (te != 0) begin failures++; $display("corrupt packets"); end
    checks++; if (n_gate == 0) begin failures++; $display("no gate link used"); end
    checks++; if (n_vc1 == 0) begin failures++; $display("no dateline VC change"); end
    checks++; if (n_wait == 0) begin failures++; $display("no header ever waited"); end
    checks++; if (n_contend == 0) begin failures++; $display("VCs never competed"); end
    checks++; if (n_block == 0) begin failures++; $display("no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
