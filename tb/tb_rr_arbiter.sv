// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Random request patterns and random `advance` strobes; a reference model
// keeps the index granted last and expects the first requester after it.
// Also checks that a requester that keeps asking is served within N grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [$clog2(N)-1:0] grant_idx;
  logic advance;
  int checks = 0, failures = 0;
  int last, waited;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0; last = N - 1; waited = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      if (t % 7 == 0) req = '1;
      req[0] = req[0] | (t > 1000);   // requester 0 asks continuously later on
      advance = ($urandom % 4) != 0;
      #1;
      begin
        automatic logic [N-1:0] exp = '0;
        automatic int ei = 0;
        for (int k = 1; k <= N; k++) begin
          automatic int i = (last + k) % N;
          if (req[i] && exp == '0) begin exp[i] = 1; ei = i; end
        end
        checks++;
        if (grant !== exp || (exp != 0 && grant_idx != ei)) begin
          failures++;
          $display("t=%0d req=%b grant=%b expected %b", t, req, grant, exp);
        end
        if (advance && exp != 0) last = ei;
        if (t > 1000) begin
          if (advance && grant[0]) waited = 0;
          else if (advance && grant != 0) waited++;
          checks++;
          if (waited >= N) begin failures++; $display("requester 0 starved"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
