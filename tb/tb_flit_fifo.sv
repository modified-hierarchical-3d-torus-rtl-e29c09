// tb_flit_fifo: self-checking test of the channel buffer.
// Random pushes (only while has_room) and pops (only while valid) against a
// queue model; checks dout, valid and has_room every cycle, and that a
// buffer read every cycle can take one flit per cycle.
module tb_flit_fifo;
  import mh3dt_pkg::*;
  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0;
  logic push, pop, valid, has_room;
  flit_t din, dout;
  flit_t model [$];
  int checks = 0, failures = 0;
  int streamed = 0;

  flit_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      checks++;
      if (valid != (model.size() != 0) || has_room != (model.size() < DEPTH) ||
          (valid && dout != model[0])) begin
        failures++;
        $display("t=%0d valid=%b room=%b size=%0d", t, valid, has_room, model.size());
      end
      // second half: a stream that pushes and pops every cycle
      if (t >= 3000) begin
        push = has_room;
        pop  = valid;
      end else begin
        push = has_room && ($urandom % 2);
        pop  = valid && ($urandom % 3 != 0);
      end
      din = flit_t'($urandom);
      if (t >= 3001) begin
        checks++;
        if (!(push && pop)) begin failures++; $display("stream stalled at %0d", t); end
      end
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
