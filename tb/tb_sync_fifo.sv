// tb_sync_fifo: self-checking test of the stream FIFO against a queue model.
// Random pushes and pops (never pushing a full or popping an empty FIFO),
// checking head word, empty, full and count every cycle; it fills the FIFO to
// full, drains it, and exercises simultaneous push/pop when full.
module tb_sync_fifo;
  localparam int unsigned W = 32;
  localparam int unsigned D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop;
  logic [W-1:0] din, dout;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int fulls = 0, both_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int mode;
      @(negedge clk);
      // compare state with the model
      check(empty == (q.size() == 0), "empty");
      check(full  == (q.size() == D), "full");
      check(count == q.size(), "count");
      if (q.size() != 0) check(dout == q[0], "head");
      if (full) fulls++;
      // phase 1: mostly pushes, phase 2: mostly pops, then random
      mode = (i / 400) % 3;
      case (mode)
        0: begin push = ($urandom % 4) != 0; pop = ($urandom % 4) == 0; end
        1: begin push = ($urandom % 4) == 0; pop = ($urandom % 4) != 0; end
        default: begin push = $urandom % 2; pop = $urandom % 2; end
      endcase
      if (q.size() == 0) pop = 0;
      if (q.size() == D && !pop) push = 0;
      if (q.size() == D && pop && ($urandom % 2)) push = 1;
      if (q.size() == D && push && pop) both_full++;
      din = $urandom;
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(fulls > 0, "reached full");
    check(both_full > 0, "push and pop while full");
    $display("fulls=%0d push_pop_full=%0d", fulls, both_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
