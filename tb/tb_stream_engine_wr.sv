// tb_stream_engine_wr: a producer with random "word waiting" feeds the sink
// engine, which writes to the DRAM model. Write grants are held back for a
// while so that the FIFO fills and the engine refuses words (back-pressure).
// Checks the memory contents word by word after each run, the done pulse,
// that nothing is written outside the block, and, with an always granting bus
// and an always ready producer, one word per cycle (len + 2 cycles).
module tb_stream_engine_wr;
  import pacific_pkg::*;
  localparam int unsigned D = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [ADDR_W-1:0] base_addr;
  logic [CNT_W-1:0] len;
  mem_req_t m_req;
  mem_rsp_t m_rsp;
  logic [DATA_W-1:0] ip_data;
  logic ip_hs_out, ip_hs_in;
  logic [$clog2(D+1)-1:0] fifo_level;
  logic hold_writes = 1'b0;
  int checks = 0, failures = 0;
  int valid_pct = 100;
  int fulls = 0, refused = 0;

  stream_engine_wr #(.DEPTH(D)) dut (.*);
  dram_model #(.WORDS(4096), .RD_LAT(2), .GNT_PCT(100)) mem (
    .clk, .rst_n, .hold_writes, .req(m_req), .rsp(m_rsp));

  always #5 clk = !clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // producer: word k of a run is 32'h5A000000 + k
  int sent = 0, total = 0;
  always @(posedge clk) begin
    if (rst_n && ip_hs_in && ip_hs_out) sent <= sent + 1;
    if (rst_n && ip_hs_in && !ip_hs_out && busy) refused++;
    if (rst_n && fifo_level == D) fulls++;
  end
  logic took = 1'b1;
  always @(posedge clk) took <= ip_hs_in && ip_hs_out;
  // A raised "word waiting" is held until the word has been taken.
  always @(negedge clk) begin
    if (!ip_hs_in || took || sent >= total)
      ip_hs_in = (sent < total) && (($urandom % 100) < valid_pct);
    ip_data  = 32'h5A000000 + 32'(sent);
  end

  task automatic run(input int base, input int n, input int pct, input int hold, output int cycles);
    valid_pct = pct;
    for (int i = 0; i < 4096; i++) mem.mem[i] = 32'hDEAD0000;
    @(negedge clk);
    base_addr = ADDR_W'(base); len = CNT_W'(n); start = 1'b1;
    sent = 0; total = n;
    hold_writes = (hold != 0);
    @(posedge clk);
    cycles = 1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(negedge clk); cycles++;
      if (cycles == hold) hold_writes = 1'b0;
    end
    for (int i = 0; i < 4096; i++) begin
      if (i >= base && i < base + n) check(mem.mem[i] == 32'h5A000000 + 32'(i - base), "stored word");
      else if (mem.mem[i] != 32'hDEAD0000) check(1'b0, "write outside block");
    end
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    int c;
    start = 0; base_addr = 0; len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run(10, 300, 100, 0, c);
    check(c == 300 + 2, $sformatf("full-rate run took %0d cycles", c));
    run(500, 400, 90, 150, c);
    check(fulls > 0, "FIFO reached full");
    check(refused > 0, "producer held off");
    run(2000, 1500, 40, 0, c);
    run(4095, 1, 100, 0, c);
    $display("fifo_full_cycles=%0d refused=%0d", fulls, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
