// tb_stream_engine_rd: the source engine reads blocks from the DRAM model
// and hands them to a consumer with random readiness. Checks every delivered
// word against memory, in order; the word count; the done pulse; that the
// FIFO fills to capacity when the consumer pauses (and the credit scheme then
// stops the reads, caught by the engine's assertions); and, with an always
// ready consumer and an always granting bus, a rate of one word per cycle:
// len words take len + read latency + 3 cycles from start to done.
module tb_stream_engine_rd;
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
  int ready_pct = 100;
  int fulls = 0;

  stream_engine_rd #(.DEPTH(D)) dut (.*);
  dram_model #(.WORDS(4096), .RD_LAT(6), .GNT_PCT(100)) mem (
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

  // consumer
  int got = 0;
  logic [ADDR_W-1:0] exp_addr;
  always @(posedge clk) begin
    if (rst_n && ip_hs_out && ip_hs_in) begin
      check(ip_data == (32'hA5000000 ^ 32'(exp_addr)), "data");
      exp_addr <= exp_addr + 1'b1;
      got <= got + 1;
    end
    if (rst_n && fifo_level == D) fulls++;
  end
  // A raised "ready" is held until a word has been taken (handshake rule).
  logic took = 1'b1;
  always @(posedge clk) took <= ip_hs_in && ip_hs_out;
  always @(negedge clk)
    if (!ip_hs_in || took) ip_hs_in = ($urandom % 100) < ready_pct;

  task automatic run(input int base, input int n, input int pct, output int cycles);
    ready_pct = pct;
    @(negedge clk);
    base_addr = ADDR_W'(base); len = CNT_W'(n); start = 1'b1;
    exp_addr = ADDR_W'(base);
    got = 0;
    @(posedge clk);
    cycles = 1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin @(negedge clk); cycles++; end
    check(got == n, $sformatf("delivered %0d of %0d", got, n));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    int c;
    for (int i = 0; i < 4096; i++) mem.mem[i] = 32'hA5000000 ^ 32'(i);
    start = 0; base_addr = 0; len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run(100, 200, 100, c);
    check(c == 200 + 6 + 3, $sformatf("full-rate run took %0d cycles", c));
    run(1000, 500, 30, c);
    check(fulls > 0, "FIFO reached full");
    run(3000, 1000, 70, c);
    run(7, 1, 100, c);
    check(m_req.req == 1'b0, "no request when idle");
    $display("fifo_full_cycles=%0d", fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
