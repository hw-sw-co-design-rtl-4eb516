// tb_bus_arbiter: two masters issue random mixes of reads and writes through
// the arbiter to the DRAM model (grant 80 % of cycles, read latency 5).
// Checks that every read returns to the master that issued it, in order and
// with the right word; that every granted write lands in memory; and that
// while both masters keep requesting, the master presented to the bus
// alternates (round robin, the turn passing on a grant or a refusal).
module tb_bus_arbiter;
  import pacific_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t m_req [2];
  mem_rsp_t m_rsp [2];
  mem_req_t s_req;
  mem_rsp_t s_rsp;
  logic hold_writes = 1'b0;
  int checks = 0, failures = 0;
  int both_req = 0, alternations = 0, same_twice = 0;

  bus_arbiter #(.MAX_RD(8)) dut (.*);
  dram_model #(.WORDS(1024), .RD_LAT(5), .GNT_PCT(80)) mem (
    .clk, .rst_n, .hold_writes, .req(s_req), .rsp(s_rsp));

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
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Master m only touches addresses with bit 9 == m, so its reads are
  // predictable from its own writes.
  logic [31:0] shadow [1024];
  logic [31:0] exp_q [2][$];
  int reads_done [2] = '{0, 0};
  int last_gnt = -1;
  bit stop = 1'b0;

  always @(negedge clk) begin
    for (int m = 0; m < 2; m++) begin
      // keep a request until it is granted
      if (!m_req[m].req || !rst_n) begin
        m_req[m].req   = !stop && (($urandom % 100) < 85);
        m_req[m].we    = $urandom % 2;
        m_req[m].addr  = ADDR_W'({m[0], 9'($urandom)});
        m_req[m].wdata = $urandom;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    int g;
    g = -1;
    for (int m = 0; m < 2; m++) begin
      check(!(m_rsp[m].gnt && !m_req[m].req), "grant without request");
      if (m_rsp[m].gnt) begin
        g = m;
        if (m_req[m].we) shadow[m_req[m].addr[9:0]] = m_req[m].wdata;
        else exp_q[m].push_back(shadow[m_req[m].addr[9:0]]);
      end
      if (m_rsp[m].rvalid) begin
        check(exp_q[m].size() != 0, "unexpected read data");
        if (exp_q[m].size() != 0) check(m_rsp[m].rdata == exp_q[m].pop_front(), "read data");
        reads_done[m]++;
      end
    end
    check(!(m_rsp[0].gnt && m_rsp[1].gnt), "one grant at a time");
    // After master m was served, a waiting other master is presented next.
    if (m_req[0].req && m_req[1].req) begin
      both_req++;
      if (last_gnt >= 0) begin
        if (int'(dut.sel) != last_gnt) alternations++;
        else same_twice++;
      end
    end
    last_gnt = (g >= 0) ? g : (m_req[0].req && m_req[1].req) ? int'(dut.sel) : -1;
    // grant only follows a request; no grant means the bus said no
    if (g >= 0) begin
      m_req[g].req <= 1'b0;
    end
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      mem.mem[i] = 32'(i) * 32'h9E3779B1;
      shadow[i]  = 32'(i) * 32'h9E3779B1;
    end
    m_req[0] = '0; m_req[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5000) @(posedge clk);
    // let outstanding reads drain
    stop = 1'b1;
    repeat (50) @(posedge clk);
    check(reads_done[0] > 100 && reads_done[1] > 100, "both masters read");
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all reads answered");
    check(both_req > 100, "contention happened");
    check(same_twice == 0, $sformatf("round robin broken %0d times", same_twice));
    $display("reads m0=%0d m1=%0d contention=%0d alternations=%0d", reads_done[0], reads_done[1],
             both_req, alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
