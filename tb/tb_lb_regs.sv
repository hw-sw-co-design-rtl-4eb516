// tb_lb_regs: host accesses to the register file. Checks read-back of SRC,
// DST, LEN and the CTRL bits; that a valid start gives a single-cycle start
// pulse and sets busy; that starts with a bad length or while busy are
// refused with STATUS.err; that done_evt sets STATUS.done, clears busy and
// raises irq only when enabled; write-1-to-clear of done and err; and that
// CYCLES counts the clock cycles of the run.
module tb_lb_regs;
  import pacific_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cs, we;
  logic [2:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic start, inverse;
  logic [ADDR_W-1:0] src_addr, dst_addr;
  logic [CNT_W-1:0] len;
  logic done_evt, irq;
  int checks = 0, failures = 0;
  int start_pulses = 0;

  lb_regs dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) if (start) start_pulses++;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk);
    cs = 1; we = 1; addr = a; wdata = d;
    @(negedge clk);
    cs = 0; we = 0;
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk);
    cs = 1; we = 0; addr = a;
    #1 d = rdata;
    @(negedge clk);
    cs = 0;
  endtask

  initial begin
    logic [31:0] d;
    int n0;
    cs = 0; we = 0; addr = 0; wdata = 0; done_evt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wr(REG_SRC, 32'h0012_3456);
    wr(REG_DST, 32'hFF65_4321);
    wr(REG_LEN, 32'd4096);
    rd(REG_SRC, d); check(d == 32'h0012_3456, "SRC read-back");
    rd(REG_DST, d); check(d == 32'h0065_4321, "DST read-back (24 bits)");
    rd(REG_LEN, d); check(d == 32'd4096, "LEN read-back");
    check(src_addr == 24'h123456 && dst_addr == 24'h654321 && len == 24'd4096, "outputs");
    rd(REG_STATUS, d); check(d == 32'h0, "idle status");
    // start with inverse and irq enabled
    n0 = start_pulses;
    wr(REG_CTRL, 32'b111);
    check(start, "start pulse follows the write");
    @(negedge clk);
    check(!start, "start pulse lasts one cycle");
    check(start_pulses == n0 + 1, "one start pulse");
    check(inverse, "inverse set");
    rd(REG_CTRL, d); check(d == 32'b110, "CTRL read-back, start reads 0");
    rd(REG_STATUS, d); check(d == 32'b001, "busy");
    // start while busy: refused
    wr(REG_CTRL, 32'b101);
    check(start_pulses == n0 + 1, "no start while busy");
    rd(REG_STATUS, d); check(d == 32'b101, "err while busy");
    wr(REG_STATUS, 32'b100);
    rd(REG_STATUS, d); check(d == 32'b001, "err cleared");
    repeat (20) @(negedge clk);
    check(!irq, "no irq yet");
    done_evt = 1; @(negedge clk); done_evt = 0;
    check(irq, "irq raised");
    rd(REG_STATUS, d); check(d == 32'b010, "done");
    rd(REG_CYCLES, d); check(d >= 30 && d <= 40, $sformatf("cycles %0d", d));
    wr(REG_STATUS, 32'b010);
    check(!irq, "irq cleared");
    // irq disabled: done without irq
    wr(REG_CTRL, 32'b001);
    @(negedge clk);
    check(start_pulses == n0 + 2, "second start");
    done_evt = 1; @(negedge clk); done_evt = 0;
    check(!irq, "irq masked");
    rd(REG_STATUS, d); check(d == 32'b010, "done (masked)");
    // bad lengths refused
    wr(REG_STATUS, 32'b110);
    wr(REG_LEN, 32'd100);
    wr(REG_CTRL, 32'b001);
    rd(REG_STATUS, d); check(d == 32'b100, "length not a multiple of 16");
    wr(REG_STATUS, 32'b100);
    wr(REG_LEN, 32'd0);
    wr(REG_CTRL, 32'b001);
    rd(REG_STATUS, d); check(d == 32'b100, "zero length");
    check(start_pulses == n0 + 2, "no start for bad lengths");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
