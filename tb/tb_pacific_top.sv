// tb_pacific_top: end-to-end test of the whole design at its default sizes.
// A host model programs the register file over the host port, as the C
// program's single FFT call would, with DRAM, FFT core and crypt core models
// on the outside pins.
//   Run 1: 4096 samples forward FFT from word 0 to word 16384, irq enabled.
//          Write grants are withheld for a stretch so that the sink FIFO, then
//          the source FIFO, fill up and the FFT stalls.
//   Run 2: 512 samples inverse FFT with write grants toggling at random.
//   Run 3: 16384 samples forward, the buffer size of the calling C program,
//          with no writes held back.
// Each run also checks the start-up latency: 13 clock edges from the edge that
// takes the CTRL write to the first edge with the core enabled, of which 9
// are the DRAM model's read latency.
//   A start with a bad length is refused.
//   In parallel, the crypt controller makes normal, timed-out and
//   error-condition calls.
// Every result word in DRAM is checked against a DFT computed here (within one
// LSB of rounding), the core must be enabled for exactly len + 82 cycles per
// run, CYCLES must match the measured run time, and every mechanism (FFT
// stall, both FIFOs full, bus contention, pipeline flush, interrupt, inverse
// mode, refused start, crypt timeout and error exceptions) must occur.
module tb_pacific_top;
  import pacific_pkg::*;

  localparam int unsigned N1 = 4096, N2 = 512, N3 = 16384;
  localparam int unsigned SRC = 0, DST = 32768;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lb_cs, lb_we, irq;
  logic [2:0] lb_addr;
  logic [DATA_W-1:0] lb_wdata, lb_rdata;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic fft_start, fft_ce, fft_fwd_inv, fft_dv, fft_stall;
  logic [DATA_W-1:0] fft_din, fft_dout;
  logic crypt_start, crypt_busy, crypt_done, crypt_error;
  logic [31:0] crypt_plaintext, crypt_ciphertext, crypt_key, crypt_indata, crypt_outdata;
  logic crypt_load_key, crypt_ack_in, crypt_ack_out, crypt_init, init_level;
  int unsigned crypt_lat;
  logic hold_writes = 1'b0;
  int checks = 0, failures = 0;

  pacific_top dut (.*);
  dram_model #(.WORDS(65536), .RD_LAT(8), .GNT_PCT(100)) mem (
    .clk, .rst_n, .hold_writes, .req(mem_req), .rsp(mem_rsp));
  fft16_model #(.LATENCY(FFT_LATENCY)) fft (
    .clk, .start(fft_start), .ce(fft_ce), .fwd_inv(fft_fwd_inv),
    .din(fft_din), .dout(fft_dout), .dv(fft_dv));
  crypt_model crypt (
    .clk, .load_key(crypt_load_key), .key(crypt_key), .indata(crypt_indata),
    .ack_in(crypt_ack_in), .ack_out(crypt_ack_out), .outdata(crypt_outdata),
    .init_level, .init(crypt_init), .lat(crypt_lat));

  always #5 clk = !clk;

  initial begin
    repeat (150000) @(posedge clk);
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

  // ---------------------------------------------------------------- events
  int n_stall = 0, n_src_full = 0, n_snk_full = 0, n_contention = 0, n_flush = 0;
  int n_irq = 0, n_inverse = 0, n_refused = 0, n_crypt_ok = 0, n_crypt_timeout = 0;
  int n_crypt_error = 0, ce_cycles = 0;
  logic irq_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (fft_stall) n_stall++;
    if (dut.u_src.fifo_level == FIFO_DEPTH) n_src_full++;
    if (dut.u_snk.fifo_level == FIFO_DEPTH) n_snk_full++;
    if (dut.m_req[0].req && dut.m_req[1].req) n_contention++;
    if (fft_ce && dut.u_ctrl.in_left == '0) n_flush++;
    if (fft_ce) ce_cycles++;
    irq_q <= irq;
    if (irq && !irq_q) n_irq++;
  end

  // ------------------------------------------------------------ host port
  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk);
    lb_cs = 1; lb_we = 1; lb_addr = a; lb_wdata = d;
    @(negedge clk);
    lb_cs = 0; lb_we = 0;
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk);
    lb_cs = 1; lb_we = 0; lb_addr = a;
    #1 d = lb_rdata;
    @(negedge clk);
    lb_cs = 0;
  endtask

  // ------------------------------------------------------------ reference
  real cos_t [16], sin_t [16];
  function automatic void ref_bin(input int base, input int k, input bit inv,
                                  output int yr, output int yi);
    real ar, ai, c, s;
    ar = 0.0; ai = 0.0;
    for (int n = 0; n < 16; n++) begin
      logic [31:0] x;
      x = mem.mem[base + n];
      c = cos_t[(n * k) % 16];
      s = inv ? sin_t[(n * k) % 16] : -sin_t[(n * k) % 16];
      ar += real'($signed(x[31:16])) * c - real'($signed(x[15:0])) * s;
      ai += real'($signed(x[31:16])) * s + real'($signed(x[15:0])) * c;
    end
    yr = int'($floor(ar / 16.0 + 0.5));
    yi = int'($floor(ai / 16.0 + 0.5));
  endfunction

  int startup = 0;
  task automatic fft_run(input int n, input bit inv, input bit random_hold, input bit no_hold);
    logic [31:0] d;
    int t, c0, bad;
    for (int i = 0; i < n; i++) begin
      mem.mem[SRC + i] = {16'($urandom_range(0, 20000)) - 16'd10000,
                          16'($urandom_range(0, 20000)) - 16'd10000};
      mem.mem[DST + i] = 32'hDEAD_BEEF;
    end
    mem.mem[DST + n] = 32'hDEAD_BEEF;
    wr(REG_SRC, SRC);
    wr(REG_DST, DST);
    wr(REG_LEN, n);
    c0 = ce_cycles;
    fork
      begin
        int s0;
        s0 = 0;
        @(posedge clk);   // the edge that takes the CTRL write
        while (!fft_ce) begin @(posedge clk); s0++; end
        startup = s0;
      end
    join_none
    wr(REG_CTRL, {29'd0, 1'b1, inv, 1'b1});
    if (inv) n_inverse++;
    t = 0;
    while (!irq) begin
      @(negedge clk);
      t++;
      if (no_hold)          hold_writes = 1'b0;
      else if (random_hold) hold_writes = ($urandom % 4) == 0;
      else                  hold_writes = (t >= 1500 && t < 3500);
    end
    hold_writes = 1'b0;
    check(ce_cycles - c0 == n + FFT_LATENCY, $sformatf("core enabled %0d cycles", ce_cycles - c0));
    rd(REG_CYCLES, d);
    check(d >= t - 2 && d <= t + 2, $sformatf("CYCLES %0d, measured %0d", d, t));
    rd(REG_STATUS, d);
    check(d[1:0] == 2'b10, "done, not busy");
    wr(REG_STATUS, 32'b010);
    check(!irq, "irq cleared");
    bad = 0;
    for (int f = 0; f < n / 16; f++)
      for (int k = 0; k < 16; k++) begin
        int yr, yi, dr, di;
        logic [31:0] y;
        ref_bin(SRC + 16 * f, k, inv, yr, yi);
        y  = mem.mem[DST + 16 * f + k];
        dr = int'($signed(y[31:16])) - yr;
        di = int'($signed(y[15:0])) - yi;
        checks++;
        if (!(dr >= -1 && dr <= 1 && di >= -1 && di <= 1)) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL result frame %0d bin %0d: %h", f, k, y);
        end
      end
    check(mem.mem[DST + n] == 32'hDEAD_BEEF, "no write past the block");
    $display("run of %0d words (%s): %0d cycles, first sample into the core %0d cycles after the start write",
             n, inv ? "inverse" : "forward", t, startup);
    // write edge -> start pulse (1) -> engine busy (1) -> request granted
    // (1) -> RD_LAT + 1 edges until rvalid is seen -> FIFO push (1) -> the
    // core enabled at the next edge (1)
    check(startup == 5 + 8 + 1 - 1, $sformatf("startup latency %0d", startup));
  endtask

  // ------------------------------------------------------------ crypt calls
  function automatic logic [31:0] ref_cipher(input logic [31:0] p);
    logic [31:0] k, x;
    k = 32'd10027821;
    x = p ^ k;
    return ((x << 5) | (x >> 27)) + k;
  endfunction

  task automatic crypt_call(input logic [31:0] p, input int unsigned lat, input bit init_ok,
                            output bit err, output logic [31:0] c);
    crypt_lat = lat;
    init_level = init_ok;
    @(negedge clk);
    crypt_plaintext = p; crypt_start = 1;
    @(negedge clk);
    crypt_start = 0;
    for (int i = 0; i < 8 && !crypt_done; i++) @(negedge clk);
    init_level = 1;
    while (!crypt_done) @(negedge clk);
    err = crypt_error;
    c = crypt_ciphertext;
  endtask

  initial begin
    logic [31:0] d;
    for (int m = 0; m < 16; m++) begin
      cos_t[m] = $cos(2.0 * 3.14159265358979323846 * real'(m) / 16.0);
      sin_t[m] = $sin(2.0 * 3.14159265358979323846 * real'(m) / 16.0);
    end
    lb_cs = 0; lb_we = 0; lb_addr = 0; lb_wdata = 0;
    crypt_start = 0; crypt_plaintext = 0; crypt_lat = 2; init_level = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    fork
      begin
        fft_run(N1, 1'b0, 1'b0, 1'b0);
        fft_run(N2, 1'b1, 1'b1, 1'b0);
        fft_run(N3, 1'b0, 1'b0, 1'b1);
        wr(REG_LEN, 40);
        wr(REG_CTRL, 32'b001);
        rd(REG_STATUS, d);
        check(d[2] && !d[0], "bad length refused");
        if (d[2]) n_refused++;
      end
      begin
        bit err; logic [31:0] c;
        repeat (100) @(negedge clk);
        for (int i = 0; i < 6; i++) begin
          logic [31:0] p;
          p = $urandom;
          crypt_call(p, i * 3, 1'b1, err, c);     // latency 0..15: answered in time
          check(!err && c == ref_cipher(p), "crypt result");
          if (!err) n_crypt_ok++;
        end
        crypt_call(32'h0, 20, 1'b1, err, c);      // too slow: timeout
        check(err, "crypt timeout");
        if (err) n_crypt_timeout++;
        crypt_call(32'h1, 1, 1'b0, err, c);       // INIT low: error condition
        check(err, "crypt error");
        if (err) n_crypt_error++;
      end
    join
    $display("events: stall=%0d src_full=%0d snk_full=%0d contention=%0d flush=%0d irq=%0d",
             n_stall, n_src_full, n_snk_full, n_contention, n_flush, n_irq);
    $display("events: inverse=%0d refused=%0d crypt_ok=%0d crypt_timeout=%0d crypt_error=%0d",
             n_inverse, n_refused, n_crypt_ok, n_crypt_timeout, n_crypt_error);
    check(n_stall > 0, "FFT stall happened");
    check(n_src_full > 0, "source FIFO full happened");
    check(n_snk_full > 0, "sink FIFO full happened");
    check(n_contention > 0, "bus contention happened");
    check(n_flush == 3 * FFT_LATENCY, "pipeline flushed in every run");
    check(n_irq == 3, "three interrupts");
    check(n_inverse > 0, "inverse mode used");
    check(n_refused > 0, "refused start happened");
    check(n_crypt_ok > 0, "crypt normal calls");
    check(n_crypt_timeout > 0, "crypt timeout exception");
    check(n_crypt_error > 0, "crypt error exception");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
