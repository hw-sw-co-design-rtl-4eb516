// tb_fft_if_ctrl: the FFT interface control between a test source, the
// 16-point FFT core model and a test sink. Checks every result against a
// DFT computed here (within one LSB of rounding), the result count, that the
// core is enabled for exactly len + 82 cycles per run (len samples in, the
// pipeline flushed), that a run with a source that is always ready and a sink
// that never pushes back takes exactly len + 82 busy cycles (4096 words: 4178
// cycles), and that both kinds of stall (source empty, sink full) and both
// transform directions occur.
module tb_fft_if_ctrl;
  import pacific_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, inverse, busy, done, stall;
  logic [CNT_W-1:0] len;
  logic [DATA_W-1:0] src_data, snk_data, fft_din, fft_dout;
  logic src_hs_in, src_hs_out, snk_hs_out, snk_hs_in;
  logic fft_start, fft_ce, fft_fwd_inv, fft_dv;
  int checks = 0, failures = 0;
  int src_pct = 100, snk_pct = 100;
  int stalls_src = 0, stalls_snk = 0, flush_cycles = 0, ce_cycles = 0, busy_cycles = 0;
  int runs_fwd = 0, runs_inv = 0;

  fft_if_ctrl dut (.*);
  fft16_model #(.LATENCY(FFT_LATENCY)) core (
    .clk, .start(fft_start), .ce(fft_ce), .fwd_inv(fft_fwd_inv),
    .din(fft_din), .dout(fft_dout), .dv(fft_dv));

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Reference: DFT via a twiddle table, scaled by 1/16.
  real cos_t [16], sin_t [16];
  function automatic void ref_frame(input logic [31:0] x [16], input bit inv,
                                    output int yr [16], output int yi [16]);
    for (int k = 0; k < 16; k++) begin
      real ar, ai, c, s;
      ar = 0.0; ai = 0.0;
      for (int n = 0; n < 16; n++) begin
        c = cos_t[(n * k) % 16];
        s = inv ? sin_t[(n * k) % 16] : -sin_t[(n * k) % 16];
        ar += real'($signed(x[n][31:16])) * c - real'($signed(x[n][15:0])) * s;
        ai += real'($signed(x[n][31:16])) * s + real'($signed(x[n][15:0])) * c;
      end
      yr[k] = int'($floor(ar / 16.0 + 0.5));
      yi[k] = int'($floor(ai / 16.0 + 0.5));
    end
  endfunction

  logic [31:0] in_q [$];
  logic [31:0] inputs [$];
  int n_in = 0, n_out = 0;
  logic [31:0] outputs [$];

  // source: "word waiting", held until taken
  logic src_took = 1'b1, snk_took = 1'b1;
  always @(posedge clk) begin
    src_took <= src_hs_in && src_hs_out;
    snk_took <= snk_hs_in && snk_hs_out;
    if (rst_n && src_hs_in && src_hs_out) void'(in_q.pop_front());
    if (rst_n && snk_hs_in && snk_hs_out) outputs.push_back(snk_data);
    if (busy) begin
      busy_cycles++;
      if (fft_ce) ce_cycles++;
      if (fft_ce && !src_hs_out && !src_hs_in) ; // flush step
      if (stall && in_q.size() != 0 && !src_hs_in) stalls_src++;
      if (stall && fft_dv && !snk_hs_in) stalls_snk++;
      if (fft_ce && dut.in_left == '0) flush_cycles++;
    end
  end
  always @(negedge clk) begin
    if (!src_hs_in || src_took || in_q.size() == 0)
      src_hs_in = (in_q.size() != 0) && (($urandom % 100) < src_pct);
    src_data = (in_q.size() != 0) ? in_q[0] : 32'h0;
    if (!snk_hs_in || snk_took) snk_hs_in = ($urandom % 100) < snk_pct;
  end

  task automatic run(input int n, input bit inv, input int sp, input int kp);
    int yr [16], yi [16];
    logic [31:0] fr [16];
    src_pct = sp; snk_pct = kp;
    inputs.delete(); outputs.delete(); in_q.delete();
    for (int i = 0; i < n; i++) begin
      logic [31:0] w;
      w = {16'($signed($urandom_range(0, 8000)) - 16'sd4000), 16'($signed($urandom_range(0, 8000)) - 16'sd4000)};
      inputs.push_back(w);
      in_q.push_back(w);
    end
    ce_cycles = 0; busy_cycles = 0; flush_cycles = 0;
    @(negedge clk);
    len = CNT_W'(n); inverse = inv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(outputs.size() == n, $sformatf("result count %0d of %0d", outputs.size(), n));
    check(ce_cycles == n + FFT_LATENCY, $sformatf("enabled cycles %0d", ce_cycles));
    check(flush_cycles == FFT_LATENCY, $sformatf("flush cycles %0d", flush_cycles));
    for (int f = 0; f < n / 16 && outputs.size() == n; f++) begin
      for (int i = 0; i < 16; i++) fr[i] = inputs[16 * f + i];
      ref_frame(fr, inv, yr, yi);
      for (int k = 0; k < 16; k++) begin
        int dr, di;
        dr = int'($signed(outputs[16 * f + k][31:16])) - yr[k];
        di = int'($signed(outputs[16 * f + k][15:0])) - yi[k];
        check(dr >= -1 && dr <= 1 && di >= -1 && di <= 1, $sformatf("frame %0d bin %0d", f, k));
      end
    end
    if (inv) runs_inv++; else runs_fwd++;
  endtask

  initial begin
    for (int m = 0; m < 16; m++) begin
      cos_t[m] = $cos(2.0 * 3.14159265358979323846 * real'(m) / 16.0);
      sin_t[m] = $sin(2.0 * 3.14159265358979323846 * real'(m) / 16.0);
    end
    start = 0; len = 0; inverse = 0; src_hs_in = 0; snk_hs_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // uninterrupted run of 4096 words
    run(4096, 1'b0, 100, 100);
    check(busy_cycles == 4096 + FFT_LATENCY, $sformatf("4096-word run took %0d cycles", busy_cycles));
    // stalls from both sides, both directions
    run(256, 1'b0, 60, 70);
    run(160, 1'b1, 50, 40);
    run(16, 1'b1, 100, 100);
    check(stalls_src > 0, "source stalls");
    check(stalls_snk > 0, "sink stalls");
    check(runs_fwd > 0 && runs_inv > 0, "both directions");
    $display("stalls: source=%0d sink=%0d", stalls_src, stalls_snk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
