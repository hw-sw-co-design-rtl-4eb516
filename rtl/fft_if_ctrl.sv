// fft_if_ctrl: interface control between the two stream engines and a
// streaming 16-point complex FFT/IFFT core.
//
// The core takes one complex sample {re[15:0], im[15:0]} per enabled clock
// and, once its pipeline is full, delivers one result per enabled clock; its
// first result appears LATENCY enabled cycles after its first sample. The
// whole core is frozen by its clock enable fft_ce. The controller therefore
// runs the core only in cycles where nothing can be lost: during the input
// phase a sample must be waiting at the source engine, and whenever the core's
// output is valid (fft_dv) the sink engine must be ready to take it. After the
// last of len samples it keeps the core enabled with zero input, flushing the
// pipeline, until all len results have been handed to the sink. A run of len
// words with no stalls therefore takes len + LATENCY enabled cycles.
//
// Timing: start (one cycle, while idle) latches len and the transform
// direction (fft_fwd_inv: 1 = forward) and pulses fft_start, which restarts the
// core's frame and latency counting. busy stays high until the last result has
// been passed on; done pulses one cycle then. Both engine ports use the
// PaCIFIC handshake (hs_port); the src port's incoming line means "word
// waiting", the snk port's means "ready to consume".
//
// The continuous streaming, the 32-bit complex buses and the 82-cycle latency
// follow the evaluated FFT system. The core's pin names, clock-enable stalling
// and zero flushing are this design's assumptions about the core.
module fft_if_ctrl
  import pacific_pkg::*;
#(
  parameter int unsigned LATENCY     = FFT_LATENCY,
  parameter bit          IN_ACT_HIGH = 1'b1,
  parameter bit          OUT_ACT_HIGH = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [CNT_W-1:0]  len,
  input  logic              inverse,
  output logic              busy,
  output logic              done,
  output logic              stall,       // busy but core not enabled this cycle
  // from source stream engine
  input  logic [DATA_W-1:0] src_data,
  input  logic              src_hs_in,   // word waiting
  output logic              src_hs_out,  // ready to consume
  // to sink stream engine
  output logic [DATA_W-1:0] snk_data,
  output logic              snk_hs_out,  // word waiting
  input  logic              snk_hs_in,   // ready to consume
  // FFT core
  output logic              fft_start,
  output logic              fft_ce,
  output logic              fft_fwd_inv,
  output logic [DATA_W-1:0] fft_din,
  input  logic [DATA_W-1:0] fft_dout,
  input  logic              fft_dv
);
  logic [CNT_W-1:0] in_left, out_left;
  logic             src_valid, snk_ready, in_phase, in_ok, out_ok;
  logic             src_xfer, snk_xfer;

  assign src_valid = (src_hs_in == IN_ACT_HIGH);
  assign snk_ready = (snk_hs_in == IN_ACT_HIGH);
  assign in_phase  = (in_left != '0);
  assign in_ok     = !in_phase || src_valid;
  assign out_ok    = !fft_dv || snk_ready;

  assign fft_ce    = busy && (out_left != '0) && in_ok && out_ok;
  assign fft_din   = in_phase ? src_data : '0;
  assign fft_start = start && !busy;
  assign snk_data  = fft_dout;
  assign stall     = busy && !fft_ce;

  hs_port #(.USE_OUT(1'b1), .USE_IN(1'b1),
            .OUT_ACT_HIGH(OUT_ACT_HIGH), .IN_ACT_HIGH(IN_ACT_HIGH)) u_src_hs (
    .clk, .rst_n,
    .able  (busy && in_phase && out_ok),
    .hs_in (src_hs_in),
    .hs_out(src_hs_out),
    .xfer  (src_xfer)
  );

  hs_port #(.USE_OUT(1'b1), .USE_IN(1'b1),
            .OUT_ACT_HIGH(OUT_ACT_HIGH), .IN_ACT_HIGH(IN_ACT_HIGH)) u_snk_hs (
    .clk, .rst_n,
    .able  (busy && (out_left != '0) && fft_dv && in_ok),
    .hs_in (snk_hs_in),
    .hs_out(snk_hs_out),
    .xfer  (snk_xfer)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      in_left     <= '0;
      out_left    <= '0;
      fft_fwd_inv <= 1'b1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && len != '0) begin
          busy        <= 1'b1;
          in_left     <= len;
          out_left    <= len;
          fft_fwd_inv <= !inverse;
        end
      end else begin
        if (src_xfer) in_left <= in_left - 1'b1;
        if (snk_xfer) begin
          out_left <= out_left - 1'b1;
          if (out_left == CNT_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // The core must deliver its first result exactly LATENCY enabled cycles
  // after its first sample; every later enabled cycle carries a result.
  logic [$clog2(LATENCY+1)-1:0] warmup;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                warmup <= '0;
    else if (fft_start)                        warmup <= '0;
    else if (fft_ce && warmup != LATENCY[$clog2(LATENCY+1)-1:0]) warmup <= warmup + 1'b1;
  end
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              busy |-> (fft_dv == (warmup == LATENCY[$clog2(LATENCY+1)-1:0])));

  // Every enabled cycle of the input phase consumes a sample, every enabled
  // cycle with a valid result hands it to the sink.
  a_in_step:  assert property (@(posedge clk) disable iff (!rst_n) (fft_ce && in_phase) |-> src_xfer);
  a_out_step: assert property (@(posedge clk) disable iff (!rst_n) (fft_ce && fft_dv) |-> snk_xfer);

endmodule
