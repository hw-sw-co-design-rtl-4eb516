// pacific_top: FPGA side of a host program calling a streaming 16-point FFT
// core as if it were one C function, and, beside it, the interface controller
// of a crypt core called one word at a time.
//
// FFT system: the host writes source address, destination address, length and
// direction into lb_regs and starts a run. The source stream engine then reads
// the input block from shared DRAM as local-bus master into its 256-word FIFO;
// fft_if_ctrl streams the samples through the external FFT core (clock-enabled,
// 82 cycles of latency), flushing its pipeline at the end; the sink stream
// engine collects the results in its own FIFO and writes them back to DRAM.
// Both engines share the single local-bus master port through bus_arbiter.
// The end of the run is signalled by STATUS.done and, if enabled, irq.
//
// Crypt controller: crypt_ctrl runs the "encrypt" behaviour (load the fixed
// key, hand over one word, wait for the answer with timeout and error
// exception) against an external crypt core. It shares only the clock and
// reset with the FFT system.
//
// The FFT core, the crypt core, the DRAM and the host bus bridge are outside
// this module; their pins are ports. All ports are plain signals or the bus
// structs of pacific_pkg. Sizes follow the evaluated system (32-bit data,
// 256-word FIFOs, 82-cycle FFT latency); the register map and the bus protocol
// are this design's own.
module pacific_top
  import pacific_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host register port
  input  logic              lb_cs,
  input  logic              lb_we,
  input  logic [2:0]        lb_addr,
  input  logic [DATA_W-1:0] lb_wdata,
  output logic [DATA_W-1:0] lb_rdata,
  output logic              irq,
  // local-bus master port to shared DRAM
  output mem_req_t          mem_req,
  input  mem_rsp_t          mem_rsp,
  // FFT core pins
  output logic              fft_start,
  output logic              fft_ce,
  output logic              fft_fwd_inv,
  output logic [DATA_W-1:0] fft_din,
  input  logic [DATA_W-1:0] fft_dout,
  input  logic              fft_dv,
  output logic              fft_stall,
  // crypt controller, caller side
  input  logic              crypt_start,
  input  logic [31:0]       crypt_plaintext,
  output logic [31:0]       crypt_ciphertext,
  output logic              crypt_busy,
  output logic              crypt_done,
  output logic              crypt_error,
  // crypt core pins
  output logic              crypt_load_key,
  output logic [31:0]       crypt_key,
  output logic [31:0]       crypt_indata,
  output logic              crypt_ack_in,
  input  logic              crypt_ack_out,
  input  logic [31:0]       crypt_outdata,
  input  logic              crypt_init
);
  logic              start, inverse;
  logic [ADDR_W-1:0] src_addr, dst_addr;
  logic [CNT_W-1:0]  len;
  logic              rd_busy, rd_done, wr_busy, wr_done, ctl_busy, ctl_done;
  mem_req_t          m_req [2];
  mem_rsp_t          m_rsp [2];
  logic [DATA_W-1:0] src_data, snk_data;
  logic              src_valid, src_ready, snk_valid, snk_ready;
  logic [$clog2(FIFO_DEPTH+1)-1:0] rd_level, wr_level;

  lb_regs u_regs (
    .clk, .rst_n,
    .cs(lb_cs), .we(lb_we), .addr(lb_addr), .wdata(lb_wdata), .rdata(lb_rdata),
    .start, .inverse, .src_addr, .dst_addr, .len,
    .done_evt(wr_done),
    .irq
  );

  stream_engine_rd u_src (
    .clk, .rst_n,
    .start, .base_addr(src_addr), .len, .busy(rd_busy), .done(rd_done),
    .m_req(m_req[0]), .m_rsp(m_rsp[0]),
    .ip_data(src_data), .ip_hs_out(src_valid), .ip_hs_in(src_ready),
    .fifo_level(rd_level)
  );

  fft_if_ctrl u_ctrl (
    .clk, .rst_n,
    .start, .len, .inverse, .busy(ctl_busy), .done(ctl_done), .stall(fft_stall),
    .src_data, .src_hs_in(src_valid), .src_hs_out(src_ready),
    .snk_data, .snk_hs_out(snk_valid), .snk_hs_in(snk_ready),
    .fft_start, .fft_ce, .fft_fwd_inv, .fft_din, .fft_dout, .fft_dv
  );

  stream_engine_wr u_snk (
    .clk, .rst_n,
    .start, .base_addr(dst_addr), .len, .busy(wr_busy), .done(wr_done),
    .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .ip_data(snk_data), .ip_hs_in(snk_valid), .ip_hs_out(snk_ready),
    .fifo_level(wr_level)
  );

  bus_arbiter u_arb (
    .clk, .rst_n,
    .m_req, .m_rsp,
    .s_req(mem_req), .s_rsp(mem_rsp)
  );

  crypt_ctrl u_crypt (
    .clk, .rst_n,
    .start(crypt_start), .plaintext(crypt_plaintext), .ciphertext(crypt_ciphertext),
    .busy(crypt_busy), .done(crypt_done), .error(crypt_error),
    .load_key(crypt_load_key), .key(crypt_key), .indata(crypt_indata),
    .ack_in(crypt_ack_in), .ack_out(crypt_ack_out), .outdata(crypt_outdata),
    .init(crypt_init)
  );

  // The three units of the FFT system start together and the sink finishes
  // last: the source has handed over every word and the controller every
  // result before the last result is written.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !(rd_busy || ctl_busy || wr_busy));
  a_sink_last:  assert property (@(posedge clk) disable iff (!rst_n)
                                 wr_done |-> !(rd_busy || ctl_busy));

endmodule
