// lb_regs: host-visible register file of the FFT stream system, mapped into
// the host's address space through the local-bus target port.
//
// The host programs the source and destination word addresses and the length
// of a run, then writes CTRL with bit 0 set. If the system is idle and the
// length is a non-zero multiple of FFT_POINTS, a one-cycle start pulse goes to
// both stream engines and the FFT interface control; otherwise the request is
// refused and STATUS.err is set. When the sink engine reports the end of the
// run (done_evt), STATUS.done is set and, with CTRL.irq_en, the irq line is
// raised until the host clears STATUS.done by writing a 1 to it. CYCLES holds
// the clock cycles from start to done of the last run (performance counter).
//
// Register map (word offsets, see pacific_pkg::reg_addr_e):
//   0 CTRL   [0] start (write 1, reads 0), [1] inverse transform, [2] irq_en
//   1 STATUS [0] busy, [1] done (write 1 to clear), [2] err (write 1 to clear)
//   2 SRC, 3 DST (word addresses), 4 LEN (words), 5 CYCLES (read only)
// Writes take effect at the clock edge where cs and we are high; reads are
// combinational from addr while cs is high. A register port programmed by the
// host follows the document's description of IP core programming; the map,
// the checks and the counter are this design's own.
module lb_regs
  import pacific_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host target port
  input  logic              cs,
  input  logic              we,
  input  logic [2:0]        addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  // to the stream engines and FFT control
  output logic              start,
  output logic              inverse,
  output logic [ADDR_W-1:0] src_addr,
  output logic [ADDR_W-1:0] dst_addr,
  output logic [CNT_W-1:0]  len,
  // from the datapath
  input  logic              done_evt,
  // hardware event to the host
  output logic              irq
);
  localparam int unsigned FRAME_BITS = $clog2(FFT_POINTS);

  logic              busy, done, err, irq_en;
  logic [DATA_W-1:0] cycles;
  logic              wr, start_req, len_ok;

  assign wr        = cs && we;
  assign start_req = wr && (reg_addr_e'(addr) == REG_CTRL) && wdata[0];
  assign len_ok    = (len != '0) && (len[FRAME_BITS-1:0] == '0);
  assign irq       = done && irq_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start    <= 1'b0;
      inverse  <= 1'b0;
      irq_en   <= 1'b0;
      src_addr <= '0;
      dst_addr <= '0;
      len      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      err      <= 1'b0;
      cycles   <= '0;
    end else begin
      start <= 1'b0;
      if (busy) cycles <= cycles + 1'b1;
      if (done_evt && busy) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
      if (wr) begin
        unique case (reg_addr_e'(addr))
          REG_CTRL: begin
            inverse <= wdata[1];
            irq_en  <= wdata[2];
          end
          REG_STATUS: begin
            if (wdata[1]) done <= 1'b0;
            if (wdata[2]) err  <= 1'b0;
          end
          REG_SRC:    src_addr <= wdata[ADDR_W-1:0];
          REG_DST:    dst_addr <= wdata[ADDR_W-1:0];
          REG_LEN:    len      <= wdata[CNT_W-1:0];
          default: ;
        endcase
      end
      if (start_req) begin
        if (!busy && len_ok) begin
          start  <= 1'b1;
          busy   <= 1'b1;
          done   <= 1'b0;
          cycles <= '0;
        end else begin
          err <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (cs) begin
      unique case (reg_addr_e'(addr))
        REG_CTRL:   rdata = DATA_W'({irq_en, inverse, 1'b0});
        REG_STATUS: rdata = DATA_W'({err, done, busy});
        REG_SRC:    rdata = DATA_W'(src_addr);
        REG_DST:    rdata = DATA_W'(dst_addr);
        REG_LEN:    rdata = DATA_W'(len);
        REG_CYCLES: rdata = cycles;
        default:    rdata = '0;
      endcase
    end
  end

endmodule
