// stream_engine_rd: source stream engine. It fetches a block of words from
// shared memory as local-bus master and streams them into an IP core's input
// port through a rate-matching FIFO.
//
// A start pulse loads the word address and the length. The engine then issues
// one read request per cycle while the bus grants it and while the FIFO is
// sure to have room for every word in flight (FIFO occupancy plus reads still
// outstanding below DEPTH), so the bus can run with many reads outstanding and
// any read latency. Returned words (rvalid, in order) are pushed into the FIFO.
// The FIFO head goes to the IP port under the PaCIFIC handshake of hs_port:
// the outgoing line says "a word is waiting", the incoming line is the IP
// side's "ready to consume". busy is high from start until the last word has
// been handed to the IP port; done pulses for one cycle then.
//
// The role of the engine, bus-master access and the 256 x 32-bit FIFO follow
// the evaluated system; the bus protocol, the credit scheme and the
// start/done interface are this design's own.
module stream_engine_rd
  import pacific_pkg::*;
#(
  parameter int unsigned DEPTH        = FIFO_DEPTH,
  parameter bit          OUT_ACT_HIGH = 1'b1,
  parameter bit          IN_ACT_HIGH  = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [CNT_W-1:0]  len,
  output logic              busy,
  output logic              done,
  // local-bus master port (reads only)
  output mem_req_t          m_req,
  input  mem_rsp_t          m_rsp,
  // IP input port
  output logic [DATA_W-1:0] ip_data,
  output logic              ip_hs_out,   // word waiting
  input  logic              ip_hs_in,    // IP ready to consume
  // status
  output logic [$clog2(DEPTH+1)-1:0] fifo_level
);
  localparam int unsigned LW = $clog2(DEPTH+1);

  logic [ADDR_W-1:0] addr_q;
  logic [CNT_W-1:0]  to_issue, to_deliver;
  logic [LW-1:0]     outstanding;
  logic              fifo_empty, fifo_full, ip_xfer;
  logic              issue, credit_ok;

  // Room in the FIFO for one more word beyond those already in flight.
  assign credit_ok = ({1'b0, fifo_level} + {1'b0, outstanding}) < (LW+1)'(DEPTH);
  assign m_req.req   = busy && (to_issue != '0) && credit_ok;
  assign m_req.we    = 1'b0;
  assign m_req.addr  = addr_q;
  assign m_req.wdata = '0;
  assign issue       = m_req.req && m_rsp.gnt;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (m_rsp.rvalid),
    .din  (m_rsp.rdata),
    .pop  (ip_xfer),
    .dout (ip_data),
    .empty(fifo_empty),
    .full (fifo_full),
    .count(fifo_level)
  );

  hs_port #(.USE_OUT(1'b1), .USE_IN(1'b1),
            .OUT_ACT_HIGH(OUT_ACT_HIGH), .IN_ACT_HIGH(IN_ACT_HIGH)) u_hs (
    .clk, .rst_n,
    .able  (!fifo_empty),
    .hs_in (ip_hs_in),
    .hs_out(ip_hs_out),
    .xfer  (ip_xfer)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      addr_q      <= '0;
      to_issue    <= '0;
      to_deliver  <= '0;
      outstanding <= '0;
    end else begin
      done <= 1'b0;
      outstanding <= outstanding + LW'(issue) - LW'(m_rsp.rvalid);
      if (!busy) begin
        if (start && len != '0) begin
          busy       <= 1'b1;
          addr_q     <= base_addr;
          to_issue   <= len;
          to_deliver <= len;
        end
      end else begin
        if (issue) begin
          addr_q   <= addr_q + 1'b1;
          to_issue <= to_issue - 1'b1;
        end
        if (ip_xfer) begin
          to_deliver <= to_deliver - 1'b1;
          if (to_deliver == CNT_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  a_no_stray_data: assert property (@(posedge clk) disable iff (!rst_n)
                                    m_rsp.rvalid |-> (outstanding != '0));
  a_fifo_room:     assert property (@(posedge clk) disable iff (!rst_n)
                                    m_rsp.rvalid |-> !fifo_full);

endmodule
