// stream_engine_wr: sink stream engine. It collects the words an IP core
// delivers on an output port in a rate-matching FIFO and writes them to
// shared memory as local-bus master.
//
// A start pulse loads the word address and the length. The IP port uses the
// PaCIFIC handshake of hs_port: the outgoing line says "ready to consume"
// (FIFO not full and not all len words taken yet), the incoming line is the IP side's "data waiting". Whenever
// the FIFO holds a word the engine requests a write of its head word; the word
// leaves the FIFO and the address advances at each edge where the bus grants
// the request (writes are posted, no response is awaited). busy is high from
// start until the last of len words has been granted on the bus; done pulses
// for one cycle then.
//
// The role of the engine, bus-master access and the 256 x 32-bit FIFO follow
// the evaluated system; the bus protocol and the start/done interface are this
// design's own.
module stream_engine_wr
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
  // local-bus master port (writes only)
  output mem_req_t          m_req,
  input  mem_rsp_t          m_rsp,
  // IP output port
  input  logic [DATA_W-1:0] ip_data,
  input  logic              ip_hs_in,    // IP has a word waiting
  output logic              ip_hs_out,   // ready to consume
  // status
  output logic [$clog2(DEPTH+1)-1:0] fifo_level
);
  logic [ADDR_W-1:0] addr_q;
  logic [CNT_W-1:0]  to_write, to_accept;
  logic [DATA_W-1:0] head;
  logic              fifo_empty, fifo_full, ip_xfer, wr_ok;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (ip_xfer),
    .din  (ip_data),
    .pop  (wr_ok),
    .dout (head),
    .empty(fifo_empty),
    .full (fifo_full),
    .count(fifo_level)
  );

  hs_port #(.USE_OUT(1'b1), .USE_IN(1'b1),
            .OUT_ACT_HIGH(OUT_ACT_HIGH), .IN_ACT_HIGH(IN_ACT_HIGH)) u_hs (
    .clk, .rst_n,
    .able  ((to_accept != '0) && !fifo_full),
    .hs_in (ip_hs_in),
    .hs_out(ip_hs_out),
    .xfer  (ip_xfer)
  );

  assign m_req.req   = busy && !fifo_empty;
  assign m_req.we    = 1'b1;
  assign m_req.addr  = addr_q;
  assign m_req.wdata = head;
  assign wr_ok       = m_req.req && m_rsp.gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      addr_q   <= '0;
      to_write <= '0;
      to_accept <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && len != '0) begin
          busy     <= 1'b1;
          addr_q   <= base_addr;
          to_write <= len;
          to_accept <= len;
        end
      end else begin
        if (ip_xfer) to_accept <= to_accept - 1'b1;
        if (wr_ok) begin
          addr_q   <= addr_q + 1'b1;
          to_write <= to_write - 1'b1;
          if (to_write == CNT_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  a_no_read_response: assert property (@(posedge clk) disable iff (!rst_n) !m_rsp.rvalid);

endmodule
