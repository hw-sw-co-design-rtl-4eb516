// bus_arbiter: shares the FPGA's single local-bus master port between two
// bus masters (the source and the sink stream engine).
//
// Arbitration is round robin: when both masters request, the one that was not
// served last is presented to the bus, so neither can starve the other. A
// request the bus does not grant may be withdrawn (nothing is committed before
// req and gnt meet), so when the bus refuses the presented request while the
// other master waits, the turn passes to the other master. The chosen master's
// request is passed to the bus combinationally and the bus's grant is returned
// to it only. Reads may be outstanding in any number up to MAX_RD; the bus
// returns read data in request order, so the arbiter records the requester of
// each accepted read in a small FIFO and steers every rvalid/rdata to the
// master at its head. A read is held back while that FIFO is full.
//
// That the masters share one port by arbitration follows the system the
// design comes from (both engines work the DRAM in bus-master mode); the round
// robin policy and in-order response steering are this design's own choices.
module bus_arbiter
  import pacific_pkg::*;
#(
  parameter int unsigned MAX_RD = FIFO_DEPTH
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t m_req [2],
  output mem_rsp_t m_rsp [2],
  output mem_req_t s_req,
  input  mem_rsp_t s_rsp
);
  logic       last;        // master served most recently
  logic       sel;         // master chosen this cycle
  logic [1:0] want;
  logic       id_empty, id_full, id_head, accept;

  // A read may only go out while its requester can be recorded.
  assign want[0] = m_req[0].req && (m_req[0].we || !id_full);
  assign want[1] = m_req[1].req && (m_req[1].we || !id_full);

  always_comb begin
    if (want[0] && want[1]) sel = !last;
    else                    sel = want[1];
  end

  always_comb begin
    s_req     = m_req[sel];
    s_req.req = want[sel];
  end

  assign accept = s_req.req && s_rsp.gnt;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      m_rsp[i].gnt    = accept && (sel == 1'(i));
      m_rsp[i].rvalid = s_rsp.rvalid && (id_head == 1'(i));
      m_rsp[i].rdata  = s_rsp.rdata;
    end
  end

  // The turn passes after a granted request, and also when the bus refuses
  // the presented request while the other master is waiting, so that a
  // transfer the bus cannot take at the moment does not block the other one.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        last <= 1'b1;
    else if (accept)                   last <= sel;
    else if (want[0] && want[1])       last <= sel;
  end

  sync_fifo #(.WIDTH(1), .DEPTH(MAX_RD)) u_ids (
    .clk, .rst_n,
    .push (accept && !s_req.we),
    .din  (sel),
    .pop  (s_rsp.rvalid),
    .dout (id_head),
    .empty(id_empty),
    .full (id_full),
    .count()
  );

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n) s_rsp.rvalid |-> !id_empty);

endmodule
