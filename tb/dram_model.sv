// dram_model: behavioural model (not synthesizable) of the shared DRAM as
// seen through the host bus bridge on the local-bus master port of
// pacific_pkg. Requests are granted combinationally when the per-cycle grant
// draw (GNT_PCT percent) allows it and writes are not being held back
// (hold_writes, driven by a testbench to force back-pressure). Writes take
// effect at the granting edge; read data return in order RD_LAT cycles after
// the granting edge, one word per cycle at most.
module dram_model
  import pacific_pkg::*;
#(
  parameter int unsigned WORDS   = 65536,
  parameter int unsigned RD_LAT  = 4,
  parameter int unsigned GNT_PCT = 100
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hold_writes,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  logic [DATA_W-1:0] mem [WORDS];
  logic              gnt_q;
  logic [DATA_W-1:0] rd_q   [$];
  longint            rd_due [$];
  longint            cyc;
  int unsigned       writes = 0, reads = 0;

  assign rsp.gnt = gnt_q && !(hold_writes && req.we);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_q      <= 1'b0;
      rsp.rvalid <= 1'b0;
      rsp.rdata  <= '0;
      cyc        <= 0;
    end else begin
      cyc   <= cyc + 1;
      gnt_q <= ($urandom % 100) < GNT_PCT;
      if (req.req && rsp.gnt) begin
        if (req.we) begin
          mem[req.addr % WORDS] <= req.wdata;
          writes <= writes + 1;
        end else begin
          rd_q.push_back(mem[req.addr % WORDS]);
          rd_due.push_back(cyc + RD_LAT);
          reads <= reads + 1;
        end
      end
      rsp.rvalid <= 1'b0;
      if (rd_due.size() != 0 && rd_due[0] <= cyc) begin
        rsp.rvalid <= 1'b1;
        rsp.rdata  <= rd_q.pop_front();
        void'(rd_due.pop_front());
      end
    end
  end
endmodule
