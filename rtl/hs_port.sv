// hs_port: one end of a PaCIFIC port handshake.
//
// Each port has up to two handshake lines: an outgoing one, asserted while
// this side can take part in a transaction (an input port is ready to consume
// a word, an output port has a word waiting), and an incoming one, which is
// the outgoing line of the port at the other end. Either line may be left out
// (USE_OUT / USE_IN = 0), giving a one-way handshake or none at all, and the
// asserted level of each line is selectable (OUT_ACT_HIGH / IN_ACT_HIGH). A
// transaction completes at a clock edge where every line that is used is
// active; xfer marks that cycle combinationally. An unused outgoing line is
// driven to its inactive level.
//
// OFFSET delays the outgoing line: it goes active only once able has been
// high for OFFSET clock cycles (0: at once). With IN_IRQ set, the incoming
// line has interrupt semantics: an activation of it is an event that is
// remembered until this side completes a transaction for it, even if the line
// has dropped again meanwhile; no data need be moved with it.
//
// The assertions check the protocol rule that, with both lines in use, the
// side that became active first must not withdraw before the transaction has
// completed, and that a port without an outgoing line is always able to take
// part when its partner completes a transaction. Polarity, optional lines,
// the completion rule, the offset and the interrupt option follow the PaCIFIC
// handshake description; reading the offset as a delay after able and the
// interrupt as a latched rising activation are this design's choices.
module hs_port #(
  parameter bit          USE_OUT      = 1'b1,
  parameter bit          USE_IN       = 1'b1,
  parameter bit          OUT_ACT_HIGH = 1'b1,
  parameter bit          IN_ACT_HIGH  = 1'b1,
  parameter int unsigned OFFSET       = 0,
  parameter bit          IN_IRQ       = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic able,    // this side can take part in a transaction
  input  logic hs_in,   // incoming handshake line (partner's outgoing line)
  output logic hs_out,  // outgoing handshake line
  output logic xfer     // a transaction completes at the next clock edge
);
  localparam int unsigned OW = (OFFSET > 0) ? $clog2(OFFSET + 1) : 1;

  logic          out_act, in_act, in_line, ready;
  logic [OW-1:0] wait_q;

  // Offset: count the cycles able has been high, up to OFFSET.
  if (OFFSET > 0) begin : g_offset
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                             wait_q <= '0;
      else if (!able || xfer)                 wait_q <= '0;
      else if (wait_q != OW'(OFFSET))         wait_q <= wait_q + 1'b1;
    end
    assign ready = able && (wait_q == OW'(OFFSET));
  end else begin : g_no_offset
    assign wait_q = '0;
    assign ready  = able;
  end

  assign in_line = (hs_in == IN_ACT_HIGH);

  // Interrupt semantics: latch a rising activation until it is served.
  if (IN_IRQ) begin : g_irq
    logic line_q, pending;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        line_q  <= 1'b0;
        pending <= 1'b0;
      end else begin
        line_q  <= in_line;
        pending <= (pending || (in_line && !line_q)) && !xfer;
      end
    end
    assign in_act = pending || (in_line && !line_q);
  end else begin : g_level
    assign in_act = USE_IN ? in_line : 1'b1;
  end

  assign out_act = USE_OUT ? ready : 1'b1;
  assign hs_out  = (USE_OUT && ready) ? OUT_ACT_HIGH : !OUT_ACT_HIGH;
  assign xfer    = out_act && in_act;

  // With both lines specified, whichever line is active first must stay
  // active until the transaction has completed.
  if (USE_OUT && USE_IN && !IN_IRQ) begin : g_two_way
    a_own_hold:     assert property (@(posedge clk) disable iff (!rst_n)
                                     (out_act && !in_act) |=> out_act);
    a_partner_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                     (in_act && !out_act) |=> in_act);
  end
  // Without an outgoing line this side cannot refuse a transaction.
  a_no_loss: assert property (@(posedge clk) disable iff (!rst_n) xfer |-> able);

endmodule
