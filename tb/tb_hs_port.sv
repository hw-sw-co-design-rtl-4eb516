// tb_hs_port: checks the PaCIFIC handshake completion rule for every mix of
// used/unused lines and active-high/active-low polarity: xfer must be high
// exactly when every used line is active, and an unused outgoing line must sit
// at its inactive level. Inputs are swept exhaustively per configuration.
// Then, clocked: with OFFSET = 3 the outgoing line rises exactly three cycles
// after able and again three cycles after each transaction; with interrupt
// semantics a one-cycle pulse on the incoming line is remembered until this
// side is able, served once, and not served twice.
module tb_hs_port;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One instance per configuration {USE_OUT, USE_IN, OUT_ACT_HIGH, IN_ACT_HIGH}.
  logic [15:0] able, hs_in, hs_out, xfer;
  for (genvar c = 0; c < 16; c++) begin : g_cfg
    hs_port #(.USE_OUT(c[3]), .USE_IN(c[2]), .OUT_ACT_HIGH(c[1]), .IN_ACT_HIGH(c[0])) u (
      .clk, .rst_n, .able(able[c]), .hs_in(hs_in[c]), .hs_out(hs_out[c]), .xfer(xfer[c]));
  end

  // offset and interrupt configurations
  logic o_able, o_in, o_out, o_xfer;
  logic i_able, i_in, i_out, i_xfer;
  hs_port #(.OFFSET(3)) u_off (.clk, .rst_n, .able(o_able), .hs_in(o_in), .hs_out(o_out), .xfer(o_xfer));
  hs_port #(.IN_IRQ(1'b1)) u_irq (.clk, .rst_n, .able(i_able), .hs_in(i_in), .hs_out(i_out), .xfer(i_xfer));

  task automatic clocked_tests();
    int n;
    o_able = 0; o_in = 1; i_able = 0; i_in = 0;
    rst_n = 1'b1;
    @(negedge clk);
    // offset: able rises, hs_out follows after three cycles
    o_able = 1;
    for (int c = 0; c < 3; c++) begin
      #1 checks++; if (o_out !== 1'b0) begin failures++; $display("FAIL offset early c=%0d", c); end
      @(negedge clk);
    end
    #1 checks++; if (o_out !== 1'b1 || o_xfer !== 1'b1) begin failures++; $display("FAIL offset late"); end
    @(negedge clk);
    // after the transaction the offset starts again
    #1 checks++; if (o_out !== 1'b0) begin failures++; $display("FAIL offset restart"); end
    repeat (2) @(negedge clk);
    #1 checks++; if (o_out !== 1'b0) begin failures++; $display("FAIL offset second early"); end
    @(negedge clk);
    #1 checks++; if (o_out !== 1'b1) begin failures++; $display("FAIL offset second"); end
    o_able = 0;
    // interrupt: one-cycle pulse while not able
    @(negedge clk);
    i_in = 1; @(negedge clk); i_in = 0;
    repeat (3) @(negedge clk);
    #1 checks++; if (i_xfer !== 1'b0) begin failures++; $display("FAIL irq served while not able"); end
    i_able = 1;
    #1 checks++; if (i_xfer !== 1'b1) begin failures++; $display("FAIL irq event lost"); end
    n = 0;
    repeat (4) begin @(negedge clk); #1 if (i_xfer) n++; end
    checks++; if (n != 0) begin failures++; $display("FAIL irq served twice"); end
    // a line that stays high is one event, not many
    i_in = 1;
    n = 0;
    repeat (5) begin #1 if (i_xfer) n++; @(negedge clk); end
    checks++; if (n != 1) begin failures++; $display("FAIL level irq served %0d times", n); end
  endtask

  initial begin
    able = '0; hs_in = '0;
    repeat (2) @(posedge clk);
    for (int v = 0; v < 4; v++) begin
      for (int c = 0; c < 16; c++) begin
        bit use_out, use_in, oah, iah, a, h, in_act, exp_x, exp_o;
        use_out = c[3]; use_in = c[2]; oah = c[1]; iah = c[0];
        a = v[1]; h = v[0];
        // A side without an outgoing line must always be able.
        if (!use_out) a = 1'b1;
        able[c] = a; hs_in[c] = h;
      end
      #1;
      for (int c = 0; c < 16; c++) begin
        bit use_out, use_in, oah, iah, a, h, in_act, exp_x, exp_o;
        use_out = c[3]; use_in = c[2]; oah = c[1]; iah = c[0];
        a = able[c]; h = hs_in[c];
        in_act = use_in ? (h == iah) : 1'b1;
        exp_x  = (use_out ? a : 1'b1) && in_act;
        exp_o  = (use_out && a) ? oah : !oah;
        checks += 2;
        if (xfer[c] !== exp_x) begin failures++; $display("FAIL xfer cfg=%0d v=%0d", c, v); end
        if (hs_out[c] !== exp_o) begin failures++; $display("FAIL hs_out cfg=%0d v=%0d", c, v); end
      end
    end
    clocked_tests();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
