// tb_crypt_ctrl: runs the "encrypt" behaviour against the crypt core model.
// Checks, per call: LOAD_KEY is a one-cycle pulse carrying the fixed key,
// ACK_IN rises right after it with INDATA = plaintext and is held until
// ACK_OUT, the ciphertext equals an independently computed value, and the
// call ends after exactly 2 + core latency cycles. Then the exception paths:
// a core answering too late (timeout after 16 waiting cycles) and a core with
// INIT low (error condition), both ending only once INIT is high.
module tb_crypt_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [31:0] plaintext, ciphertext;
  logic busy, done, error;
  logic load_key, ack_in, ack_out, init, init_level;
  logic [31:0] key, indata, outdata;
  int unsigned lat;
  int checks = 0, failures = 0;
  int n_ok = 0, n_timeout = 0, n_error = 0;

  crypt_ctrl dut (.*);
  crypt_model core (.clk, .load_key, .key, .indata, .ack_in, .ack_out, .outdata,
                    .init_level, .init, .lat);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  function automatic logic [31:0] ref_cipher(input logic [31:0] d);
    logic [31:0] k, t;
    k = 32'd10027821;
    t = d ^ k;
    return ((t << 5) | (t >> 27)) + k;
  endfunction

  // Monitor: LOAD_KEY pulses and the key they carry, ACK_IN hold rule.
  int key_pulses = 0, lk_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (load_key) begin
      lk_len++;
      checks++;
      if (key !== 32'd10027821) begin failures++; $display("FAIL key %h", key); end
    end else if (lk_len != 0) begin
      key_pulses++;
      checks++;
      if (lk_len != 1) begin failures++; $display("FAIL LOAD_KEY width %0d", lk_len); end
      lk_len = 0;
    end
    if (ack_in) begin
      checks++;
      if (indata !== plaintext) begin failures++; $display("FAIL indata"); end
    end
  end

  // One call; returns the number of clock edges from the start edge to the
  // edge after which done is high.
  task automatic call(input logic [31:0] pt, output int edges, output bit err,
                      output logic [31:0] ct);
    @(negedge clk);
    plaintext = pt;
    start = 1'b1;
    @(posedge clk);
    edges = 1;
    @(negedge clk);
    start = 1'b0;
    // LOAD_KEY must be high right after the start edge, ACK_IN one cycle later
    check(load_key && !ack_in, "load_key after start");
    @(negedge clk);
    check(!load_key && ack_in, "ack_in after load_key");
    edges = 2;
    while (!done) begin
      @(posedge clk); edges++;
      @(negedge clk);
    end
    edges--;  // count the edge after which done became visible
    err = error;
    ct  = ciphertext;
    check(!ack_in, "ack_in low after call");
  endtask

  initial begin
    int e; bit err; logic [31:0] ct, pt;
    start = 0; plaintext = 0; init_level = 1; lat = 3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // normal calls with latencies 0..15
    for (int l = 0; l <= 15; l++) begin
      lat = l;
      pt  = $urandom;
      call(pt, e, err, ct);
      check(!err, "no error");
      check(ct == ref_cipher(pt), "ciphertext");
      check(e == 2 + l, $sformatf("call length %0d for latency %0d", e, l));
      if (!err) n_ok++;
    end
    // timeout: core answers after 16 cycles, too late
    lat = 16;
    call(32'h1234_5678, e, err, ct);
    check(err, "timeout reported");
    check(e == 19, $sformatf("timeout call length %0d", e));
    if (err) n_timeout++;
    // error condition: INIT low; exception block waits for INIT high
    lat = 2;
    init_level = 0;
    fork
      begin repeat (10) @(posedge clk); init_level = 1; end
    join_none
    call(32'hcafe_f00d, e, err, ct);
    check(err, "init error reported");
    check(e >= 8, "exception waited for INIT");
    if (err) n_error++;
    // a normal call again after the exception
    lat = 5;
    pt = 32'h0bad_beef;
    call(pt, e, err, ct);
    check(!err && ct == ref_cipher(pt), "recovery after exception");
    check(key_pulses == 19, $sformatf("key loads %0d", key_pulses));
    $display("normal=%0d timeout=%0d error=%0d", n_ok, n_timeout, n_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
