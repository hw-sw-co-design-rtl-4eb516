// fft16_model: behavioural model (not synthesizable) of a streaming 16-point
// complex FFT/IFFT core with clock enable. Samples are {re[15:0], im[15:0]}
// in two's complement. Every clock with ce high consumes din and advances the
// core by one step; consecutive groups of 16 samples after start form frames.
// The result of frame k, sample i, is shown on dout (with dv high) during the
// enabled step number 16k + i + LATENCY. Results are the DFT (fwd_inv = 1) or
// inverse DFT (fwd_inv = 0) divided by 16 and rounded to nearest; fwd_inv is
// sampled with the first sample of each frame.
module fft16_model #(
  parameter int unsigned LATENCY = 82
) (
  input  logic        clk,
  input  logic        start,
  input  logic        ce,
  input  logic        fwd_inv,
  input  logic [31:0] din,
  output logic [31:0] dout,
  output logic        dv
);
  localparam real PI = 3.14159265358979323846;

  longint      step;
  logic [31:0] frame [16];
  logic        frame_fwd;
  logic [31:0] res [256];   // ring buffer of results, indexed by result number mod 256
  longint      nres;        // results computed so far

  initial begin
    step = 0;
    nres = 0;
    dv   = 1'b0;
    dout = '0;
  end

  function automatic logic [31:0] dft_point(input logic [31:0] x [16], input int k, input bit fwd);
    real sr, si, ang, xr, xi;
    int  r, i;
    sr = 0.0; si = 0.0;
    for (int n = 0; n < 16; n++) begin
      xr  = real'($signed(x[n][31:16]));
      xi  = real'($signed(x[n][15:0]));
      ang = (fwd ? -2.0 : 2.0) * PI * real'(n * k) / 16.0;
      sr += xr * $cos(ang) - xi * $sin(ang);
      si += xr * $sin(ang) + xi * $cos(ang);
    end
    r = int'($floor(sr / 16.0 + 0.5));
    i = int'($floor(si / 16.0 + 0.5));
    return {r[15:0], i[15:0]};
  endfunction

  always @(posedge clk) begin
    if (start) begin
      step = 0;
      nres = 0;
    end else if (ce) begin
      int pos;
      pos = int'(step % 16);
      if (pos == 0) frame_fwd = fwd_inv;
      frame[pos] = din;
      if (pos == 15)
        for (int k = 0; k < 16; k++) begin
          res[int'(nres % 256)] = dft_point(frame, k, frame_fwd);
          nres = nres + 1;
        end
      step = step + 1;
    end
    // output register: the result belonging to the current step
    dv   <= (step >= LATENCY) && ((step - LATENCY) < nres);
    dout <= ((step >= LATENCY) && ((step - LATENCY) < nres)) ? res[int'((step - LATENCY) % 256)] : 32'h0;
  end
endmodule
