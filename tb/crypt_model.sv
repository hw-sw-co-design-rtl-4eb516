// crypt_model: behavioural model (not synthesizable) of a crypt IP core with
// the pin set of its interface description. LOAD_KEY high at a clock edge
// loads KEY. While ACK_IN is high the core works on INDATA and, lat cycles
// after ACK_IN rose (lat, a port so a testbench can vary it), raises ACK_OUT with OUTDATA = rotl(INDATA ^ key, 5) + key
// (a stand-in cipher) until ACK_IN drops. INIT is driven by the testbench
// through init_level (INIT = 0 models a core that is not ready).
module crypt_model (
  input  logic        clk,
  input  logic        load_key,
  input  logic [31:0] key,
  input  logic [31:0] indata,
  input  logic        ack_in,
  output logic        ack_out,
  output logic [31:0] outdata,
  input  logic        init_level,
  output logic        init,
  input  int unsigned lat
);
  logic [31:0] key_q = '0;
  int unsigned cnt   = 0;

  function automatic logic [31:0] cipher(input logic [31:0] d, input logic [31:0] k);
    logic [31:0] t;
    t = d ^ k;
    return {t[26:0], t[31:27]} + k;
  endfunction

  assign init    = init_level;
  assign ack_out = ack_in && (cnt >= lat);
  assign outdata = ack_out ? cipher(indata, key_q) : 32'h0;

  always @(posedge clk) begin
    if (load_key) key_q <= key;
    if (ack_in) cnt <= cnt + 1;
    else        cnt <= 0;
  end
endmodule
