// crypt_ctrl: interface controller of the "encrypt" behaviour of the crypt IP
// core. A start request (one C call crypt(&plaintext, &ciphertext)) encrypts
// one 32-bit word.
//
// The sequence, one state per UCODE statement:
//   KEY_ON   LOAD_KEY=1 and KEY=<fixed key>, registered at a clock edge
//            LOAD_KEY=0 at the next edge (LOAD_KEY is high for one cycle)
//   XFER     entered at that same edge: INDATA=plaintext and ACK_IN=1 are
//            driven at once (level statements); wait until
//            ACK_OUT=1. An error condition (INIT=0) or TIMEOUT cycles spent
//            waiting branch to the exception state. At the edge where ACK_OUT
//            is seen high, OUTDATA is captured as the ciphertext and ACK_IN
//            drops (level ACK_IN=0); the run ends with done, error=0.
//   EXC      exception block: wait until INIT=1 (the core has flushed its
//            pipeline), then end with done and error=1.
// Interface: start is taken while idle, together with plaintext; busy is high
// from the next cycle until done pulses; ciphertext and error stay valid after
// done until the next start. Error conditions are checked before the timeout,
// and both before the normal continue condition, as the UCODE rules state.
//
// The statement order, the 16-cycle timeout, the INIT error condition and the
// fixed key follow the encrypt behaviour; the fixed key 10027821 is read as a
// decimal number, and the start/done interface to the caller is this design's
// own. Because the key is fixed, the KEY register bits that are 0 in
// KEY_VALUE are constant and synthesis removes them.
module crypt_ctrl #(
  parameter logic [31:0] KEY_VALUE = 32'd10027821,
  parameter int unsigned TIMEOUT   = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // caller side (the generated C function)
  input  logic        start,
  input  logic [31:0] plaintext,
  output logic [31:0] ciphertext,
  output logic        busy,
  output logic        done,
  output logic        error,
  // crypt core pins
  output logic        load_key,
  output logic [31:0] key,
  output logic [31:0] indata,
  output logic        ack_in,
  input  logic        ack_out,
  input  logic [31:0] outdata,
  input  logic        init
);
  typedef enum logic [1:0] {S_IDLE, S_KEY_ON, S_XFER, S_EXC} state_e;

  state_e                         state;
  logic [31:0]                    pt_q;
  logic [$clog2(TIMEOUT+1)-1:0]   wait_cnt;
  logic                           err_cond, timed_out, cont;

  assign busy      = (state != S_IDLE);
  assign err_cond  = !init;
  assign timed_out = (wait_cnt == TIMEOUT[$clog2(TIMEOUT+1)-1:0]);
  assign cont      = ack_out;

  // level statements: asynchronous outputs of the transfer state
  assign ack_in = (state == S_XFER);
  assign indata = (state == S_XFER) ? pt_q : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pt_q       <= '0;
      ciphertext <= '0;
      done       <= 1'b0;
      error      <= 1'b0;
      load_key   <= 1'b0;
      key        <= '0;
      wait_cnt   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pt_q     <= plaintext;
          error    <= 1'b0;
          load_key <= 1'b1;            // posedge LOAD_KEY=1
          key      <= KEY_VALUE;       //         KEY=<fixed key>
          state    <= S_KEY_ON;
        end
        S_KEY_ON: begin
          load_key <= 1'b0;            // posedge LOAD_KEY=0
          wait_cnt <= '0;
          state    <= S_XFER;          // transfer 1 INDATA
        end
        S_XFER: begin
          if (err_cond || timed_out) begin
            state <= S_EXC;            // branch to exception block
          end else if (cont) begin
            ciphertext <= outdata;     // posedge ciphertext=OUTDATA
            done       <= 1'b1;        // endtransfer; normal flow ends
            state      <= S_IDLE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_EXC: if (init) begin         // continue INIT=1
          error <= 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: ACK_IN, once raised, is held until ACK_OUT answers or the
  // transfer is abandoned through the exception block.
  a_ack_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (ack_in && !ack_out && init && !timed_out) |=> ack_in);

endmodule
