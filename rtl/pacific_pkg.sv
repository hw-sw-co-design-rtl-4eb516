// pacific_pkg: types and constants shared by the stream-engine / FFT
// interface system and the crypt interface controller.
//
// The local-bus master port used by the stream engines is a simple
// request/grant bus: a request is accepted on a clock edge where req and gnt
// are both high; read data come back later, in order, marked by rvalid.
// Sizes that follow the evaluated system: 32-bit data words, 256-word stream
// FIFOs, 16-point FFT with 82 cycles of initial latency, 64 MB of DRAM
// (16M 32-bit words, hence a 24-bit word address). The bus protocol and the
// register map are this design's own choices.
package pacific_pkg;

  localparam int unsigned DATA_W      = 32;  // one complex sample: {re[15:0], im[15:0]}
  localparam int unsigned ADDR_W      = 24;  // word address into 64 MB of DRAM
  localparam int unsigned CNT_W       = 24;  // transfer length in words
  localparam int unsigned FIFO_DEPTH  = 256; // stream engine FIFO capacity in words
  localparam int unsigned FFT_POINTS  = 16;
  localparam int unsigned FFT_LATENCY = 82;  // clock-enabled cycles from first input to first output

  // Local-bus master request (master -> bus)
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  // Local-bus master response (bus -> master)
  typedef struct packed {
    logic              gnt;
    logic              rvalid;
    logic [DATA_W-1:0] rdata;
  } mem_rsp_t;

  // Host register map (word offsets on the host register port)
  typedef enum logic [2:0] {
    REG_CTRL   = 3'd0,  // [0] start (write 1), [1] inverse FFT, [2] irq enable
    REG_STATUS = 3'd1,  // [0] busy, [1] done (write 1 to clear)
    REG_SRC    = 3'd2,  // source word address
    REG_DST    = 3'd3,  // destination word address
    REG_LEN    = 3'd4,  // number of words (multiple of FFT_POINTS)
    REG_CYCLES = 3'd5   // clock cycles from start to done of the last run
  } reg_addr_e;

endpackage
