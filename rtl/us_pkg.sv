// us_pkg: types and constants shared by the transmit-side FPGA of the
// ultrasound excitation platform.
//
// The transmitter keeps sigma-delta encoded waveforms (one bit per sample,
// 1 = +1, 0 = -1) in DDR2 as 128-bit words and streams them to eight pins at
// four samples per 266 MHz clock. The 128-bit word follows from the required
// memory rate: 8 pins x ~1 Gbit/s / 62.5 MHz = 128 bits. The 24-bit word
// address, the socket bundle and the command codes are choices of this design.
package us_pkg;

  localparam int WORD_W   = 128;  // memory word, 128 samples of one waveform
  localparam int ADDR_W   = 24;   // word address (256 MB / 16 B)
  localparam int ID_W     = 8;    // waveform identifying number
  localparam int LEN_W    = 8;    // waveform length in words
  localparam int DELAY_W  = 28;   // start-time counts, 1 s at 266 MHz fits

  // Request side of a memory socket. A socket raises req, keeps it high for
  // its whole list of reads/writes (including the return of all read data),
  // and issues one command per cycle in which cmd_valid and cmd_ready are high.
  typedef struct packed {
    logic              req;
    logic              cmd_valid;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [WORD_W-1:0] wdata;
  } sock_req_t;

  // Response side of a memory socket.
  typedef struct packed {
    logic              gnt;
    logic              cmd_ready;
    logic              rvalid;
    logic [WORD_W-1:0] rdata;
  } sock_rsp_t;

  // Host command opcodes (first byte of every command on the UART).
  typedef enum logic [7:0] {
    OP_WRITE  = 8'h01,  // addr[23:0], nwords, nwords x 16 data bytes
    OP_RECORD = 8'h02,  // id, base[23:0], len
    OP_ASSIGN = 8'h03,  // pin, id
    OP_DELAY  = 8'h04,  // pin, delay[31:0] (big-endian)
    OP_START  = 8'h05   // no arguments
  } opcode_e;

  localparam logic [7:0] ACK_FLAG = 8'h80;  // ack byte = opcode | ACK_FLAG

endpackage
