// host_cmd: command decoder for the PC link.
//
// Bytes from the UART form commands (first byte = opcode, see us_pkg):
//   WRITE  addr[23:0] n  + n words of 16 bytes : store waveform data in DDR2
//   RECORD id base[23:0] len                    : enter a waveform in the record
//   ASSIGN pin id                               : send waveform 'id' on 'pin'
//   DELAY  pin delay[31:0]                      : start time of 'pin' in counts
//   START                                       : begin a transmission
// Multi-byte fields are sent most significant byte first. Inside a data
// word, byte b holds samples 8b..8b+7, least significant bit first, so
// sample k lands in bit k of the 128-bit word.
// For WRITE the decoder is a memory socket: a completed word is copied to a
// second buffer and written (req held until the one write is accepted) while
// the next word is being received; if a word completes while the previous
// one is still waiting, 'overrun_o' pulses and the older word is replaced.
// The decoder is ready for the next command as soon as the last byte of a
// command has arrived, also while the last word of a WRITE still waits for
// the memory. After a command has been carried out an acknowledge byte
// opcode|0x80 is queued (four entries) for the UART transmitter and sent
// when it is free. Acks leave in command order: a WRITE's ack takes its
// place in the queue when its last byte arrives but is held there until its
// last word is in memory (or has been lost to an overrun), so acks of later
// commands wait behind it. Unknown opcodes are ignored. Table writes and the start
// pulse last one clock. The source gives only the tasks (store waveforms,
// record their location, assign pins, set delays, start); the byte
// protocol is this design's own.
module host_cmd
  import us_pkg::*;
#(
  parameter int NUM_PINS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [7:0]                  rx_data,
  input  logic                        rx_valid,
  output sock_req_t                   sock_o,
  input  sock_rsp_t                   sock_i,
  output logic                        rec_we,
  output logic [ID_W-1:0]             rec_id,
  output logic [ADDR_W-1:0]           rec_base,
  output logic [LEN_W-1:0]            rec_len,
  output logic                        asg_we,
  output logic [$clog2(NUM_PINS)-1:0] asg_pin,
  output logic [ID_W-1:0]             asg_id,
  output logic                        dly_we,
  output logic [$clog2(NUM_PINS)-1:0] dly_pin,
  output logic [DELAY_W-1:0]          dly_val,
  output logic                        start_o,
  output logic [7:0]                  ack_data,
  output logic                        ack_send,
  input  logic                        ack_busy,
  output logic                        overrun_o
);
  localparam int PW = $clog2(NUM_PINS);
  typedef enum logic [1:0] {S_OP, S_ARG, S_DATA} state_e;

  state_e            state;
  logic [7:0]        op;
  logic [2:0]        args_left;
  logic [31:0]       args;
  logic [ADDR_W-1:0] wr_addr;     // address of the word being received
  logic [ADDR_W-1:0] pend_addr;   // address of the word waiting for memory
  logic              pend_last;   // that word ends a WRITE: ack when written
  logic [7:0]        words_left;
  logic [3:0]        byte_idx;
  logic [WORD_W-1:0] collect;
  logic [WORD_W-1:0] wr_word;
  logic              pend;
  logic [7:0]        ackq [4];
  logic [1:0]        ackq_rd, ackq_wr;
  logic [2:0]        ackq_n;
  logic              ack_now;      // a command other than WRITE is done
  logic              ack_wr_now;   // the last word of a WRITE is written
  logic              ack_wr_res;   // the last byte of a WRITE has arrived
  logic [3:0]        ackq_rdy;     // entry may be sent
  logic [1:0]        wr_slot;      // queue entry of the pending WRITE ack
  logic [7:0]        ack_val;

  function automatic logic [2:0] arg_count(input logic [7:0] o);
    unique case (o)
      OP_WRITE:  return 3'd4;
      OP_RECORD: return 3'd5;
      OP_ASSIGN: return 3'd2;
      OP_DELAY:  return 3'd5;
      default:   return 3'd0;
    endcase
  endfunction

  // memory socket: one write per completed word
  always_comb begin
    sock_o.req       = pend;
    sock_o.cmd_valid = pend;
    sock_o.we        = 1'b1;
    sock_o.addr      = pend_addr;
    sock_o.wdata     = wr_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_OP;
      op         <= '0;
      args_left  <= '0;
      args       <= '0;
      wr_addr    <= '0;
      pend_addr  <= '0;
      pend_last  <= 1'b0;
      words_left <= '0;
      byte_idx   <= '0;
      collect    <= '0;
      wr_word    <= '0;
      pend       <= 1'b0;
      rec_we     <= 1'b0;
      rec_id     <= '0;
      rec_base   <= '0;
      rec_len    <= '0;
      asg_we     <= 1'b0;
      asg_pin    <= '0;
      asg_id     <= '0;
      dly_we     <= 1'b0;
      dly_pin    <= '0;
      dly_val    <= '0;
      start_o    <= 1'b0;
      overrun_o  <= 1'b0;
      ack_now    <= 1'b0;
      ack_wr_now <= 1'b0;
      ack_wr_res <= 1'b0;
      ack_val    <= '0;
    end else begin
      rec_we    <= 1'b0;
      asg_we    <= 1'b0;
      dly_we    <= 1'b0;
      start_o   <= 1'b0;
      overrun_o <= 1'b0;
      ack_now   <= 1'b0;
      ack_wr_now <= 1'b0;
      ack_wr_res <= 1'b0;

      // write engine: acknowledge a WRITE once its last word is in memory
      if (pend && sock_i.cmd_ready) begin
        pend <= 1'b0;
        ack_wr_now <= pend_last;
      end

      unique case (state)
        S_OP: if (rx_valid) begin
          op <= rx_data;
          if (rx_data == OP_START) begin
            start_o <= 1'b1;
            ack_now <= 1'b1;
            ack_val <= rx_data | ACK_FLAG;
          end else if (arg_count(rx_data) != 0) begin
            args_left <= arg_count(rx_data);
            state     <= S_ARG;
          end
        end
        S_ARG: if (rx_valid) begin
          args      <= {args[23:0], rx_data};
          args_left <= args_left - 1'b1;
          if (args_left == 3'd1) begin
            state   <= S_OP;
            ack_now <= 1'b1;
            ack_val <= op | ACK_FLAG;
            unique case (op)
              OP_WRITE: begin
                wr_addr    <= args[23:0];
                words_left <= rx_data;
                byte_idx   <= '0;
                if (rx_data != 0) begin
                  state   <= S_DATA;
                  ack_now <= 1'b0;
                end
              end
              OP_RECORD: begin
                rec_we   <= 1'b1;
                rec_id   <= args[31:24];
                rec_base <= args[23:0];
                rec_len  <= rx_data;
              end
              OP_ASSIGN: begin
                asg_we  <= 1'b1;
                asg_pin <= PW'(args[7:0]);
                asg_id  <= rx_data;
              end
              OP_DELAY: begin
                dly_we  <= 1'b1;
                dly_pin <= PW'(args[31:24]);
                dly_val <= DELAY_W'({args[23:0], rx_data});
              end
              default: ;
            endcase
          end
        end
        S_DATA: if (rx_valid) begin
          collect[8*byte_idx +: 8] <= rx_data;
          byte_idx <= byte_idx + 1'b1;
          if (byte_idx == 4'd15) begin
            wr_word    <= {rx_data, collect[119:0]};
            pend_addr  <= wr_addr;
            pend_last  <= (words_left == 8'd1);
            wr_addr    <= wr_addr + 1'b1;
            if (pend && !sock_i.cmd_ready) begin
              overrun_o <= 1'b1;
              ack_wr_now <= pend_last;   // release the ack of the lost word
            end
            pend       <= 1'b1;
            words_left <= words_left - 1'b1;
            if (words_left == 8'd1) begin
              state      <= S_OP;
              ack_wr_res <= 1'b1;
            end
          end
        end
        default: state <= S_OP;
      endcase
    end
  end

  // acknowledge queue in front of the UART transmitter. The entry at the
  // head is sent only when it is ready; a WRITE's entry becomes ready one
  // clock or more after it was pushed, when its last word has been written.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) ackq[i] <= '0;
      ackq_rdy <= '0;
      wr_slot  <= '0;
      ackq_rd  <= '0;
      ackq_wr  <= '0;
      ackq_n   <= '0;
      ack_send <= 1'b0;
      ack_data <= '0;
    end else begin
      logic [1:0] wp;
      logic [2:0] n;
      wp = ackq_wr;
      n  = ackq_n;
      ack_send <= 1'b0;
      if (ack_wr_now) ackq_rdy[wr_slot] <= 1'b1;
      if (n != 0 && ackq_rdy[ackq_rd] && !ack_busy && !ack_send) begin
        ack_send <= 1'b1;
        ack_data <= ackq[ackq_rd];
        ackq_rd  <= ackq_rd + 1'b1;
        n = n - 1'b1;
      end
      if (ack_wr_res && n != 3'd4) begin
        ackq[wp]     <= OP_WRITE | ACK_FLAG;
        ackq_rdy[wp] <= 1'b0;
        wr_slot      <= wp;
        wp = wp + 1'b1;
        n  = n + 1'b1;
      end
      if (ack_now && n != 3'd4) begin
        ackq[wp]     <= ack_val;
        ackq_rdy[wp] <= 1'b1;
        wp = wp + 1'b1;
        n  = n + 1'b1;
      end
      ackq_wr <= wp;
      ackq_n  <= n;
    end
  end
endmodule
