// uart_rx: receiver for the PC-to-FPGA serial link.
//
// 8 data bits, LSB first, no parity, one stop bit. The line is synchronised
// with two flops; a falling edge starts a frame, the start bit is re-checked
// at mid-bit and every following bit is sampled once at its middle.
// 'valid' pulses for one clock with 'data' when the stop bit has been
// sampled; 'frame_err' pulses instead of 'valid' when the stop bit is low.
// The link being a UART follows the source; frame format and baud rate
// (CLKS_PER_BIT = 266 MHz / 115200) are this design's choice.
module uart_rx #(
  parameter int CLKS_PER_BIT = 2309
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  state_e          state;
  logic [1:0]      sync;
  logic [CW-1:0]   cnt;
  logic [2:0]      bit_idx;
  logic [7:0]      shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: if (!sync[1]) begin
          state <= START;
          cnt   <= CW'(CLKS_PER_BIT / 2);
        end
        START: if (cnt == 0) begin
          if (!sync[1]) begin
            state   <= DATA;
            cnt     <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end else begin
            state <= IDLE;             // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        DATA: if (cnt == 0) begin
          shreg <= {sync[1], shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == 0) begin
          state <= IDLE;
          if (sync[1]) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
