// tx_sequencer: the excitation sequence of the transmitter.
//
// Idle until 'start'. Then, one pin per clock, it puts the pin number on
// 'sel_pin_o', takes the pin's waveform location from the assignment/record
// lookup and sends it with a one-clock fetch pulse to that pin's channel
// (length zero for a pin without a valid waveform). It waits until every
// channel reports its waveform loaded, then raises 'run_o', which starts the
// run-time delay counter so all pin delays count from the same instant. When
// every channel has finished sending, 'run_o' drops and 'done_toggle_o'
// changes level: this is the signal to the receiver that all excitations
// have been sent, made a toggle so it can cross clock domains safely.
// A 'start' while busy is ignored. The request-all / wait-for-data /
// transmit order follows the source's flowchart; starting the delay counter
// after loading and the toggle are this design's choices.
module tx_sequencer
  import us_pkg::*;
#(
  parameter int NUM_PINS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic [$clog2(NUM_PINS)-1:0] sel_pin_o,
  input  logic                        pin_valid,
  input  logic [ADDR_W-1:0]           pin_base,
  input  logic [LEN_W-1:0]            pin_len,
  output logic [NUM_PINS-1:0]         fetch_o,
  output logic [ADDR_W-1:0]           fetch_base_o,
  output logic [LEN_W-1:0]            fetch_len_o,
  input  logic [NUM_PINS-1:0]         loaded_i,
  input  logic [NUM_PINS-1:0]         done_i,
  output logic                        run_o,
  output logic                        done_toggle_o,
  output logic                        busy_o
);
  typedef enum logic [1:0] {S_IDLE, S_RESOLVE, S_LOAD, S_RUN} state_e;
  localparam int PW = $clog2(NUM_PINS);

  state_e        state;
  logic [PW-1:0] pin;
  logic          fetch_sent;   // fetch pulses are out; loaded_i is current

  assign sel_pin_o = pin;
  assign busy_o    = (state != S_IDLE);
  assign run_o     = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      pin           <= '0;
      fetch_o       <= '0;
      fetch_base_o  <= '0;
      fetch_len_o   <= '0;
      done_toggle_o <= 1'b0;
      fetch_sent    <= 1'b0;
    end else begin
      fetch_o <= '0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RESOLVE;
          pin   <= '0;
        end
        S_RESOLVE: begin
          fetch_o[pin] <= 1'b1;
          fetch_base_o <= pin_base;
          fetch_len_o  <= pin_valid ? pin_len : '0;
          if (int'(pin) == NUM_PINS - 1) begin
            state      <= S_LOAD;
            fetch_sent <= 1'b0;
          end else begin
            pin <= pin + 1'b1;
          end
        end
        S_LOAD: begin
          fetch_sent <= 1'b1;   // skip the cycle of the last fetch pulse
          if (fetch_sent && (&loaded_i)) state <= S_RUN;
        end
        S_RUN: if (&done_i) begin
          state         <= S_IDLE;
          done_toggle_o <= ~done_toggle_o;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
