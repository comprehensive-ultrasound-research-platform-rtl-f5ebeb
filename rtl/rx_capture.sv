// rx_capture: echo recording on the receive side.
//
// Runs in the ADC clock domain (65 MHz). The transmitter's excitation-done
// toggle arrives asynchronously; it passes a two-flop synchroniser and each
// change of level starts one recording (a change during a recording is
// ignored). A recording writes RECORD_SAMPLES consecutive memory words, one
// per ADC clock, each holding the eight 14-bit samples of that clock packed
// side by side (channel 0 in the low bits, unused top bits zero), at word
// addresses 0, 1, 2, ... wr_en is first high after the fourth ADC clock
// edge counted from the first edge that samples the new toggle level (two
// synchroniser stages, the edge detector and the start of the recording).
// 'busy_o' is high while recording and 'done_o' pulses after the last write.
// The 997 us window at 65 MHz with 14-bit samples on eight channels follows
// the source's requirements; packing all channels into one word per ADC
// clock is this design's choice.
module rx_capture
  import us_pkg::*;
#(
  parameter int NUM_CH         = 8,
  parameter int ADC_W          = 14,
  parameter int RECORD_SAMPLES = 64805,
  localparam int AW            = $clog2(RECORD_SAMPLES)
) (
  input  logic                  adc_clk,
  input  logic                  rst_n,
  input  logic                  trig_toggle,
  input  logic [ADC_W-1:0]      adc_data [NUM_CH],
  output logic                  wr_en,
  output logic [AW-1:0]         wr_addr,
  output logic [WORD_W-1:0]     wr_data,
  output logic                  busy_o,
  output logic                  done_o
);
  logic [2:0]    sync;    // two synchroniser stages and the previous level
  logic          trig;
  logic [AW-1:0] count;
  logic [WORD_W-1:0] packed_w;

  assign trig = sync[2] ^ sync[1];

  always_comb begin
    packed_w = '0;
    for (int c = 0; c < NUM_CH; c++) packed_w[c*ADC_W +: ADC_W] = adc_data[c];
  end

  always_ff @(posedge adc_clk or negedge rst_n) begin
    if (!rst_n) begin
      sync    <= '0;
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
      count   <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      sync   <= {sync[1:0], trig_toggle};
      done_o <= 1'b0;
      wr_en  <= 1'b0;
      if (!busy_o) begin
        if (trig) begin
          busy_o <= 1'b1;
          count  <= '0;
        end
      end else begin
        wr_en   <= 1'b1;
        wr_addr <= count;
        wr_data <= packed_w;
        count   <= count + 1'b1;
        if (int'(count) == RECORD_SAMPLES - 1) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end
      end
    end
  end

  initial assert (NUM_CH * ADC_W <= WORD_W);
endmodule
