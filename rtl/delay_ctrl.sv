// delay_ctrl: individual start delays of the output pins.
//
// A table holds each pin's start time in counts of the run-time counter.
// While 'run' is high the counter advances by one per clock from zero
// (it is held at zero while 'run' is low); in the cycle the counter equals a
// pin's entry, that pin's 'go_o' bit pulses once. The counter stops at its
// maximum value rather than wrapping, so no pin fires twice in one run.
// Counter, table and compare-to-start follow the source; one count per
// 266 MHz clock and the table width are this design's choices.
module delay_ctrl
  import us_pkg::*;
#(
  parameter int NUM_PINS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        we,
  input  logic [$clog2(NUM_PINS)-1:0] wr_pin,
  input  logic [DELAY_W-1:0]          wr_val,
  input  logic                        run,
  output logic [NUM_PINS-1:0]         go_o,
  output logic [DELAY_W-1:0]          count_o
);
  logic [DELAY_W-1:0]  start_time [NUM_PINS];
  logic [NUM_PINS-1:0] fired;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PINS; i++) start_time[i] <= '0;
    end else if (we) begin
      start_time[wr_pin] <= wr_val;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_o <= '0;
      fired   <= '0;
      go_o    <= '0;
    end else if (!run) begin
      count_o <= '0;
      fired   <= '0;
      go_o    <= '0;
    end else begin
      for (int i = 0; i < NUM_PINS; i++) begin
        go_o[i] <= !fired[i] && (start_time[i] == count_o);
        if (start_time[i] == count_o) fired[i] <= 1'b1;
      end
      if (count_o != '1) count_o <= count_o + 1'b1;
    end
  end
endmodule
