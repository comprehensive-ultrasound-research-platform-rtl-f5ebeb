// pin_assign: which waveform each output pin sends.
//
// Holds one waveform identifying number per pin, written by the host. For
// the pin on 'sel_pin' it presents that pin's id to the waveform record
// ('lk_id') and returns the record's answer as the pin's DDR2 location.
// 'pin_valid' is high only if the pin has been assigned and its id is in the
// record; an invalid pin stays idle during transmission. Everything is
// combinational from 'sel_pin' to the outputs. Assigning waveforms to pins
// through the record follows the source; treating unknown ids as idle pins is
// this design's choice.
module pin_assign
  import us_pkg::*;
#(
  parameter int NUM_PINS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        we,
  input  logic [$clog2(NUM_PINS)-1:0] wr_pin,
  input  logic [ID_W-1:0]             wr_id,
  input  logic [$clog2(NUM_PINS)-1:0] sel_pin,
  output logic [ID_W-1:0]             lk_id,
  input  logic                        lk_hit,
  input  logic [ADDR_W-1:0]           lk_base,
  input  logic [LEN_W-1:0]            lk_len,
  output logic                        pin_valid,
  output logic [ADDR_W-1:0]           pin_base,
  output logic [LEN_W-1:0]            pin_len
);
  logic [ID_W-1:0]     pin_id   [NUM_PINS];
  logic [NUM_PINS-1:0] assigned;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PINS; i++) pin_id[i] <= '0;
      assigned <= '0;
    end else if (we) begin
      pin_id[wr_pin]   <= wr_id;
      assigned[wr_pin] <= 1'b1;
    end
  end

  assign lk_id     = pin_id[sel_pin];
  assign pin_valid = assigned[sel_pin] && lk_hit;
  assign pin_base  = pin_valid ? lk_base : '0;
  assign pin_len   = pin_valid ? lk_len  : '0;
endmodule
