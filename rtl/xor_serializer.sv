// xor_serializer: four samples per clock on one pin.
//
// The pin runs at four times the 266 MHz clock (about 1.07 Gsample/s) using
// two copies of the clock 90 degrees apart. Four one-bit signals s1..s4 are
// each updated on one of the four edges that divide a clock period into
// quarters: s1 on the rising edge of clk, s2 on the rising edge of clk90,
// s3 on the falling edge of clk and s4 on the falling edge of clk90. The pin
// is the XOR of the four. Each signal loads its sample XOR the current value
// of the other three, so right after its edge the XOR equals that sample and
// no flop ever has to toggle faster than the clock.
// Timing: 'nibble' is sampled on the rising edge of clk; nibble[0] drives the
// pin from that edge, nibble[1..3] from the following three quarter-period
// edges. The XOR-of-four-phases method follows the source; the order in
// which the edges carry the samples is this design's choice.
module xor_serializer (
  input  logic       clk,
  input  logic       clk90,
  input  logic       rst_n,
  input  logic [3:0] nibble,
  output logic       pin
);
  logic       s1, s2, s3, s4;
  logic [3:1] held;   // samples 1..3 of the nibble taken at the last clk rise

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1   <= 1'b0;
      held <= '0;
    end else begin
      s1   <= nibble[0] ^ s2 ^ s3 ^ s4;
      held <= nibble[3:1];
    end
  end

  always_ff @(posedge clk90 or negedge rst_n) begin
    if (!rst_n) s2 <= 1'b0;
    else        s2 <= held[1] ^ s1 ^ s3 ^ s4;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) s3 <= 1'b0;
    else        s3 <= held[2] ^ s1 ^ s2 ^ s4;
  end

  always_ff @(negedge clk90 or negedge rst_n) begin
    if (!rst_n) s4 <= 1'b0;
    else        s4 <= held[3] ^ s1 ^ s2 ^ s3;
  end

  assign pin = s1 ^ s2 ^ s3 ^ s4;
endmodule
