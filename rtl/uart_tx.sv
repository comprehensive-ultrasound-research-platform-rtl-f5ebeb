// uart_tx: transmitter for the FPGA-to-PC serial link.
//
// Sends 'data' as one 8N1 frame (start bit, 8 data bits LSB first, stop bit)
// when 'start' is pulsed while 'busy' is low; a start while busy is ignored.
// Each bit lasts CLKS_PER_BIT clocks. The line idles high. Used to return
// one acknowledge byte per host command; the frame format is this design's
// choice.
module uart_tx #(
  parameter int CLKS_PER_BIT = 2309
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       tx,
  output logic       busy
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;     // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign busy = (bits_left != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      tx        <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= CW'(CLKS_PER_BIT - 1);
        tx        <= 1'b0;
      end
    end else if (cnt == 0) begin
      frame     <= {1'b1, frame[9:1]};
      bits_left <= bits_left - 1'b1;
      cnt       <= CW'(CLKS_PER_BIT - 1);
      tx        <= (bits_left == 4'd1) ? 1'b1 : frame[1];
    end else begin
      cnt <= cnt - 1'b1;
    end
  end
endmodule
