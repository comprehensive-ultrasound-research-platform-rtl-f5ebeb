// tb_uart_rx: sends 40 random 8N1 frames to uart_rx at 8 clocks per bit and
// checks each received byte, then one frame with a low stop bit, which must
// raise frame_err and must not deliver its byte.
module tb_uart_rx;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_ferr = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (valid) begin n_valid++; last = data; end
    if (frame_err) n_ferr++;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1; repeat (2*CPB) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      logic [7:0] b;
      int n0;
      b = 8'($urandom);
      n0 = n_valid;
      send(b, 1'b1);
      checks++;
      if (n_valid != n0 + 1 || last != b) begin
        failures++;
        $display("byte %0d: sent %h got %h (valid count %0d)", k, b, last, n_valid - n0);
      end
    end
    begin
      last = 8'h00;
      send(8'hA5, 1'b0);
      checks++;
      if (n_ferr != 1 || last == 8'hA5) begin
        failures++;
        $display("bad stop bit not flagged: ferr=%0d last=%h", n_ferr, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
