// tb_uart_tx: sends 30 random bytes through uart_tx (8 clocks per bit) and
// decodes the line independently: start bit low, 8 data bits LSB first, stop
// bit high, each bit exactly 8 clocks long (checked at both ends of the bit).
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] data;
  logic tx, busy;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] seen;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (tx !== 1'b1) begin failures++; $display("idle line not high"); end
    for (int k = 0; k < 30; k++) begin
      logic [7:0] b = 8'($urandom);
      @(negedge clk); data = b; start = 1;
      @(negedge clk); start = 0; data = 8'($urandom);  // data must be captured
      // line went low on the clock edge that took 'start'
      for (int i = 0; i < 10; i++) begin
        logic first;
        first = tx;
        repeat (CPB - 1) @(negedge clk);
        checks++;
        if (tx !== first) begin failures++; $display("bit %0d not stable", i); end
        seen[i] = tx;
        @(negedge clk);
      end
      checks++;
      if (seen[0] !== 1'b0 || seen[9] !== 1'b1 || seen[8:1] !== b) begin
        failures++;
        $display("frame %0d: sent %h line %b", k, b, seen);
      end
      checks++;
      if (busy) begin failures++; $display("busy after stop bit"); end
      // a start while busy is ignored
      if (k == 5) begin
        @(negedge clk); data = 8'h3C; start = 1;
        @(negedge clk); start = 0;
        @(negedge clk); data = 8'hFF; start = 1;   // while busy: ignored
        @(negedge clk); start = 0;
        repeat (10*CPB + 4) @(negedge clk);
        checks++;
        if (tx !== 1'b1 || busy) begin failures++; $display("start while busy was taken"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
