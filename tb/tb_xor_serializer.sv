// tb_xor_serializer: feeds random nibbles at the 266 MHz clock (period
// 3.76 ns, clk90 a quarter period later) and samples the pin in the middle
// of every quarter period. Sample i of the nibble taken at a rising clk edge
// must appear in quarter i after that edge. Runs 2000 nibbles plus long
// runs of all-zero and all-one samples.
module tb_xor_serializer;
  localparam realtime T = 3.76;
  logic clk = 0, clk90 = 0, rst_n = 0;
  logic [3:0] nibble = '0;
  logic pin;
  int checks = 0, failures = 0;

  xor_serializer dut (.*);

  always #(T/2) clk = ~clk;
  initial begin #(T/4); forever #(T/2) clk90 = ~clk90; end

  initial begin
    #(T * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] cur;
    repeat (3) @(posedge clk);
    #(T/8) rst_n = 1;
    @(negedge clk);
    nibble = 4'($urandom);
    for (int k = 0; k < 2300; k++) begin
      @(posedge clk);
      cur = nibble;            // value taken at this edge
      #(T/8);
      if (k < 2000) nibble = 4'($urandom);
      else if (k < 2150) nibble = 4'h0;
      else nibble = 4'hF;
      for (int q = 0; q < 4; q++) begin
        if (k > 0) begin
          checks++;
          if (pin !== cur[q]) begin
            failures++;
            if (failures < 10) $display("nibble %0d quarter %0d: pin %b expected %b", k, q, pin, cur[q]);
          end
        end
        if (q < 3) #(T/4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
