// tb_rx_capture: the excitation-done toggle is driven from an unrelated
// clock; ADC samples change every ADC clock. For each of two recordings
// (RECORD_SAMPLES reduced to 50) it checks that exactly RECORD_SAMPLES
// writes occur at addresses 0..RECORD_SAMPLES-1 in order, one per clock
// without gaps, that each word holds the eight samples of that clock packed
// with channel 0 in the low bits, that wr_en is first seen high at the fourth
// ADC clock edge after the first edge that sees the toggle changed, that done_o pulses once, and that a toggle during
// a recording is ignored.
module tb_rx_capture;
  import us_pkg::*;
  localparam int NS = 50, NC = 8, AW_ = 14;
  logic adc_clk = 0, rst_n = 0, trig_toggle = 0;
  logic [AW_-1:0] adc_data [NC];
  logic wr_en, busy_o, done_o;
  logic [$clog2(NS)-1:0] wr_addr;
  logic [WORD_W-1:0] wr_data, prev_pack;
  int checks = 0, failures = 0;
  int nwr = 0, ndone = 0, cyc = 0, first_wr = -1, last_addr = -1;

  rx_capture #(.NUM_CH(NC), .ADC_W(AW_), .RECORD_SAMPLES(NS)) dut (.*);

  always #7.69 adc_clk = ~adc_clk;

  function automatic logic [WORD_W-1:0] pack();
    logic [WORD_W-1:0] w = '0;
    for (int c = 0; c < NC; c++) w[c*AW_ +: AW_] = adc_data[c];
    return w;
  endfunction

  always @(negedge adc_clk)
    for (int c = 0; c < NC; c++) adc_data[c] = AW_'($urandom);

  logic seen_tg = 0;
  int tg_cyc = 0;
  always @(posedge adc_clk) begin
    cyc++;
    if (trig_toggle != seen_tg) begin
      seen_tg = trig_toggle;
      if (!busy_o) tg_cyc = cyc;
    end
    if (rst_n) begin
      if (wr_en) begin
        nwr++;
        if (first_wr < 0) first_wr = cyc;
        checks++;
        if (int'(wr_addr) != last_addr + 1 || wr_data !== prev_pack) begin
          failures++; $display("write %0d: addr %0d data %h expected %h", nwr, wr_addr, wr_data, prev_pack);
        end
        last_addr = int'(wr_addr);
      end
      if (done_o) ndone++;
    end
    prev_pack <= pack();
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic record(input int n);
    nwr = 0; ndone = 0; first_wr = -1; last_addr = -1;
    #3.1 trig_toggle = ~trig_toggle;
    #100 trig_toggle = ~trig_toggle;     // during the recording: ignored
    wait (!busy_o && nwr > 0);
    repeat (5) @(posedge adc_clk);
    checks++;
    if (nwr != NS || last_addr != NS - 1 || ndone != 1) begin
      failures++; $display("recording %0d: %0d writes, last addr %0d, %0d done pulses", n, nwr, last_addr, ndone);
    end
    checks++;
    if (first_wr - tg_cyc != 4) begin failures++; $display("first write %0d clocks after toggle", first_wr - tg_cyc); end
    checks++;
    if (busy_o || wr_en) begin failures++; $display("recording did not stop"); end
  endtask

  initial begin
    repeat (3) @(posedge adc_clk);
    rst_n = 1;
    repeat (3) @(posedge adc_clk);
    record(0);
    #777;
    record(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
