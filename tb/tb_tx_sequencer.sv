// tb_tx_sequencer: the testbench plays the pin lookup (pins 1, 2, 4 and 6
// have no valid waveform) and eight channels that become loaded a random
// time after their fetch pulse and done a random time after run starts.
// Checks, over three transmissions: each pin gets exactly one fetch pulse
// with its own location (length zero for invalid pins); run_o rises only
// after every channel is loaded and stays high until all are done; the done
// toggle changes exactly once per transmission, after the last channel is
// done; a start while busy is ignored.
module tb_tx_sequencer;
  import us_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] sel_pin_o;
  logic pin_valid;
  logic [ADDR_W-1:0] pin_base, fetch_base_o;
  logic [LEN_W-1:0] pin_len, fetch_len_o;
  logic [NP-1:0] fetch_o, loaded_i, done_i;
  logic run_o, done_toggle_o, busy_o;
  int checks = 0, failures = 0;
  localparam logic [NP-1:0] VALID = 8'b1010_1001;

  tx_sequencer #(.NUM_PINS(NP)) dut (.*);
  always #5 clk = ~clk;

  always_comb begin
    pin_valid = VALID[sel_pin_o];
    pin_base  = ADDR_W'(sel_pin_o) * 24'h100 + 24'h10;
    pin_len   = LEN_W'(sel_pin_o) + 8'd2;
  end

  int nfetch [NP];
  int load_t [NP], done_t [NP];
  int cyc = 0, run_start = -1, last_load = 0, last_done = 0, toggles = 0;
  logic prev_toggle = 0, prev_run = 0;

  always @(posedge clk) begin
    cyc++;
    for (int p = 0; p < NP; p++) begin
      if (fetch_o[p] && rst_n) begin
        nfetch[p]++;
        checks++;
        if (fetch_base_o != ADDR_W'(p) * 24'h100 + 24'h10
            || fetch_len_o != (VALID[p] ? LEN_W'(p + 2) : 8'd0)) begin
          failures++; $display("pin %0d fetch base %h len %0d", p, fetch_base_o, fetch_len_o);
        end
        loaded_i[p] <= 1'b0;
        done_i[p]   <= 1'b0;
        load_t[p] = cyc + $urandom_range(2, 40);
        done_t[p] = -1;
      end else if (!loaded_i[p] && load_t[p] >= 0 && cyc >= load_t[p]) begin
        loaded_i[p] <= 1'b1;
        if (cyc > last_load) last_load = cyc;
      end
      if (run_o && !prev_run) done_t[p] = cyc + $urandom_range(1, 60);
      if (run_o && done_t[p] >= 0 && cyc >= done_t[p] && !done_i[p]) begin
        done_i[p] <= 1'b1;
        if (cyc > last_done) last_done = cyc;
      end
    end
    if (run_o && !prev_run) begin
      run_start = cyc;
      checks++;
      if (!(&loaded_i)) begin failures++; $display("run before all loaded"); end
    end
    if (!run_o && prev_run) begin
      checks++;
      if (!(&done_i)) begin failures++; $display("run ended before all done"); end
    end
    if (done_toggle_o != prev_toggle) begin
      toggles++;
      checks++;
      if (!(&done_i) || cyc <= last_done) begin failures++; $display("toggle before all done"); end
    end
    prev_toggle <= done_toggle_o;
    prev_run    <= run_o;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    loaded_i = '1; done_i = '1;
    for (int p = 0; p < NP; p++) begin nfetch[p] = 0; load_t[p] = -1; done_t[p] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int tg;
      tg = toggles;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      repeat (5) @(negedge clk);
      start = 1; @(negedge clk); start = 0;          // ignored: busy
      while (busy_o) @(negedge clk);
      repeat (3) @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (nfetch[p] != t + 1) begin failures++; $display("pin %0d fetched %0d times", p, nfetch[p]); end
      end
      checks++;
      if (toggles != tg + 1) begin failures++; $display("transmission %0d: %0d toggles", t, toggles - tg); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
