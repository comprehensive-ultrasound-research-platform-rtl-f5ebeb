// Shared body of the end-to-end testbenches of us_platform_top. The
// including module defines CPB (clocks per UART bit), NREC (samples per
// recording), FULL (1 = default-size run: waveforms longer than one word are
// placed in the DDR2 model directly instead of being sent over the UART),
// the waveform set (NW waveforms: WLEN words, WID ids, WBASE addresses,
// chirps from F0 to F1 Hz), the pin set-up (ASSIGN_ID per pin, -1 = none;
// DELAY per pin in counts) and then instantiates the design as 'dut'.
//
// The PC side is modelled here: waveforms are made with a second-order
// sigma-delta modulator (integrators i1 += x - v, i2 += i1 - v, v = sign(i2))
// from linear chirps sampled at 1.024 GHz, and commands are sent as UART
// frames. The test stores the waveforms, records them, assigns them to pins,
// sets the delays, starts a transmission and samples every pin four times
// per clock. Each
// pin must send exactly its waveform, starting 3 + delay clocks after the
// first clock edge at which the run counter is seen running, and be 0
// elsewhere. Afterwards the receive side must record NREC words.
// Every mechanism is counted and must have happened at least once.

  import us_pkg::*;
  localparam realtime T  = 3.76;     // 266 MHz
  localparam realtime TA = 15.38;    // 65 MHz
  localparam int NP = 8;

  logic clk = 0, clk90 = 0, adc_clk = 0, rst_n = 0;
  logic uart_rx_i = 1, uart_tx_o;
  logic [NP-1:0] pins_o;
  logic excite_done_o, tx_busy_o, err_overrun_o, err_record_full_o, err_uart_frame_o;
  logic phy_init_done, app_af_afull, app_wdf_afull, app_af_wren, app_wdf_wren, rd_data_valid;
  logic [2:0] app_af_cmd;
  logic [30:0] app_af_addr;
  logic [127:0] app_wdf_data, rd_data_fifo_out;
  logic [15:0] app_wdf_mask_data;
  logic [13:0] adc_data_i [8];
  logic cap_wr_en, cap_busy_o, cap_done_o;
  logic [$clog2(NREC)-1:0] cap_wr_addr;
  logic [127:0] cap_wr_data;

  int checks = 0, failures = 0;

  always #(T/2) clk = ~clk;
  initial begin #(T/4); forever #(T/2) clk90 = ~clk90; end
  always #(TA/2) adc_clk = ~adc_clk;

  mig_model #(.INIT_CYCLES(40), .READ_LATENCY(14), .ACCEPT_ONE_IN(FULL ? 2 : 14)) mig (
    .clk, .rst_n, .phy_init_done, .app_af_afull, .app_wdf_afull,
    .app_af_wren, .app_af_cmd, .app_af_addr, .app_wdf_wren, .app_wdf_data,
    .app_wdf_mask_data, .rd_data_valid, .rd_data_fifo_out);

  always @(negedge adc_clk)
    for (int c = 0; c < 8; c++) adc_data_i[c] = 14'($urandom);

  // ---------------- waveforms ----------------
  logic [127:0] wv [NW][24];

  function automatic void sigma_delta_chirp(input int w, input real f0, input real f1);
    real fs, dur, i1, i2, x, v, t;
    int n;
    fs = 1.024e9;
    n = WLEN[w] * 128;
    dur = n / fs;
    i1 = 0; i2 = 0;
    for (int k = 0; k < n; k++) begin
      t = k / fs;
      x = 0.5 * $sin(2.0 * 3.14159265358979 * (f0 * t + (f1 - f0) / (2.0 * dur) * t * t));
      v = (i2 >= 0.0) ? 1.0 : -1.0;
      wv[w][k / 128][k % 128] = (v > 0.0);
      i1 = i1 + x - v;
      i2 = i2 + i1 - v;
    end
  endfunction

  // ---------------- UART to the design ----------------
  task automatic uart_send(input logic [7:0] b);
    uart_rx_i = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx_i = b[i]; repeat (CPB) @(posedge clk); end
    uart_rx_i = 1; repeat (CPB) @(posedge clk);
  endtask

  task automatic cmd_write(input int base, input int n, input logic [127:0] words [24]);
    uart_send(8'h01); uart_send(8'(base >> 16)); uart_send(8'(base >> 8)); uart_send(8'(base));
    uart_send(8'(n));
    for (int w = 0; w < n; w++)
      for (int b = 0; b < 16; b++) uart_send(words[w][8*b +: 8]);
  endtask

  task automatic cmd_record(input int id, input int base, input int len);
    uart_send(8'h02); uart_send(8'(id));
    uart_send(8'(base >> 16)); uart_send(8'(base >> 8)); uart_send(8'(base)); uart_send(8'(len));
  endtask

  task automatic cmd_assign(input int pin, input int id);
    uart_send(8'h03); uart_send(8'(pin)); uart_send(8'(id));
  endtask

  task automatic cmd_delay(input int pin, input int d);
    uart_send(8'h04); uart_send(8'(pin));
    uart_send(8'(d >> 24)); uart_send(8'(d >> 16)); uart_send(8'(d >> 8)); uart_send(8'(d));
  endtask

  // ---------------- UART from the design: acknowledge bytes ----------------
  logic [7:0] acks [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_tx_o);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_tx_o; end
      repeat (CPB) @(posedge clk);
      if (rst_n) acks.push_back(b);
    end
  end

  // ---------------- pin sampling ----------------
  bit           sampling = 0;
  int           edge_idx = 0;
  logic [NP-1:0] qs [$];
  always @(posedge clk) begin
    if (!sampling && rst_n && dut.u_seq.run_o) begin
      sampling = 1;
      edge_idx = 0;
    end
    if (sampling) begin
      for (int q = 0; q < 4; q++) begin
        #(T/8);
        qs.push_back(pins_o);
        if (q < 3) #(T/8);
      end
      edge_idx++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_prio = 0, n_lru = 0, n_afull_stall = 0, n_rec_full = 0, n_cap = 0, n_cap_done = 0;
  int n_host_writes = 0, n_reads = 0, n_start_busy = 0, n_toggles = 0;
  logic tog_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_arb.evt_prio_o) n_prio++;
    if (dut.u_arb.evt_lru_o) n_lru++;
    if (dut.m_cmd_valid && !dut.m_cmd_ready) n_afull_stall++;
    if (err_record_full_o) n_rec_full++;
    if (dut.s_req[0].cmd_valid && dut.s_rsp[0].cmd_ready) n_host_writes++;
    if (dut.m_rvalid) n_reads++;
    if (dut.u_cmd.start_o && dut.u_seq.busy_o) n_start_busy++;
    if (excite_done_o != tog_q) n_toggles++;
    tog_q <= excite_done_o;
  end
  always @(posedge adc_clk) if (rst_n) begin
    if (cap_wr_en) n_cap++;
    if (cap_done_o) n_cap_done++;
  end

  function automatic void need(input string what, input int n);
    checks++;
    $display("%-40s %0d", what, n);
    if (n == 0) begin failures++; $display("  never happened: %s", what); end
  endfunction

  // ---------------- test ----------------
  logic [127:0] extra [24];

  initial begin
    int nacks_exp, tog0, wexp;
    logic [7:0] ack_exp [$];
    for (int w = 0; w < 24; w++) extra[w] = {4{32'hC0DE_0000 + 32'(w)}};
    for (int w = 0; w < NW; w++) sigma_delta_chirp(w, F0[w], F1[w]);
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (phy_init_done);
    repeat (5) @(posedge clk);

    // store the waveforms
    for (int w = 0; w < NW; w++) begin
      if (FULL && WLEN[w] > 1) begin
        for (int k = 0; k < WLEN[w]; k++) mig.poke(32'(WBASE[w] + k), wv[w][k]);
      end else begin
        cmd_write(WBASE[w], WLEN[w], wv[w]);
        ack_exp.push_back(8'h81);
      end
    end
    for (int w = 0; w < NW; w++) begin
      cmd_record(WID[w], WBASE[w], WLEN[w]);
      ack_exp.push_back(8'h82);
    end
    if (!FULL) begin
      // fill the record (16 entries) and overflow it once
      for (int i = 0; i < 14; i++) begin
        cmd_record(40 + i, 'h1000 + i, 1);
        ack_exp.push_back(8'h82);
      end
    end
    for (int p = 0; p < NP; p++) begin
      if (ASSIGN_ID[p] >= 0) begin cmd_assign(p, ASSIGN_ID[p]); ack_exp.push_back(8'h83); end
      cmd_delay(p, DELAY[p]);
      ack_exp.push_back(8'h84);
    end
    tog0 = excite_done_o;
    uart_send(8'h05);
    ack_exp.push_back(8'h85);
    if (!FULL) begin
      // new waveform data arrives while the pins are still fetching theirs
      cmd_write('h400, 2, extra);
      ack_exp.push_back(8'h81);
      // a second START during the transmission is acknowledged but ignored
      uart_send(8'h05);
      ack_exp.push_back(8'h85);
    end
    wait (excite_done_o != tog0);
    repeat (20) @(posedge clk);
    sampling = 0;
    repeat (2) @(posedge clk);

    // pin outputs
    for (int p = 0; p < NP; p++) begin
      int w, nbits, errs, ones;
      w = -1;
      for (int k = 0; k < NW; k++) if (ASSIGN_ID[p] == WID[k]) w = k;
      nbits = (w >= 0) ? WLEN[w] * 128 : 0;
      errs = 0; ones = 0;
      for (int i = 0; i < qs.size(); i++) begin
        int s;
        logic e;
        s = i - 4 * (3 + DELAY[p]);
        e = (w >= 0 && s >= 0 && s < nbits) ? wv[w][s / 128][s % 128] : 1'b0;
        if (qs[i][p] !== e) errs++;
        if (qs[i][p]) ones++;
      end
      checks++;
      if (errs != 0) begin failures++; $display("pin %0d: %0d wrong samples", p, errs); end
      else $display("pin %0d: %0d samples from delay %0d correct", p, nbits, DELAY[p]);
    end

    // receive side
    wait (!cap_busy_o && n_cap_done > 0);
    repeat (5) @(posedge adc_clk);
    checks++;
    if (n_cap != NREC) begin failures++; $display("capture wrote %0d words, expected %0d", n_cap, NREC); end

    // acknowledges
    repeat (30 * CPB) @(posedge clk);
    checks++;
    if (acks.size() != ack_exp.size()) begin
      failures++; $display("%0d acks, expected %0d", acks.size(), ack_exp.size());
    end else begin
      foreach (acks[i]) if (acks[i] != ack_exp[i]) begin
        failures++; $display("ack %0d: %h expected %h", i, acks[i], ack_exp[i]);
      end
    end

    // memory contents written over the link
    wexp = 0;
    for (int w = 0; w < NW; w++)
      if (!(FULL && WLEN[w] > 1))
        for (int k = 0; k < WLEN[w]; k++) begin
          checks++;
          wexp++;
          if (mig.peek(32'(WBASE[w] + k)) !== wv[w][k]) begin failures++; $display("waveform %0d word %0d wrong in DDR2", w, k); end
        end
    if (!FULL)
      for (int k = 0; k < 2; k++) begin
        checks++;
        wexp++;
        if (mig.peek(32'('h400 + k)) !== extra[k]) begin failures++; $display("late word %0d wrong in DDR2", k); end
      end

    if (wexp > 0) need("host words written to DDR2", n_host_writes);
    need("words read from DDR2 by the pins", n_reads);
    need("memory back-pressure cycles", n_afull_stall);
    need("grants decided by access history", n_lru);
    need("capture recordings", n_cap_done);
    need("acknowledge bytes", acks.size());
    checks++;
    if (n_host_writes != wexp) begin failures++; $display("host writes %0d expected %0d", n_host_writes, wexp); end
    checks++;
    if (n_toggles != 1) begin failures++; $display("%0d excitation-done toggles, expected 1", n_toggles); end
    if (!FULL) begin
      need("grants where priority removed a requester", n_prio);
      need("record overflow", n_rec_full);
      need("START ignored during a transmission", n_start_busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
