// us_platform_top: digital part of the ultrasound research platform.
//
// Transmit FPGA: the PC sends sigma-delta encoded waveforms (one bit per
// sample) and control commands over a UART. host_cmd stores waveform words in
// DDR2 through a memory socket, enters each waveform's id and location in
// wave_record, and fills the pin assignment (pin_assign) and start-time table
// (delay_ctrl). On START, tx_sequencer resolves every pin's waveform, the
// eight pin_channel sockets read their waveforms from DDR2 through
// mem_arbiter and ddr2_user_if (which faces the external MIG controller),
// and once all are loaded the run-time counter starts. Each pin begins when
// the counter reaches its start time and sends four samples per 266 MHz
// clock through an xor_serializer, i.e. about 1.07 Gsample/s per pin. When
// all pins are done the excitation-done toggle changes.
// Receive side: rx_capture, clocked by the 65 MHz ADC clock, records
// RECORD_SAMPLES clocks of the eight 14-bit ADC channels after every change
// of the excitation-done toggle, one packed 128-bit word per clock, on a
// write port meant for the receive-side DDR2.
// The MIG core, the DDR2 devices, the clock manager that makes clk90 and the
// ADC are outside this module; their signals are ports.
// Arbiter sockets: 0 = host writer (priority 2), 1..NUM_PINS = pin readers
// (priority 1).
module us_platform_top
  import us_pkg::*;
#(
  parameter int NUM_PINS       = 8,
  parameter int MAX_WORDS      = 24,
  parameter int NUM_WAVES      = 16,
  parameter int CLKS_PER_BIT   = 2309,
  parameter int NUM_CH         = 8,
  parameter int ADC_W          = 14,
  parameter int RECORD_SAMPLES = 64805,
  localparam int CAP_AW        = $clog2(RECORD_SAMPLES)
) (
  input  logic                clk,
  input  logic                clk90,
  input  logic                rst_n,
  // PC link
  input  logic                uart_rx_i,
  output logic                uart_tx_o,
  // excitation outputs
  output logic [NUM_PINS-1:0] pins_o,
  output logic                excite_done_o,
  output logic                tx_busy_o,
  output logic                err_overrun_o,
  output logic                err_record_full_o,
  output logic                err_uart_frame_o,
  // MIG user interface (transmit-side DDR2)
  input  logic                phy_init_done,
  input  logic                app_af_afull,
  input  logic                app_wdf_afull,
  output logic                app_af_wren,
  output logic [2:0]          app_af_cmd,
  output logic [30:0]         app_af_addr,
  output logic                app_wdf_wren,
  output logic [WORD_W-1:0]   app_wdf_data,
  output logic [WORD_W/8-1:0] app_wdf_mask_data,
  input  logic                rd_data_valid,
  input  logic [WORD_W-1:0]   rd_data_fifo_out,
  // receive side
  input  logic                adc_clk,
  input  logic [ADC_W-1:0]    adc_data_i [NUM_CH],
  output logic                cap_wr_en,
  output logic [CAP_AW-1:0]   cap_wr_addr,
  output logic [WORD_W-1:0]   cap_wr_data,
  output logic                cap_busy_o,
  output logic                cap_done_o
);
  localparam int PW = $clog2(NUM_PINS);
  localparam int NS = NUM_PINS + 1;

  // UART
  logic [7:0] rx_byte, ack_byte;
  logic       rx_valid, ack_send, ack_busy;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx(uart_rx_i), .data(rx_byte), .valid(rx_valid),
    .frame_err(err_uart_frame_o));

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(ack_byte), .start(ack_send), .tx(uart_tx_o),
    .busy(ack_busy));

  // sockets
  sock_req_t [NS-1:0] s_req;
  sock_rsp_t [NS-1:0] s_rsp;

  // command decoder
  logic                rec_we, asg_we, dly_we, start;
  logic [ID_W-1:0]     rec_id, asg_id;
  logic [ADDR_W-1:0]   rec_base;
  logic [LEN_W-1:0]    rec_len;
  logic [PW-1:0]       asg_pin, dly_pin;
  logic [DELAY_W-1:0]  dly_val;

  host_cmd #(.NUM_PINS(NUM_PINS)) u_cmd (
    .clk, .rst_n, .rx_data(rx_byte), .rx_valid,
    .sock_o(s_req[0]), .sock_i(s_rsp[0]),
    .rec_we, .rec_id, .rec_base, .rec_len,
    .asg_we, .asg_pin, .asg_id,
    .dly_we, .dly_pin, .dly_val,
    .start_o(start), .ack_data(ack_byte), .ack_send, .ack_busy,
    .overrun_o(err_overrun_o));

  // waveform record and pin assignment
  logic [ID_W-1:0]   lk_id;
  logic              lk_hit, pin_valid;
  logic [ADDR_W-1:0] lk_base, pin_base;
  logic [LEN_W-1:0]  lk_len, pin_len;
  logic [PW-1:0]     sel_pin;

  wave_record #(.NUM_WAVES(NUM_WAVES)) u_rec (
    .clk, .rst_n, .we(rec_we), .wr_id(rec_id), .wr_base(rec_base),
    .wr_len(rec_len), .full_o(err_record_full_o),
    .lk_id, .lk_hit, .lk_base, .lk_len);

  pin_assign #(.NUM_PINS(NUM_PINS)) u_asg (
    .clk, .rst_n, .we(asg_we), .wr_pin(asg_pin), .wr_id(asg_id),
    .sel_pin, .lk_id, .lk_hit, .lk_base, .lk_len,
    .pin_valid, .pin_base, .pin_len);

  // sequencing and delays
  logic [NUM_PINS-1:0] fetch, loaded, done, go;
  logic [ADDR_W-1:0]   fetch_base;
  logic [LEN_W-1:0]    fetch_len;
  logic                run;
  logic [DELAY_W-1:0]  run_count;

  tx_sequencer #(.NUM_PINS(NUM_PINS)) u_seq (
    .clk, .rst_n, .start, .sel_pin_o(sel_pin),
    .pin_valid, .pin_base, .pin_len,
    .fetch_o(fetch), .fetch_base_o(fetch_base), .fetch_len_o(fetch_len),
    .loaded_i(loaded), .done_i(done), .run_o(run),
    .done_toggle_o(excite_done_o), .busy_o(tx_busy_o));

  delay_ctrl #(.NUM_PINS(NUM_PINS)) u_dly (
    .clk, .rst_n, .we(dly_we), .wr_pin(dly_pin), .wr_val(dly_val),
    .run, .go_o(go), .count_o(run_count));

  // per-pin fetch, stream and high-speed output
  for (genvar p = 0; p < NUM_PINS; p++) begin : g_pin
    logic [3:0] nibble;

    pin_channel #(.MAX_WORDS(MAX_WORDS)) u_ch (
      .clk, .rst_n, .fetch(fetch[p]), .fetch_base, .fetch_len,
      .sock_o(s_req[p+1]), .sock_i(s_rsp[p+1]),
      .loaded_o(loaded[p]), .go(go[p]), .nibble_o(nibble), .done_o(done[p]));

    xor_serializer u_ser (
      .clk, .clk90, .rst_n, .nibble, .pin(pins_o[p]));
  end

  // memory
  logic              m_cmd_valid, m_cmd_ready, m_we, m_rvalid, m_idle;
  logic [ADDR_W-1:0] m_addr;
  logic [WORD_W-1:0] m_wdata, m_rdata;
  logic              evt_prio, evt_lru;

  mem_arbiter #(.N(NS), .PRIO({{NUM_PINS{2'd1}}, 2'd2})) u_arb (
    .clk, .rst_n, .sock_i(s_req), .sock_o(s_rsp),
    .m_cmd_valid, .m_we, .m_addr, .m_wdata, .m_cmd_ready,
    .m_rvalid, .m_rdata, .m_idle,
    .evt_prio_o(evt_prio), .evt_lru_o(evt_lru));

  ddr2_user_if u_mem (
    .clk, .rst_n, .cmd_valid(m_cmd_valid), .cmd_ready(m_cmd_ready),
    .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .rvalid(m_rvalid), .rdata(m_rdata), .idle(m_idle),
    .phy_init_done, .app_af_afull, .app_wdf_afull,
    .app_af_wren, .app_af_cmd, .app_af_addr,
    .app_wdf_wren, .app_wdf_data, .app_wdf_mask_data,
    .rd_data_valid, .rd_data_fifo_out);

  // receive side
  rx_capture #(.NUM_CH(NUM_CH), .ADC_W(ADC_W), .RECORD_SAMPLES(RECORD_SAMPLES)) u_cap (
    .adc_clk, .rst_n, .trig_toggle(excite_done_o), .adc_data(adc_data_i),
    .wr_en(cap_wr_en), .wr_addr(cap_wr_addr), .wr_data(cap_wr_data),
    .busy_o(cap_busy_o), .done_o(cap_done_o));
endmodule
