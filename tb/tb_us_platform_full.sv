// tb_us_platform_full: one complete transmission and recording with the
// design at its default sizes (115200-baud UART at 266 MHz, 3072-sample
// waveforms, 64805-sample recording). The two long waveforms are placed in
// the DDR2 model directly; the short one, the record entries, the pin
// assignments, the delays and START go over the UART. See
// us_platform_tb_body.svh for the sequence and the checks.
module tb_us_platform_full;
  localparam int CPB  = 2309;
  localparam int NREC = 64805;
  localparam bit FULL = 1;

  localparam int NW = 3;
  localparam int WLEN  [NW] = '{24, 8, 1};           // words
  localparam int WID   [NW] = '{10, 20, 30};
  localparam int WBASE [NW] = '{'h100, 'h200, 'h300};
  localparam real F0   [NW] = '{4.0e6, 6.0e6, 8.0e6};
  localparam real F1   [NW] = '{12.0e6, 10.0e6, 8.0e6};
  // pin 5 unassigned, pin 6 given an id that is not recorded
  localparam int ASSIGN_ID [8] = '{10, 20, 10, 30, 10, -1, 99, 20};
  localparam int DELAY     [8] = '{0, 7, 1330, 100, 3, 0, 50, 613};

  `include "us_platform_tb_body.svh"

  initial begin
    #(T * 6000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  us_platform_top dut (.*);
endmodule
