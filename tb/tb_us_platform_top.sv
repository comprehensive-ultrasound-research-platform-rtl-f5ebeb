// tb_us_platform_top: end-to-end test of the platform at reduced UART and
// recording sizes (4 clocks per UART bit, 200-sample recording) with a slow
// DDR2 model, so that new waveform data is written while the pins fetch
// theirs and the arbiter's priority rule is exercised; it also fills the
// record past its 16 entries and sends a second START during the
// transmission, which must be acknowledged and ignored. See
// us_platform_tb_body.svh for the sequence and the checks.
module tb_us_platform_top;
  localparam int CPB  = 4;
  localparam int NREC = 200;
  localparam bit FULL = 0;

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
    #(T * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  us_platform_top #(.CLKS_PER_BIT(CPB), .RECORD_SAMPLES(NREC)) dut (.*);
endmodule
