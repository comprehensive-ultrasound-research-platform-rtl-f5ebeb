// tb_workload_8x3072: the largest transmit load the platform is built for,
// run with the design at its default sizes. Eight different 3072-sample
// sigma-delta chirps (24 words each) are stored, each is recorded under its
// own id and assigned to its own pin, the delays step from 0 to 1330 counts
// (0 to 5 us at 266 MHz), and one transmission plus one full 64805-sample
// recording is run. All eight pins fetch 24 words at once, so every pin has
// to wait its turn at the memory. The long waveforms are placed in the DDR2
// model directly; records, assignments, delays and START go over the UART.
// See us_platform_tb_body.svh for the sequence and the checks.
module tb_workload_8x3072;
  localparam int CPB  = 2309;
  localparam int NREC = 64805;
  localparam bit FULL = 1;

  localparam int NW = 8;
  localparam int WLEN  [NW] = '{24, 24, 24, 24, 24, 24, 24, 24};   // words
  localparam int WID   [NW] = '{1, 2, 3, 4, 5, 6, 7, 8};
  localparam int WBASE [NW] = '{'h1000, 'h1020, 'h1040, 'h1060,
                                'h1080, 'h10A0, 'h10C0, 'h10E0};
  localparam real F0   [NW] = '{4.0e6, 4.5e6, 5.0e6, 5.5e6, 6.0e6, 6.5e6, 7.0e6, 7.5e6};
  localparam real F1   [NW] = '{12.0e6, 11.5e6, 11.0e6, 10.5e6, 10.0e6, 9.5e6, 9.0e6, 8.5e6};
  localparam int ASSIGN_ID [8] = '{1, 2, 3, 4, 5, 6, 7, 8};
  localparam int DELAY     [8] = '{0, 190, 380, 570, 760, 950, 1140, 1330};

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
