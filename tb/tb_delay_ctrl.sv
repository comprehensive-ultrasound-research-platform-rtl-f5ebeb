// tb_delay_ctrl: programs random start times (and some equal ones) into the
// table, runs the counter and checks that each pin's go pulse comes exactly
// once, one clock after the counter equals its entry, i.e. delay+1 clocks
// after run rises. A second run checks that the counter restarts from zero.
module tb_delay_ctrl;
  import us_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0, we = 0, run = 0;
  logic [2:0] wr_pin;
  logic [DELAY_W-1:0] wr_val, count_o;
  logic [NP-1:0] go_o;
  int checks = 0, failures = 0;
  int dly [NP];
  int cyc, fired_at [NP], nfire [NP];

  delay_ctrl #(.NUM_PINS(NP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (run) cyc++;
    for (int p = 0; p < NP; p++)
      if (go_o[p]) begin nfire[p]++; fired_at[p] = cyc; end
  end

  task automatic do_run();
    for (int p = 0; p < NP; p++) begin
      @(negedge clk); we = 1; wr_pin = 3'(p); wr_val = DELAY_W'(dly[p]);
    end
    @(negedge clk); we = 0;
    for (int p = 0; p < NP; p++) begin nfire[p] = 0; fired_at[p] = -1; end
    cyc = 0;
    run = 1;
    repeat (1400) @(negedge clk);
    run = 0;
    for (int p = 0; p < NP; p++) begin
      checks++;
      // run rises before clock 1; the counter equals d during clock d+1 and
      // go is registered, so it is seen high at the edge ending clock d+2
      if (nfire[p] != 1 || fired_at[p] != dly[p] + 2) begin
        failures++;
        $display("pin %0d delay %0d: fired %0d times, at %0d", p, dly[p], nfire[p], fired_at[p]);
      end
    end
  endtask

  initial begin
    wr_pin = 0; wr_val = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    dly = '{0, 1, 5, 5, 100, 1330, 777, 2};
    do_run();
    for (int p = 0; p < NP; p++) dly[p] = $urandom_range(0, 1300);
    repeat (5) @(negedge clk);
    checks++;
    if (count_o != 0) begin failures++; $display("counter not cleared"); end
    do_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
