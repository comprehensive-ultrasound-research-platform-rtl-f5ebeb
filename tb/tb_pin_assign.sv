// tb_pin_assign: assigns ids to pins and answers the record lookups with a
// small reference record inside the testbench. Checks that each pin resolves
// to its waveform's location (id 0 included), that unassigned pins and ids missing from the
// record read as invalid with zero location, and that reassignment works.
module tb_pin_assign;
  import us_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] wr_pin, sel_pin;
  logic [ID_W-1:0] wr_id, lk_id;
  logic lk_hit, pin_valid;
  logic [ADDR_W-1:0] lk_base, pin_base;
  logic [LEN_W-1:0] lk_len, pin_len;
  int checks = 0, failures = 0;
  int asg [NP];

  pin_assign #(.NUM_PINS(NP)) dut (.*);
  always #5 clk = ~clk;

  // reference record: ids 0..5 exist, at base id*0x100, length id+10
  always_comb begin
    lk_hit  = (lk_id <= 5);
    lk_base = lk_hit ? ADDR_W'(lk_id) * 24'h100 : '0;
    lk_len  = lk_hit ? LEN_W'(lk_id) + 8'd10 : '0;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic assign_pin(input int p, input int id);
    @(negedge clk); we = 1; wr_pin = 3'(p); wr_id = ID_W'(id);
    @(negedge clk); we = 0;
    asg[p] = id;
  endtask

  task automatic check_all();
    for (int p = 0; p < NP; p++) begin
      bit ev;
      @(negedge clk); sel_pin = 3'(p); #1;
      ev = (asg[p] >= 0 && asg[p] <= 5);
      checks++;
      if (pin_valid !== ev || (ev && (pin_base != ADDR_W'(asg[p] * 'h100) || pin_len != LEN_W'(asg[p] + 10)))
          || (!ev && (pin_base != 0 || pin_len != 0))) begin
        failures++;
        $display("pin %0d (id %0d): valid=%b base=%h len=%0d", p, asg[p], pin_valid, pin_base, pin_len);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) asg[p] = -1;
    wr_pin = 0; wr_id = 0; sel_pin = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_all();
    assign_pin(0, 1); assign_pin(3, 5); assign_pin(5, 2); assign_pin(7, 9);
    check_all();
    assign_pin(3, 4); assign_pin(1, 1); assign_pin(7, 3); assign_pin(2, 0);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
