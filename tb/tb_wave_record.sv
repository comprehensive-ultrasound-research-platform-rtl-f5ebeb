// tb_wave_record: fills a 4-entry record, looks every id up (and ids that
// are absent), overwrites one entry, checks that a fifth new id is refused
// with full_o, and compares all answers with a reference kept in the
// testbench as an associative array.
module tb_wave_record;
  import us_pkg::*;
  localparam int NW = 4;
  logic clk = 0, rst_n = 0, we = 0, full_o;
  logic [ID_W-1:0] wr_id, lk_id;
  logic [ADDR_W-1:0] wr_base, lk_base;
  logic [LEN_W-1:0] wr_len, lk_len;
  logic lk_hit;
  int checks = 0, failures = 0;
  logic [ADDR_W+LEN_W-1:0] ref_tbl [int];

  wave_record #(.NUM_WAVES(NW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int id, input int base, input int len, input bit expect_full);
    @(negedge clk);
    we = 1; wr_id = ID_W'(id); wr_base = ADDR_W'(base); wr_len = LEN_W'(len);
    @(negedge clk);
    we = 0;
    checks++;
    if (full_o !== expect_full) begin failures++; $display("id %0d: full_o=%b", id, full_o); end
    if (!expect_full) ref_tbl[id] = {ADDR_W'(base), LEN_W'(len)};
  endtask

  task automatic look_all();
    for (int id = 0; id < 256; id++) begin
      @(negedge clk);
      lk_id = ID_W'(id);
      #1;
      checks++;
      if (ref_tbl.exists(id)) begin
        if (!lk_hit || {lk_base, lk_len} != ref_tbl[id]) begin
          failures++; $display("id %0d: hit=%b base=%h len=%0d", id, lk_hit, lk_base, lk_len);
        end
      end else if (lk_hit) begin
        failures++; $display("id %0d: unexpected hit", id);
      end
    end
  endtask

  initial begin
    wr_id = 0; wr_base = 0; wr_len = 0; lk_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    look_all();                       // empty
    write(7,   'h000100, 24, 0);
    write(200, 'h000200, 12, 0);
    write(3,   'h001000, 1, 0);
    look_all();
    write(200, 'h0ABCDE, 5, 0);       // overwrite an existing id
    write(9,   'h000300, 24, 0);      // last free entry
    look_all();
    write(10,  'h000400, 2, 1);       // no room
    write(7,   'h000500, 3, 0);       // overwrite still possible when full
    look_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
