// tb_ddr2_user_if: drives random single-word writes and reads through
// ddr2_user_if into the behavioural MIG model (with random back-pressure)
// and checks every read word against a reference memory in the testbench,
// that no command is accepted before phy_init_done, and that 'idle' stays
// low while reads are outstanding.
module tb_ddr2_user_if;
  import us_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, we = 0, rvalid, idle;
  logic [ADDR_W-1:0] addr = '0;
  logic [WORD_W-1:0] wdata = '0, rdata;
  logic phy_init_done, app_af_afull, app_wdf_afull, app_af_wren, app_wdf_wren, rd_data_valid;
  logic [2:0] app_af_cmd;
  logic [30:0] app_af_addr;
  logic [WORD_W-1:0] app_wdf_data, rd_data_fifo_out;
  logic [WORD_W/8-1:0] app_wdf_mask_data;
  int checks = 0, failures = 0;
  logic [WORD_W-1:0] ref_mem [int];
  logic [WORD_W-1:0] expq [$];
  int outstanding = 0, n_reads = 0;

  ddr2_user_if dut (.*);
  mig_model #(.INIT_CYCLES(30), .READ_LATENCY(9), .THROTTLE(3)) mig (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read data checker
  always @(posedge clk) begin
    if (rst_n) begin
      if (cmd_valid && cmd_ready && !phy_init_done) begin
        failures++; $display("command accepted before init");
      end
      if (rvalid) begin
        checks++;
        n_reads++;
        if (expq.size() == 0) begin failures++; $display("unexpected read data"); end
        else begin
          logic [WORD_W-1:0] e;
          e = expq.pop_front();
          if (rdata !== e) begin failures++; $display("read %h expected %h", rdata, e); end
        end
      end
    end
  end

  always @(negedge clk)
    if (rst_n && expq.size() > 0 && idle) begin failures++; $display("idle while reads outstanding"); end

  function automatic logic [WORD_W-1:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 400; k++) begin
      logic w;
      logic [ADDR_W-1:0] a;
      w = (k < 40) || ($urandom_range(0, 1) == 1);
      a = ADDR_W'($urandom_range(0, 31));
      cmd_valid = 1; we = w; addr = a; wdata = rnd128();
      do @(posedge clk); while (!cmd_ready);
      if (w) ref_mem[int'(a)] = wdata;
      else expq.push_back(ref_mem.exists(int'(a)) ? ref_mem[int'(a)] : mig.peek(32'(a)));
      @(negedge clk);
      cmd_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (expq.size() != 0 || !idle) begin failures++; $display("%0d reads never returned", expq.size()); end
    checks++;
    if (mig.n_afull == 0) begin failures++; $display("back-pressure never happened"); end
    $display("reads %0d, back-pressure cycles %0d", n_reads, mig.n_afull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
