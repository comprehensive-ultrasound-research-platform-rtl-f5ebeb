// tb_pin_channel: serves the channel's memory socket from a testbench memory
// (random back-pressure, data four clocks after the command), with the grant
// given a few clocks after req. For lengths 1, 3 and MAX_WORDS (and one
// longer, which must be clipped) it checks that loaded_o rises only after
// every word has returned, that req drops then, and that after 'go' the
// nibble stream starts exactly two clocks later and carries the words' bits
// in order, 32 nibbles per word, with done_o rising with the last nibble and
// zeros outside the transmission. A zero length must be loaded at once and
// finish right after 'go' with a silent output.
module tb_pin_channel;
  import us_pkg::*;
  localparam int MW = 4;
  logic clk = 0, rst_n = 0, fetch = 0, go = 0, loaded_o, done_o;
  logic [ADDR_W-1:0] fetch_base = '0;
  logic [LEN_W-1:0] fetch_len = '0;
  sock_req_t sock_o;
  sock_rsp_t sock_i;
  logic [3:0] nibble_o;
  int checks = 0, failures = 0;

  pin_channel #(.MAX_WORDS(MW)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [WORD_W-1:0] pattern(input logic [ADDR_W-1:0] a);
    return {a ^ 24'h13579B, 8'hA5, ~a, 8'h3C, a, 8'h96, a ^ 24'hFEDCBA, 8'h0F};
  endfunction

  // memory side
  logic gnt = 0, ready = 0;
  logic [ADDR_W-1:0] q_addr [$];
  int unsigned q_due [$];
  int unsigned cyc = 0;
  int reads = 0;
  assign sock_i.gnt       = gnt;
  assign sock_i.cmd_ready = gnt && ready;
  always @(posedge clk) begin
    cyc++;
    ready <= ($urandom_range(0, 3) != 0);
    if (sock_o.req && !gnt && $urandom_range(0, 3) == 0) gnt <= 1'b1;
    if (!sock_o.req) gnt <= 1'b0;
    if (sock_o.cmd_valid && sock_i.cmd_ready) begin
      q_addr.push_back(sock_o.addr); q_due.push_back(cyc + 4); reads++;
    end
    sock_i.rvalid <= 1'b0;
    if (q_due.size() > 0 && q_due[0] <= cyc) begin
      void'(q_due.pop_front());
      sock_i.rvalid <= 1'b1;
      sock_i.rdata  <= pattern(q_addr.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int base, input int len);
    int eff = (len > MW) ? MW : len;
    int r0;
    r0 = reads;
    @(negedge clk); fetch = 1; fetch_base = ADDR_W'(base); fetch_len = LEN_W'(len);
    @(negedge clk); fetch = 0;
    while (!loaded_o) begin
      @(negedge clk);
      if (!loaded_o && q_due.size() == 0 && reads - r0 == eff && sock_o.req == 0) break;
    end
    checks++;
    if (!loaded_o || reads - r0 != eff || q_due.size() != 0) begin
      failures++; $display("len %0d: loaded=%b reads=%0d", len, loaded_o, reads - r0);
    end
    @(negedge clk);
    checks++;
    if (sock_o.req) begin failures++; $display("req still high after load"); end
    repeat (3) @(negedge clk);
    go = 1; @(negedge clk); go = 0;
    // first nibble two clocks after go: we are one clock after go now
    checks++;
    if (nibble_o !== 4'h0) begin failures++; $display("output before start"); end
    @(negedge clk);
    for (int w = 0; w < eff; w++) begin
      logic [WORD_W-1:0] exp_w;
      exp_w = pattern(ADDR_W'(base + w));
      for (int n = 0; n < 32; n++) begin
        checks++;
        if (nibble_o !== exp_w[4*n +: 4]) begin
          failures++; $display("len %0d word %0d nibble %0d: %h expected %h", len, w, n, nibble_o, exp_w[4*n +: 4]);
        end
        if (w == eff - 1 && n == 31) begin
          checks++;
          if (!done_o) begin failures++; $display("done not with last nibble"); end
        end else if (done_o) begin failures++; $display("done too early"); end
        @(negedge clk);
      end
    end
    if (eff == 0) begin
      checks++;
      if (!done_o) begin failures++; $display("zero length not done"); end
    end
    repeat (3) begin
      checks++;
      if (nibble_o !== 4'h0 || !done_o) begin failures++; $display("not silent/done after end"); end
      @(negedge clk);
    end
  endtask

  initial begin
    sock_i.rvalid = 0; sock_i.rdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('h100, 1);
    run('h2000, 3);
    run('h30, MW);
    run('h7777, 0);
    run('h500, MW + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
