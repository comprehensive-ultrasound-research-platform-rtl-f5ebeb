// tb_host_cmd: feeds command bytes straight into host_cmd (one byte every
// 12 clocks) and plays the memory socket and the UART transmitter. Checks
// that WRITE stores each 16-byte word at consecutive addresses with byte b
// in bits 8b+7..8b, that RECORD, ASSIGN and DELAY produce one table write
// with the right fields, that START gives one start pulse, that every
// command is acknowledged with opcode|0x80 in order (with the transmitter
// busy for a while after each byte), that unknown opcodes are ignored, and
// that a command sent while the last word of a WRITE still waits for the
// memory is carried out and acknowledged after the WRITE, and that a word
// completed while the previous one still waits for the memory raises
// overrun_o.
module tb_host_cmd;
  import us_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = '0;
  logic rx_valid = 0;
  sock_req_t sock_o;
  sock_rsp_t sock_i;
  logic rec_we, asg_we, dly_we, start_o, ack_send, overrun_o;
  logic ack_busy = 0;
  logic [ID_W-1:0] rec_id, asg_id;
  logic [ADDR_W-1:0] rec_base;
  logic [LEN_W-1:0] rec_len;
  logic [2:0] asg_pin, dly_pin;
  logic [DELAY_W-1:0] dly_val;
  logic [7:0] ack_data;
  int checks = 0, failures = 0;

  host_cmd #(.NUM_PINS(8)) dut (.*);
  always #5 clk = ~clk;

  // memory socket
  logic hold_off = 0;
  logic [WORD_W-1:0] mem [int];
  int nwrites = 0, nover = 0;
  always_comb begin
    sock_i.gnt       = sock_o.req && !hold_off;
    sock_i.cmd_ready = sock_o.req && !hold_off;
    sock_i.rvalid    = 1'b0;
    sock_i.rdata     = '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (sock_o.cmd_valid && sock_i.cmd_ready) begin
      if (!sock_o.we) begin failures++; $display("read from host socket"); end
      mem[int'(sock_o.addr)] = sock_o.wdata;
      nwrites++;
    end
    if (overrun_o) nover++;
  end

  // transmitter model and event log
  int busy_left = 0;
  logic [7:0] acks [$];
  string evts [$];
  always @(posedge clk) if (rst_n) begin
    if (busy_left > 0) busy_left--;
    ack_busy <= (busy_left > 0);
    if (ack_send) begin
      if (ack_busy) begin failures++; $display("ack sent while busy"); end
      acks.push_back(ack_data);
      busy_left = 30;
      ack_busy <= 1'b1;
    end
    if (rec_we)  evts.push_back($sformatf("R %0d %0h %0d", rec_id, rec_base, rec_len));
    if (asg_we)  evts.push_back($sformatf("A %0d %0d", asg_pin, asg_id));
    if (dly_we)  evts.push_back($sformatf("D %0d %0d", dly_pin, dly_val));
    if (start_o) evts.push_back("S");
  end

  task automatic send(input logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat (10) @(negedge clk);
  endtask

  task automatic expect_evt(input string e);
    checks++;
    if (evts.size() == 0) begin failures++; $display("missing event %s", e); end
    else begin
      string got;
      got = evts.pop_front();
      if (got != e) begin failures++; $display("event %s expected %s", got, e); end
    end
  endtask

  task automatic expect_ack(input logic [7:0] a);
    repeat (40) @(negedge clk);
    checks++;
    if (acks.size() == 0) begin failures++; $display("missing ack %h", a); end
    else begin
      logic [7:0] g;
      g = acks.pop_front();
      if (g != a) begin failures++; $display("ack %h expected %h", g, a); end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WORD_W-1:0] words [3];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // WRITE 3 words at 0x001230
    for (int w = 0; w < 3; w++) words[w] = {$urandom, $urandom, $urandom, $urandom};
    send(8'h01); send(8'h00); send(8'h12); send(8'h30); send(8'd3);
    for (int w = 0; w < 3; w++)
      for (int b = 0; b < 16; b++) send(words[w][8*b +: 8]);
    expect_ack(8'h81);
    for (int w = 0; w < 3; w++) begin
      checks++;
      if (!mem.exists('h1230 + w) || mem['h1230 + w] !== words[w]) begin
        failures++; $display("word %0d not stored", w);
      end
    end
    // RECORD id 7, base 0x001230, len 3
    send(8'h02); send(8'd7); send(8'h00); send(8'h12); send(8'h30); send(8'd3);
    expect_ack(8'h82); expect_evt("R 7 1230 3");
    // ASSIGN pin 5 <- id 7
    send(8'h03); send(8'd5); send(8'd7);
    expect_ack(8'h83); expect_evt("A 5 7");
    // DELAY pin 6 = 1330 ; pin 2 = 266000000 (1 s)
    send(8'h04); send(8'd6); send(8'h00); send(8'h00); send(8'h05); send(8'h32);
    expect_ack(8'h84); expect_evt("D 6 1330");
    send(8'h04); send(8'd2); send(8'h0F); send(8'hDA); send(8'hD6); send(8'h80);
    expect_ack(8'h84); expect_evt("D 2 266000000");
    // unknown opcode ignored, then START
    send(8'h42);
    send(8'h05);
    expect_ack(8'h85); expect_evt("S");
    // two STARTs back to back: both acknowledged, in order
    send(8'h05); send(8'h05);
    expect_ack(8'h85); expect_ack(8'h85); expect_evt("S"); expect_evt("S");
    // a command right behind a WRITE whose last word still waits for the
    // memory: both are carried out, and the WRITE is acknowledged first
    hold_off = 1;
    send(8'h01); send(8'h00); send(8'h00); send(8'h20); send(8'd1);
    for (int b = 0; b < 16; b++) send(8'(8'hA0 + b));
    send(8'h03); send(8'd1); send(8'd9);
    expect_evt("A 1 9");
    checks++;
    if (acks.size() != 0 || mem.exists('h20)) begin failures++; $display("WRITE finished while memory held off"); end
    hold_off = 0;
    expect_ack(8'h81); expect_ack(8'h83);
    checks++;
    if (!mem.exists('h20) || mem['h20][7:0] != 8'hA0 || mem['h20][127:120] != 8'hAF) begin
      failures++; $display("held word not stored");
    end
    // overrun: memory held off while two words arrive
    hold_off = 1;
    send(8'h01); send(8'h00); send(8'h00); send(8'h40); send(8'd2);
    for (int w = 0; w < 2; w++)
      for (int b = 0; b < 16; b++) send(8'(w * 16 + b));
    checks++;
    if (nover != 1) begin failures++; $display("overrun pulses %0d", nover); end
    hold_off = 0;
    expect_ack(8'h81);
    checks++;
    if (evts.size() != 0 || acks.size() != 0) begin failures++; $display("extra events or acks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
