// tb_mem_arbiter: four sockets (priorities 1, 1, 2, 1) request the memory at
// random times, each for a random list of 1..4 reads, and hold req until all
// their data has returned. A small memory model in the testbench accepts
// commands with random back-pressure and returns data (derived from the
// address) three clocks later. Checks: at most one grant at a time; a grant
// is never given while another socket owns the port or reads are
// outstanding; every new grant goes to the requester a reference model
// picks (highest priority first, then the least recently granted, with the
// lower index counting as older at reset); every read returns the right
// word to the owner; both the priority and the history rule were exercised.
module tb_mem_arbiter;
  import us_pkg::*;
  localparam int N = 4;
  localparam logic [N-1:0][1:0] PRIO = {2'd1, 2'd2, 2'd1, 2'd1};
  logic clk = 0, rst_n = 0;
  sock_req_t [N-1:0] sock_i;
  sock_rsp_t [N-1:0] sock_o;
  logic m_cmd_valid, m_we, m_cmd_ready, m_rvalid, m_idle, evt_prio_o, evt_lru_o;
  logic [ADDR_W-1:0] m_addr;
  logic [WORD_W-1:0] m_wdata, m_rdata;
  int checks = 0, failures = 0;
  int n_prio = 0, n_lru = 0, grants [N];

  mem_arbiter #(.N(N), .PRIO(PRIO)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [WORD_W-1:0] pattern(input logic [ADDR_W-1:0] a);
    return {4{8'hC3, a}};
  endfunction

  // memory model
  logic [ADDR_W-1:0] pipe [$];
  int unsigned due [$];
  int unsigned cyc = 0;
  always_comb m_idle = (pipe.size() == 0) && !m_rvalid;
  always @(posedge clk) begin
    cyc++;
    m_cmd_ready <= ($urandom_range(0, 2) != 0);
    m_rvalid <= 1'b0;
    if (m_cmd_valid && m_cmd_ready) begin pipe.push_back(m_addr); due.push_back(cyc + 3); end
    if (due.size() > 0 && due[0] <= cyc) begin
      void'(due.pop_front());
      m_rvalid <= 1'b1;
      m_rdata  <= pattern(pipe.pop_front());
    end
  end

  // sockets
  for (genvar s = 0; s < N; s++) begin : g_s
    int issued, returned, total;
    initial begin
      sock_i[s] = '0;
      issued = 0; returned = 0; total = 0;
    end
    always @(posedge clk) begin
      if (!sock_i[s].req) begin
        if (rst_n && $urandom_range(0, 9) == 0) begin
          total = $urandom_range(1, 4); issued = 0; returned = 0;
          sock_i[s].req <= 1'b1;
          sock_i[s].cmd_valid <= 1'b1;
          sock_i[s].addr <= ADDR_W'({s[3:0], 20'($urandom_range(0, 9999))});
        end
      end else begin
        if (sock_o[s].rvalid) begin
          checks++;
          returned++;
          if (!sock_o[s].gnt) begin failures++; $display("socket %0d: data without grant", s); end
          if (sock_o[s].rdata !== pattern(ADDR_W'({s[3:0], 20'(sock_o[s].rdata[19:0])}))
              || sock_o[s].rdata[23:20] != s[3:0]) begin
            failures++; $display("socket %0d: wrong data %h", s, sock_o[s].rdata);
          end
        end
        if (sock_i[s].cmd_valid && sock_o[s].cmd_ready) begin
          issued++;
          sock_i[s].addr <= sock_i[s].addr + 1'b1;
          if (issued == total) sock_i[s].cmd_valid <= 1'b0;
        end
        if (returned == total && issued == total) begin
          sock_i[s].req <= 1'b0;
        end
      end
    end
  end

  // reference model of the grant decision
  logic [N-1:0] gnt_v, gnt_prev, req_prev;
  bit           free_prev;
  int           last [N];
  always_comb for (int i = 0; i < N; i++) gnt_v[i] = sock_o[i].gnt;
  initial for (int i = 0; i < N; i++) last[i] = i - N;

  always @(posedge clk) begin
    if (rst_n) begin
      if (evt_prio_o) n_prio++;
      if (evt_lru_o)  n_lru++;
      checks++;
      if (!$onehot0(gnt_v)) begin failures++; $display("several grants %b", gnt_v); end
      if (gnt_v != 0 && gnt_prev == 0) begin
        int best, exp_s;
        best = 0; exp_s = -1;
        for (int i = 0; i < N; i++) if (req_prev[i] && PRIO[i] > best) best = PRIO[i];
        for (int i = 0; i < N; i++)
          if (req_prev[i] && PRIO[i] == best && (exp_s < 0 || last[i] < last[exp_s])) exp_s = i;
        checks++;
        if (!free_prev) begin failures++; $display("grant while memory busy"); end
        if (exp_s < 0 || !gnt_v[exp_s]) begin
          failures++; $display("grant %b, expected socket %0d (requests %b)", gnt_v, exp_s, req_prev);
        end
        for (int i = 0; i < N; i++) if (gnt_v[i]) begin last[i] = int'(cyc); grants[i]++; end
      end
      if (gnt_v != 0 && gnt_prev != 0 && gnt_v != gnt_prev) begin
        failures++; $display("grant moved without release");
      end
      gnt_prev  <= gnt_v;
      req_prev  <= {sock_i[3].req, sock_i[2].req, sock_i[1].req, sock_i[0].req};
      free_prev <= (gnt_v == 0) && m_idle;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gnt_prev = '0; req_prev = '0; free_prev = 0;
    for (int i = 0; i < N; i++) grants[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (grants[i] == 0) begin failures++; $display("socket %0d starved", i); end
    end
    checks++;
    if (n_prio == 0 || n_lru == 0) begin failures++; $display("priority %0d / history %0d decisions", n_prio, n_lru); end
    $display("grants %0d %0d %0d %0d, priority decisions %0d, history decisions %0d",
             grants[0], grants[1], grants[2], grants[3], n_prio, n_lru);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
