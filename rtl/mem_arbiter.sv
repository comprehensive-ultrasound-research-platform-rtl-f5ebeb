// mem_arbiter: shares the single DDR2 port between N sockets.
//
// A socket asks for the memory by raising req and keeps it high until it has
// finished its whole list of reads and writes. Arbitration happens only when
// the port is free (no owner and no read data outstanding): first every
// requester below the highest requesting priority is dropped, then among the
// rest the one whose previous grant lies furthest in the past wins. The
// history is an order matrix: older[i][j] is set when socket i was granted
// less recently than socket j. The grant is registered; the owner's commands
// are passed to the memory port and read data is returned to the owner only.
// When the owner drops req the port is released, so consecutive grants are
// separated by at least one free cycle.
// The free / priority / least-recent sequence follows the source's
// arbitration flow chart; the priority values and the reset history (lower
// index counts as older) are this design's choices.
// evt_prio_o / evt_lru_o pulse on grants where priority eliminated a
// requester, or where the history chose between several requesters.
module mem_arbiter
  import us_pkg::*;
#(
  parameter int N = 9,
  parameter logic [N-1:0][1:0] PRIO = {{(N-1){2'd1}}, 2'd2}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  sock_req_t [N-1:0]     sock_i,
  output sock_rsp_t [N-1:0]     sock_o,
  output logic                  m_cmd_valid,
  output logic                  m_we,
  output logic [ADDR_W-1:0]     m_addr,
  output logic [WORD_W-1:0]     m_wdata,
  input  logic                  m_cmd_ready,
  input  logic                  m_rvalid,
  input  logic [WORD_W-1:0]     m_rdata,
  input  logic                  m_idle,
  output logic                  evt_prio_o,
  output logic                  evt_lru_o
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic          owned;
  logic [IW-1:0] owner;
  logic [N-1:0]  older [N];

  logic [N-1:0]  reqs, cand;
  logic [1:0]    top_prio;
  logic          pick_ok;
  logic [IW-1:0] pick;
  logic          free;

  always_comb begin
    for (int i = 0; i < N; i++) reqs[i] = sock_i[i].req;
  end

  assign free = !owned && m_idle;

  // Step 1: keep only requesters of the highest requesting priority.
  always_comb begin
    top_prio = '0;
    for (int i = 0; i < N; i++)
      if (reqs[i] && PRIO[i] > top_prio) top_prio = PRIO[i];
    for (int i = 0; i < N; i++)
      cand[i] = reqs[i] && (PRIO[i] == top_prio);
  end

  // Step 2: the candidate that is older than every other candidate.
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int i = 0; i < N; i++) begin
      if (cand[i] && ((older[i] | ~cand | (N'(1) << i)) == '1)) begin
        pick_ok = 1'b1;
        pick    = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owned      <= 1'b0;
      owner      <= '0;
      evt_prio_o <= 1'b0;
      evt_lru_o  <= 1'b0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) older[i][j] <= (i < j);
    end else begin
      evt_prio_o <= 1'b0;
      evt_lru_o  <= 1'b0;
      if (owned) begin
        if (!reqs[owner]) owned <= 1'b0;
      end else if (free && pick_ok) begin
        owned      <= 1'b1;
        owner      <= pick;
        evt_prio_o <= (reqs != cand);
        evt_lru_o  <= ($countones(cand) > 1);
        for (int j = 0; j < N; j++) begin
          older[pick][j] <= 1'b0;           // winner becomes the most recent
          if (j != int'(pick)) older[j][pick] <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    m_cmd_valid = owned && sock_i[owner].req && sock_i[owner].cmd_valid;
    m_we        = sock_i[owner].we;
    m_addr      = sock_i[owner].addr;
    m_wdata     = sock_i[owner].wdata;
    for (int i = 0; i < N; i++) begin
      sock_o[i].gnt       = owned && (owner == IW'(i));
      sock_o[i].cmd_ready = sock_o[i].gnt && m_cmd_ready;
      sock_o[i].rvalid    = sock_o[i].gnt && m_rvalid;
      sock_o[i].rdata     = m_rdata;
    end
  end

  // Read data only arrives while some socket owns the port.
  a_rvalid_owned: assert property (@(posedge clk) disable iff (!rst_n)
    m_rvalid |-> owned);
  a_owner_range: assert property (@(posedge clk) disable iff (!rst_n)
    owned |-> (int'(owner) < N));
  // A grant is never taken away while the owner still requests.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (owned && reqs[owner]) |=> (owned && $stable(owner)));
endmodule
