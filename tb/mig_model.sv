// mig_model: behavioural stand-in for the MIG DDR2 controller and the DDR2
// memory, seen through the MIG user interface. Not synthesizable.
// phy_init_done rises INIT_CYCLES clocks after reset. Commands written into
// the address FIFO (app_af_cmd 000 = write, 001 = read) are served in order;
// a write takes the oldest word of the write-data FIFO. Read data returns on
// rd_data_valid / rd_data_fifo_out READ_LATENCY clocks after the command.
// When THROTTLE is non-zero, app_af_afull is raised on pseudo-random clocks
// (about one in THROTTLE) to exercise back-pressure; when ACCEPT_ONE_IN is
// non-zero instead, app_af_afull is low on only about one clock in
// ACCEPT_ONE_IN (a slow, busy memory). Words never written read
// as a pattern derived from the address. poke()/peek() give the testbench
// direct access to the storage.
module mig_model #(
  parameter int INIT_CYCLES  = 20,
  parameter int READ_LATENCY = 12,
  parameter int THROTTLE     = 0,
  parameter int ACCEPT_ONE_IN = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         phy_init_done,
  output logic         app_af_afull,
  output logic         app_wdf_afull,
  input  logic         app_af_wren,
  input  logic [2:0]   app_af_cmd,
  input  logic [30:0]  app_af_addr,
  input  logic         app_wdf_wren,
  input  logic [127:0] app_wdf_data,
  input  logic [15:0]  app_wdf_mask_data,
  output logic         rd_data_valid,
  output logic [127:0] rd_data_fifo_out
);
  logic [127:0] mem [int unsigned];
  logic [127:0] wdf [$];
  typedef struct { int unsigned due; logic [127:0] data; } rd_t;
  rd_t rdq [$];
  int unsigned cyc;
  int init_cnt;
  int n_writes = 0, n_reads = 0, n_afull = 0;

  function automatic logic [127:0] peek(input int unsigned a);
    if (mem.exists(a)) return mem[a];
    return {4{a ^ 32'h5A5A_0000}};
  endfunction

  function automatic void poke(input int unsigned a, input logic [127:0] d);
    mem[a] = d;
  endfunction

  assign app_wdf_afull = 1'b0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phy_init_done    <= 1'b0;
      app_af_afull     <= 1'b0;
      rd_data_valid    <= 1'b0;
      rd_data_fifo_out <= '0;
      init_cnt = 0;
      cyc = 0;
      wdf.delete();
      rdq.delete();
    end else begin
      cyc++;
      if (init_cnt < INIT_CYCLES) init_cnt++;
      phy_init_done <= (init_cnt >= INIT_CYCLES);
      if (ACCEPT_ONE_IN != 0)
        app_af_afull <= ($urandom_range(0, ACCEPT_ONE_IN - 1) != 0);
      else
        app_af_afull <= (THROTTLE != 0) && ($urandom_range(0, THROTTLE - 1) == 0);
      if (app_af_afull) n_afull++;
      if (app_wdf_wren) wdf.push_back(app_wdf_data);
      if (app_af_wren) begin
        if (app_af_cmd == 3'b000) begin
          if (wdf.size() == 0) $display("mig_model: write without data");
          else mem[32'(app_af_addr)] = wdf.pop_front();
          n_writes++;
        end else if (app_af_cmd == 3'b001) begin
          rd_t r;
          r.due  = cyc + READ_LATENCY;
          r.data = peek(32'(app_af_addr));
          rdq.push_back(r);
          n_reads++;
        end
      end
      rd_data_valid <= 1'b0;
      if (rdq.size() > 0 && rdq[0].due <= cyc) begin
        rd_t r;
        r = rdq.pop_front();
        rd_data_valid    <= 1'b1;
        rd_data_fifo_out <= r.data;
      end
    end
  end
endmodule
