// ddr2_user_if: simple word-wide port in front of the MIG DDR2 controller.
//
// The rest of the design sees one command port: a read or a write of one
// 128-bit word, accepted in a cycle where cmd_valid and cmd_ready are high.
// cmd_ready is high when the memory has finished its initialisation
// (phy_init_done) and neither the MIG address FIFO nor its write-data FIFO is
// almost full. An accepted command is written into the MIG FIFOs on the next
// clock (app_af_cmd 3'b000 = write, 3'b001 = read; a write also pushes its
// data word with all mask bits clear). Read data from the MIG is registered
// and returned in order on rvalid/rdata. 'idle' is low while any read is
// still outstanding. Having such an interface to the MIG follows the source;
// its signals and the one-word-per-command mapping are this design's choice.
module ddr2_user_if
  import us_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // command port
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic              rvalid,
  output logic [WORD_W-1:0] rdata,
  output logic              idle,
  // MIG user interface
  input  logic              phy_init_done,
  input  logic              app_af_afull,
  input  logic              app_wdf_afull,
  output logic              app_af_wren,
  output logic [2:0]        app_af_cmd,
  output logic [30:0]       app_af_addr,
  output logic              app_wdf_wren,
  output logic [WORD_W-1:0] app_wdf_data,
  output logic [WORD_W/8-1:0] app_wdf_mask_data,
  input  logic              rd_data_valid,
  input  logic [WORD_W-1:0] rd_data_fifo_out
);
  logic [7:0] outstanding;
  logic       rd_issue;

  assign cmd_ready = phy_init_done && !app_af_afull && !app_wdf_afull;
  assign rd_issue  = cmd_valid && cmd_ready && !we;
  assign idle      = (outstanding == 0) && !rvalid;
  assign app_wdf_mask_data = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      app_af_wren  <= 1'b0;
      app_af_cmd   <= 3'b000;
      app_af_addr  <= '0;
      app_wdf_wren <= 1'b0;
      app_wdf_data <= '0;
      rvalid       <= 1'b0;
      rdata        <= '0;
      outstanding  <= '0;
    end else begin
      app_af_wren  <= cmd_valid && cmd_ready;
      app_wdf_wren <= cmd_valid && cmd_ready && we;
      if (cmd_valid && cmd_ready) begin
        app_af_cmd  <= we ? 3'b000 : 3'b001;
        app_af_addr <= 31'(addr);
        if (we) app_wdf_data <= wdata;
      end
      rvalid <= rd_data_valid;
      if (rd_data_valid) rdata <= rd_data_fifo_out;
      outstanding <= outstanding + 8'(rd_issue) - 8'(rd_data_valid);
    end
  end

  a_no_spurious_read: assert property (@(posedge clk) disable iff (!rst_n)
    rd_data_valid |-> (outstanding != 0 || rd_issue));
endmodule
