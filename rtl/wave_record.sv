// wave_record: record of where each stored waveform lives in DDR2.
//
// Holds NUM_WAVES entries of {identifying number, base word address, length
// in words}. A write with an id already present overwrites that entry;
// otherwise it takes the lowest free entry, and if none is free the write is
// dropped and 'full_o' pulses. The lookup port compares 'lk_id' with every
// valid entry in parallel and answers in the same cycle (combinational).
// Keeping the location together with an id follows the source; the table
// size and the overwrite rule are this design's choices.
module wave_record
  import us_pkg::*;
#(
  parameter int NUM_WAVES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [ID_W-1:0]   wr_id,
  input  logic [ADDR_W-1:0] wr_base,
  input  logic [LEN_W-1:0]  wr_len,
  output logic              full_o,
  input  logic [ID_W-1:0]   lk_id,
  output logic              lk_hit,
  output logic [ADDR_W-1:0] lk_base,
  output logic [LEN_W-1:0]  lk_len
);
  typedef struct packed {
    logic              valid;
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] base;
    logic [LEN_W-1:0]  len;
  } entry_t;

  localparam int IW = (NUM_WAVES > 1) ? $clog2(NUM_WAVES) : 1;

  entry_t        tbl [NUM_WAVES];
  logic          wr_match, wr_free;
  logic [IW-1:0] wr_match_idx, wr_free_idx;

  // Where a write goes: the entry already holding the id, else the lowest free.
  always_comb begin
    wr_match     = 1'b0;
    wr_match_idx = '0;
    wr_free      = 1'b0;
    wr_free_idx  = '0;
    for (int i = NUM_WAVES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].id == wr_id) begin
        wr_match     = 1'b1;
        wr_match_idx = IW'(i);
      end
      if (!tbl[i].valid) begin
        wr_free     = 1'b1;
        wr_free_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_WAVES; i++) tbl[i] <= '0;
      full_o <= 1'b0;
    end else begin
      full_o <= 1'b0;
      if (we) begin
        if (wr_match)
          tbl[wr_match_idx] <= '{valid: 1'b1, id: wr_id, base: wr_base, len: wr_len};
        else if (wr_free)
          tbl[wr_free_idx]  <= '{valid: 1'b1, id: wr_id, base: wr_base, len: wr_len};
        else
          full_o <= 1'b1;
      end
    end
  end

  always_comb begin
    lk_hit  = 1'b0;
    lk_base = '0;
    lk_len  = '0;
    for (int i = 0; i < NUM_WAVES; i++) begin
      if (!lk_hit && tbl[i].valid && tbl[i].id == lk_id) begin
        lk_hit  = 1'b1;
        lk_base = tbl[i].base;
        lk_len  = tbl[i].len;
      end
    end
  end
endmodule
