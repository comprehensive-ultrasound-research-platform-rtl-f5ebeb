// pin_channel: waveform fetch and streaming for one output pin.
//
// Fetch: a 'fetch' pulse gives the DDR2 base address and length (in 128-bit
// words) of the pin's waveform. The channel then acts as a memory socket:
// it raises req, issues one read per accepted command while it holds the
// grant, writes returning words into a local buffer of MAX_WORDS words, and
// drops req once every word has come back; 'loaded_o' then goes high.
// A length of zero (unassigned pin) is loaded at once.
// Stream: a 'go' pulse starts the output. Every clock 'nibble_o' carries the
// next four samples (bit 0 is the earliest), taken from the buffer in order
// (sample k is bit k%128 of word k/128), until len*128 samples have been
// sent; 'done_o' then rises and stays high until the next fetch. Outside a
// transmission the nibble is zero. 'nibble_o' is registered: the first
// samples appear two clocks after 'go'.
// Fetching the waveform and parallelising it for the pin follow the source;
// buffering the whole waveform before transmission is this design's choice.
module pin_channel
  import us_pkg::*;
#(
  parameter int MAX_WORDS = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fetch,
  input  logic [ADDR_W-1:0] fetch_base,
  input  logic [LEN_W-1:0]  fetch_len,
  output sock_req_t         sock_o,
  input  sock_rsp_t         sock_i,
  output logic              loaded_o,
  input  logic              go,
  output logic [3:0]        nibble_o,
  output logic              done_o
);
  localparam int NIB_PER_WORD = WORD_W / 4;            // 32
  localparam int WI = $clog2(MAX_WORDS);
  localparam int NI = $clog2(NIB_PER_WORD);

  logic [WORD_W-1:0] buffer [MAX_WORDS];

  logic [ADDR_W-1:0] base;
  logic [LEN_W-1:0]  len;
  logic              fetching;
  logic [LEN_W-1:0]  issued, returned;

  logic              streaming;
  logic [WI-1:0]     rd_word;
  logic [NI-1:0]     rd_nib;

  // Lengths above the buffer size are clipped.
  logic [LEN_W-1:0]  fetch_len_c;
  assign fetch_len_c = (fetch_len > LEN_W'(MAX_WORDS)) ? LEN_W'(MAX_WORDS) : fetch_len;

  always_comb begin
    sock_o.req       = fetching;
    sock_o.cmd_valid = fetching && (issued != len);
    sock_o.we        = 1'b0;
    sock_o.addr      = base + ADDR_W'(issued);
    sock_o.wdata     = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base     <= '0;
      len      <= '0;
      fetching <= 1'b0;
      issued   <= '0;
      returned <= '0;
      loaded_o <= 1'b0;
    end else if (fetch) begin
      base     <= fetch_base;
      len      <= fetch_len_c;
      issued   <= '0;
      returned <= '0;
      fetching <= (fetch_len_c != 0);
      loaded_o <= (fetch_len_c == 0);
    end else if (fetching) begin
      if (sock_o.cmd_valid && sock_i.cmd_ready) issued <= issued + 1'b1;
      if (sock_i.rvalid) begin
        returned <= returned + 1'b1;
        if (returned + 1'b1 == len) begin
          fetching <= 1'b0;
          loaded_o <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fetching && sock_i.rvalid) buffer[WI'(returned)] <= sock_i.rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      streaming <= 1'b0;
      rd_word   <= '0;
      rd_nib    <= '0;
      nibble_o  <= '0;
      done_o    <= 1'b0;
    end else if (fetch) begin
      streaming <= 1'b0;
      nibble_o  <= '0;
      done_o    <= 1'b0;
    end else if (go && !streaming) begin
      rd_word  <= '0;
      rd_nib   <= '0;
      nibble_o <= '0;
      if (len == 0) begin
        done_o <= 1'b1;
      end else begin
        streaming <= 1'b1;
        done_o    <= 1'b0;
      end
    end else if (streaming) begin
      nibble_o <= buffer[rd_word][4*rd_nib +: 4];
      rd_nib   <= rd_nib + 1'b1;
      if (rd_nib == NI'(NIB_PER_WORD - 1)) begin
        rd_word <= rd_word + 1'b1;
        if (LEN_W'(rd_word) + 1'b1 == len) begin
          streaming <= 1'b0;
          done_o    <= 1'b1;
        end
      end
    end else begin
      nibble_o <= '0;
    end
  end

  a_read_while_loading_only: assert property (@(posedge clk) disable iff (!rst_n)
    sock_i.rvalid |-> fetching);
endmodule
