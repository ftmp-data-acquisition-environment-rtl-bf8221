// das_buffer: DAS local memory buffer and its address control.
//
// DEPTH x 16 memory (8192 words by default, the document's present size;
// the document allows growth to 64K words). Acquisition writes sequentially
// from address 0; the write address is compared with the user word count and
// `full` is raised when they are equal, which ends acquisition. A count
// above DEPTH is clamped to DEPTH (this design's choice). The down-load reads
// sequentially from address 0 through a registered read port: `rdata` shows
// the word at the read address one clock after the address changes; `rd_next`
// advances the address and `rd_empty` says every stored word has been read.
// `clr` restarts both addresses at 0; memory contents are not cleared.
module das_buffer
  import das_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       wr,
  input  das_word_t  wdata,
  input  logic [15:0] count,
  output logic       full,
  input  logic       rd_next,
  output das_word_t  rdata,
  output logic       rd_empty
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;  // memory index
  localparam int unsigned AW = $clog2(DEPTH + 1);                // 0..DEPTH

  das_word_t   mem [DEPTH];
  logic [AW-1:0] wr_addr, rd_addr, limit;

  always_comb begin
    if (32'(count) > DEPTH) limit = AW'(DEPTH);
    else                    limit = AW'(count);
  end

  assign full     = (wr_addr == limit);
  assign rd_empty = (rd_addr == wr_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr <= '0;
      rd_addr <= '0;
    end else if (clr) begin
      wr_addr <= '0;
      rd_addr <= '0;
    end else begin
      if (wr && !full)          wr_addr <= wr_addr + 1'b1;
      if (rd_next && !rd_empty) rd_addr <= rd_addr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr && !full && !clr) mem[IW'(wr_addr)] <= wdata;
    rdata <= mem[IW'(rd_addr)];
  end
endmodule
