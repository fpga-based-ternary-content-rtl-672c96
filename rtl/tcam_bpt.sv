// tcam_bpt: Bit Position Table of one vertical partition.
//
// The BPT holds one bit for every binary value a w-bit sub-word can take
// (2^w bits). A bit is 1 when at least one stored TCAM word, with its don't
// care bits expanded, has that value in this partition. The 2^w bits are
// grouped in 2^(w-p) rows of 2^p bits, and every row carries a Last Index
// (LI): the number of 1 bits in all lower rows, minus one, as a signed
// (w+1)-bit value. A row whose lower rows are empty therefore has LI = -1.
//
// Search: the high w-p bits of the sub-word (BPTA) select a row, the low p
// bits (BPI) select a bit in it. The row, its LI, the BPI and the selected
// bit (hit) are driven combinationally, as from an asynchronous-read RAM.
// Update: one full row (bits and LI) is written per clock when we is high.
//
// Row grouping, LI width and the -1 starting value follow the source design.
// The memory has no reset; the mapping controller rewrites every row before
// the table is used.
module tcam_bpt #(
  parameter int unsigned SUB_WIDTH = 4,  // w
  parameter int unsigned BPI_BITS  = 2,  // p
  localparam int unsigned ROW_BITS = 1 << BPI_BITS,
  localparam int unsigned ROWS     = 1 << (SUB_WIDTH - BPI_BITS),
  localparam int unsigned RA_BITS  = SUB_WIDTH - BPI_BITS
) (
  input  logic                        clk,
  // update port
  input  logic                        we,
  input  logic [RA_BITS-1:0]          waddr,
  input  logic [ROW_BITS-1:0]         wbits,
  input  logic signed [SUB_WIDTH:0]   wli,
  // search port
  input  logic [SUB_WIDTH-1:0]        subword,
  output logic [ROW_BITS-1:0]         row_bits,
  output logic signed [SUB_WIDTH:0]   row_li,
  output logic [BPI_BITS-1:0]         bpi,
  output logic                        hit
);

  logic [ROW_BITS-1:0]        bits_mem [ROWS];
  logic signed [SUB_WIDTH:0]  li_mem   [ROWS];

  always_ff @(posedge clk) begin
    if (we) begin
      bits_mem[waddr] <= wbits;
      li_mem[waddr]   <= wli;
    end
  end

  logic [RA_BITS-1:0] bpta;
  always_comb begin
    bpta     = subword[SUB_WIDTH-1:BPI_BITS];
    bpi      = subword[BPI_BITS-1:0];
    row_bits = bits_mem[bpta];
    row_li   = li_mem[bpta];
    hit      = row_bits[bpi];
  end

endmodule
