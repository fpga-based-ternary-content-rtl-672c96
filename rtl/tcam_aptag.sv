// tcam_aptag: APT Address Generator of one vertical partition.
//
// A 1's counter counts the 1 bits of the selected BPT row from bit 0 up to
// and including the bit named by the BPI; an adder adds that count to the
// row's Last Index. The sum is the APT address (APTA) of the sub-word: its
// rank among all sub-word values present in this partition. The structure
// (1's counter feeding an adder with the LI) follows the source design.
//
// The block is combinational. When en is low (some partition missed the
// key) apta_valid is low and apta is forced to zero; gating the address
// with the enable is this design's reading of the enable arrow into the
// APTAGs.
module tcam_aptag #(
  parameter int unsigned SUB_WIDTH = 4,  // w
  parameter int unsigned BPI_BITS  = 2,  // p
  localparam int unsigned ROW_BITS = 1 << BPI_BITS
) (
  input  logic [ROW_BITS-1:0]       row_bits,
  input  logic signed [SUB_WIDTH:0] row_li,
  input  logic [BPI_BITS-1:0]       bpi,
  input  logic                      en,
  output logic [SUB_WIDTH-1:0]      apta,
  output logic                      apta_valid
);

  logic [BPI_BITS:0]         ones;  // 0 .. 2^p
  logic signed [SUB_WIDTH:0] sum;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < ROW_BITS; i++)
      if (i <= 32'(bpi) && row_bits[i]) ones = ones + 1'b1;
    // the sum of a present value is its rank, 0 .. 2^w-1, so the sign bit
    // of the sum is not needed
    sum        = row_li + $signed({{(SUB_WIDTH - BPI_BITS){1'b0}}, ones});
    apta_valid = en;
    apta       = en ? sum[SUB_WIDTH-1:0] : '0;
  end

endmodule
