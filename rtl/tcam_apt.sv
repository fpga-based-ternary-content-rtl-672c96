// tcam_apt: Address Position Table of one vertical partition.
//
// The APT has 2^w rows of K bits, K being the number of stored words it
// covers. Row r belongs to the r-th sub-word value (in ascending order)
// that is present in this partition; bit j of the row is 1 when stored word
// j matches that sub-word value, don't care bits included. Rows are packed:
// only as many rows are used as there are distinct values present, which
// is why the address comes from the APTAG rather than from the sub-word.
//
// Read is combinational (asynchronous RAM) and returns all zeros when en is
// low, so a partition whose BPT missed the key contributes no match. Write
// is one row per clock. Size 2^w x K follows the source design; gating the
// output with en is this design's choice.
module tcam_apt #(
  parameter int unsigned SUB_WIDTH = 4,  // w
  parameter int unsigned DEPTH     = 4,  // K: stored words covered
  localparam int unsigned ROWS     = 1 << SUB_WIDTH
) (
  input  logic                  clk,
  // update port
  input  logic                  we,
  input  logic [SUB_WIDTH-1:0]  waddr,
  input  logic [DEPTH-1:0]      wdata,
  // search port
  input  logic [SUB_WIDTH-1:0]  raddr,
  input  logic                  en,
  output logic [DEPTH-1:0]      rdata
);

  logic [DEPTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = en ? mem[raddr] : '0;

endmodule
