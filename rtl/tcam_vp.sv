// tcam_vp: one vertical partition of the VP SRAM-based TCAM.
//
// A VP handles one w-bit slice of the search word. Its BPT tells whether
// the slice value occurs in this column of the stored table (hit). The
// hits of all VPs are ANDed outside this block; the result comes back as
// en. With en high the APTAG turns the BPT row, its Last Index and the BPI
// into an APT address, and the APT returns the K-bit row of stored words
// that match this slice. With en low the row is all zeros.
//
// The whole search path is combinational. The BPT and APT update ports are
// driven by the mapping controller, one row per clock each. The split into
// BPT, APTAG and APT follows the source design.
module tcam_vp #(
  parameter int unsigned SUB_WIDTH = 4,  // w
  parameter int unsigned BPI_BITS  = 2,  // p
  parameter int unsigned DEPTH     = 4,  // K
  localparam int unsigned ROW_BITS = 1 << BPI_BITS,
  localparam int unsigned RA_BITS  = SUB_WIDTH - BPI_BITS
) (
  input  logic                      clk,
  // BPT update
  input  logic                      bpt_we,
  input  logic [RA_BITS-1:0]        bpt_waddr,
  input  logic [ROW_BITS-1:0]       bpt_wbits,
  input  logic signed [SUB_WIDTH:0] bpt_wli,
  // APT update
  input  logic                      apt_we,
  input  logic [SUB_WIDTH-1:0]      apt_waddr,
  input  logic [DEPTH-1:0]          apt_wdata,
  // search
  input  logic [SUB_WIDTH-1:0]      subword,
  output logic                      hit,
  input  logic                      en,
  output logic [DEPTH-1:0]          row
);

  logic [ROW_BITS-1:0]       row_bits;
  logic signed [SUB_WIDTH:0] row_li;
  logic [BPI_BITS-1:0]       bpi;
  logic [SUB_WIDTH-1:0]      apta;
  logic                      apta_valid;

  tcam_bpt #(.SUB_WIDTH(SUB_WIDTH), .BPI_BITS(BPI_BITS)) u_bpt (
    .clk, .we(bpt_we), .waddr(bpt_waddr), .wbits(bpt_wbits), .wli(bpt_wli),
    .subword, .row_bits, .row_li, .bpi, .hit
  );

  tcam_aptag #(.SUB_WIDTH(SUB_WIDTH), .BPI_BITS(BPI_BITS)) u_aptag (
    .row_bits, .row_li, .bpi, .en, .apta, .apta_valid
  );

  tcam_apt #(.SUB_WIDTH(SUB_WIDTH), .DEPTH(DEPTH)) u_apt (
    .clk, .we(apt_we), .waddr(apt_waddr), .wdata(apt_wdata),
    .raddr(apta), .en(apta_valid), .rdata(row)
  );

endmodule
