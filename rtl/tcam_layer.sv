// tcam_layer: one layer of vertical partitions with its ANDing and LPE.
//
// The search word is split into NUM_VP slices of SUB_WIDTH bits; slice i
// (bits [i*w +: w]) goes to VP i. The BPT hits of all VPs are ANDed (1-bit
// ANDing) into an enable that lets the APTAGs and APTs produce their rows;
// the K-bit rows are ANDed (K-bit ANDing) into the match lines, one per
// stored word of this layer, and the local priority encoder (LPE) turns
// them into a potential match address. With a single layer this is the
// whole vertically partitioned TCAM; several layers, each holding a range
// of addresses, form the hybrid-partitioned variant.
//
// The search path is combinational from key to match/addr. The memories
// are written through the per-VP update ports, one row per clock. The clock
// also samples an assertion that no match is reported without all BPT hits.
module tcam_layer #(
  parameter int unsigned NUM_VP    = 2,  // k
  parameter int unsigned SUB_WIDTH = 4,  // w
  parameter int unsigned BPI_BITS  = 2,  // p
  parameter int unsigned DEPTH     = 4,  // K words in this layer
  localparam int unsigned WIDTH    = NUM_VP * SUB_WIDTH,
  localparam int unsigned ROW_BITS = 1 << BPI_BITS,
  localparam int unsigned RA_BITS  = SUB_WIDTH - BPI_BITS,
  localparam int unsigned ABITS    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                                    clk,
  input  logic [NUM_VP-1:0]                       bpt_we,
  input  logic [NUM_VP-1:0][RA_BITS-1:0]          bpt_waddr,
  input  logic [NUM_VP-1:0][ROW_BITS-1:0]         bpt_wbits,
  input  logic [NUM_VP-1:0][SUB_WIDTH:0]          bpt_wli,
  input  logic [NUM_VP-1:0]                       apt_we,
  input  logic [NUM_VP-1:0][SUB_WIDTH-1:0]        apt_waddr,
  input  logic [NUM_VP-1:0][DEPTH-1:0]            apt_wdata,
  input  logic [WIDTH-1:0]                        key,
  output logic [DEPTH-1:0]                        lines,
  output logic                                    match,
  output logic [ABITS-1:0]                        addr
);

  logic [NUM_VP-1:0]            hits;
  logic                         enable;
  logic [NUM_VP-1:0][DEPTH-1:0] rows;

  for (genvar i = 0; i < NUM_VP; i++) begin : g_vp
    tcam_vp #(.SUB_WIDTH(SUB_WIDTH), .BPI_BITS(BPI_BITS), .DEPTH(DEPTH)) u_vp (
      .clk,
      .bpt_we(bpt_we[i]), .bpt_waddr(bpt_waddr[i]), .bpt_wbits(bpt_wbits[i]),
      .bpt_wli($signed(bpt_wli[i])),
      .apt_we(apt_we[i]), .apt_waddr(apt_waddr[i]), .apt_wdata(apt_wdata[i]),
      .subword(key[i*SUB_WIDTH +: SUB_WIDTH]),
      .hit(hits[i]), .en(enable), .row(rows[i])
    );
  end

  tcam_and #(.N(NUM_VP), .WIDTH(1)) u_and_hit (
    .in(hits), .out(enable)
  );

  tcam_and #(.N(NUM_VP), .WIDTH(DEPTH)) u_and_row (
    .in(rows), .out(lines)
  );

  tcam_lpe #(.DEPTH(DEPTH)) u_lpe (
    .lines, .match, .addr
  );

  // A word can only match if every partition holds its slice of the key.
  a_match_needs_all_hits: assert property (@(posedge clk) match |-> enable);

endmodule
