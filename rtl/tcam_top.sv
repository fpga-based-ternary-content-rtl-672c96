// tcam_top: SRAM-based ternary CAM built from vertical partitions.
//
// A TCAM of DEPTH words of WIDTH bits is emulated with RAM. The stored
// words are split column-wise into NUM_VP vertical partitions. In each
// partition a Bit Position Table (BPT) records which sub-word values occur,
// an APT address generator (APTAG) ranks the searched value among them,
// and an Address Position Table (APT) returns which stored words contain
// it. ANDing the BPT hits decides whether the search can match at all;
// ANDing the APT rows gives the matching words; a priority encoder returns
// the lowest matching address.
//
// With NUM_LAYERS = 1 (the default) this is the vertically partitioned
// TCAM, the organisation the design is built around. NUM_LAYERS > 1 splits
// the words into horizontal layers of DEPTH/NUM_LAYERS words, each with its
// own VPs, ANDing and local priority encoder, and a global priority encoder
// combines them: the hybrid-partitioned variant.
//
// Interface and timing:
//  - wr_*: write one ternary entry (value, mask bit 1 = don't care, valid)
//    into the stored table; accepted on a clock edge when wr_ready is high.
//  - map_start: rebuild all BPTs and APTs from the table. busy is high for
//    exactly 2^(WIDTH/NUM_VP) clocks; map_done pulses for one clock after.
//    A pass also runs by itself after reset, leaving an empty TCAM.
//  - key -> match, match_addr, match_lines: combinational search, no clock
//    cycles of latency; valid whenever busy is low.
// Defaults are the 8x4 example with two VPs; the 4-word depth and the
// 2-bit BPI are this design's reading, see tcam_pkg.
module tcam_top
  import tcam_pkg::*;
#(
  parameter int unsigned WIDTH      = TCAM_WIDTH,
  parameter int unsigned DEPTH      = TCAM_DEPTH,
  parameter int unsigned VPS        = NUM_VP,
  parameter int unsigned PBITS      = BPI_BITS,
  parameter int unsigned LAYERS     = NUM_LAYERS,
  localparam int unsigned SUB_WIDTH = WIDTH / VPS,
  localparam int unsigned LDEPTH    = DEPTH / LAYERS,
  localparam int unsigned ROW_BITS  = 1 << PBITS,
  localparam int unsigned RA_BITS   = SUB_WIDTH - PBITS,
  localparam int unsigned ABITS     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LBITS     = (LDEPTH > 1) ? $clog2(LDEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  output logic              wr_ready,
  input  logic [ABITS-1:0]  wr_addr,
  input  logic [WIDTH-1:0]  wr_value,
  input  logic [WIDTH-1:0]  wr_mask,
  input  logic              wr_valid,
  input  logic              map_start,
  output logic              busy,
  output logic              map_done,
  input  logic [WIDTH-1:0]  key,
  output logic              match,
  output logic [ABITS-1:0]  match_addr,
  output logic [DEPTH-1:0]  match_lines
);

  logic [LAYERS-1:0][VPS-1:0]                bpt_we;
  logic [LAYERS-1:0][VPS-1:0][RA_BITS-1:0]   bpt_waddr;
  logic [LAYERS-1:0][VPS-1:0][ROW_BITS-1:0]  bpt_wbits;
  logic [LAYERS-1:0][VPS-1:0][SUB_WIDTH:0]   bpt_wli;
  logic [LAYERS-1:0][VPS-1:0]                apt_we;
  logic [LAYERS-1:0][VPS-1:0][SUB_WIDTH-1:0] apt_waddr;
  logic [LAYERS-1:0][VPS-1:0][LDEPTH-1:0]    apt_wdata;

  logic [LAYERS-1:0]                         layer_match;
  logic [LAYERS-1:0][LBITS-1:0]              layer_addr;
  logic [LAYERS-1:0][LDEPTH-1:0]             layer_lines;

  tcam_mapper #(
    .WIDTH(WIDTH), .DEPTH(DEPTH), .NUM_VP(VPS), .BPI_BITS(PBITS), .NUM_LAYERS(LAYERS)
  ) u_mapper (
    .clk, .rst_n,
    .wr_en, .wr_ready, .wr_addr, .wr_value, .wr_mask, .wr_valid,
    .start(map_start), .busy, .done(map_done),
    .bpt_we, .bpt_waddr, .bpt_wbits, .bpt_wli,
    .apt_we, .apt_waddr, .apt_wdata
  );

  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    tcam_layer #(
      .NUM_VP(VPS), .SUB_WIDTH(SUB_WIDTH), .BPI_BITS(PBITS), .DEPTH(LDEPTH)
    ) u_layer (
      .clk,
      .bpt_we(bpt_we[l]), .bpt_waddr(bpt_waddr[l]), .bpt_wbits(bpt_wbits[l]),
      .bpt_wli(bpt_wli[l]),
      .apt_we(apt_we[l]), .apt_waddr(apt_waddr[l]), .apt_wdata(apt_wdata[l]),
      .key, .lines(layer_lines[l]), .match(layer_match[l]), .addr(layer_addr[l])
    );
  end

  tcam_gpe #(.NUM_LAYERS(LAYERS), .DEPTH(LDEPTH)) u_gpe (
    .layer_match, .layer_addr, .match, .addr(match_addr)
  );

  assign match_lines = layer_lines;

endmodule
