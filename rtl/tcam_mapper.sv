// tcam_mapper: stored-word table and data mapping controller.
//
// The mapper keeps the ternary table itself: DEPTH entries, each a WIDTH-bit
// value, a WIDTH-bit care mask (mask bit 1 = don't care, X) and a valid
// flag. Entries are written through a simple port (wr_en/wr_ready); an
// invalid entry matches nothing.
//
// A mapping pass turns the table into BPT and APT contents, in every VP of
// every layer at once. It steps v through all 2^w values of a sub-word, one
// value per clock. For each (layer, VP) it compares v with the matching
// slice of every entry of that layer, giving a match vector. If any entry
// matches, v is present: the vector is written to the APT at the next free
// row (rows are used in ascending order of v) and v's bit in the BPT row
// being built is set. When v reaches the last bit of a BPT row, the row is
// written together with its Last Index, which is the number of present
// values in all lower rows minus one (so -1 for a row with nothing below).
// A pass takes exactly 2^w clocks, with busy high throughout; search
// results are not meaningful while busy is high.
//
// The mapping rules (expand don't cares, set present bit positions, store
// original addresses in the APT, set each row's LI, starting from -1)
// follow the source design. Doing the mapping in hardware, keeping the
// table here, one value per clock, the write port and the automatic pass
// after reset (which clears every BPT) are this design's own choices.
//
// Lint notes that rst_n is used both as an asynchronous reset and in the
// disable condition of the assertion below; that is intended.
module tcam_mapper #(
  parameter int unsigned WIDTH      = 8,  // W
  parameter int unsigned DEPTH      = 4,  // K, all layers together
  parameter int unsigned NUM_VP     = 2,  // k
  parameter int unsigned BPI_BITS   = 2,  // p
  parameter int unsigned NUM_LAYERS = 1,
  localparam int unsigned SUB_WIDTH = WIDTH / NUM_VP,
  localparam int unsigned LDEPTH    = DEPTH / NUM_LAYERS,
  localparam int unsigned ROW_BITS  = 1 << BPI_BITS,
  localparam int unsigned RA_BITS   = SUB_WIDTH - BPI_BITS,
  localparam int unsigned ABITS     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                                                   clk,
  input  logic                                                   rst_n,
  // table write port
  input  logic                                                   wr_en,
  output logic                                                   wr_ready,
  input  logic [ABITS-1:0]                                       wr_addr,
  input  logic [WIDTH-1:0]                                       wr_value,
  input  logic [WIDTH-1:0]                                       wr_mask,
  input  logic                                                   wr_valid,
  // mapping control
  input  logic                                                   start,
  output logic                                                   busy,
  output logic                                                   done,
  // memory update ports, per layer and VP
  output logic [NUM_LAYERS-1:0][NUM_VP-1:0]                      bpt_we,
  output logic [NUM_LAYERS-1:0][NUM_VP-1:0][RA_BITS-1:0]         bpt_waddr,
  output logic [NUM_LAYERS-1:0][NUM_VP-1:0][ROW_BITS-1:0]        bpt_wbits,
  output logic [NUM_LAYERS-1:0][NUM_VP-1:0][SUB_WIDTH:0]         bpt_wli,
  output logic [NUM_LAYERS-1:0][NUM_VP-1:0]                      apt_we,
  output logic [NUM_LAYERS-1:0][NUM_VP-1:0][SUB_WIDTH-1:0]       apt_waddr,
  output logic [NUM_LAYERS-1:0][NUM_VP-1:0][LDEPTH-1:0]          apt_wdata
);

  typedef enum logic {S_IDLE, S_MAP} state_t;

  state_t                state;
  logic [WIDTH-1:0]      tbl_value [DEPTH];
  logic [WIDTH-1:0]      tbl_mask  [DEPTH];
  logic [DEPTH-1:0]      tbl_valid;
  logic [SUB_WIDTH-1:0]  v;

  // per layer and VP: present values counted so far, at the start of the
  // current BPT row, and the BPT row being built
  logic [NUM_LAYERS-1:0][NUM_VP-1:0][SUB_WIDTH:0]  cnt;
  logic [NUM_LAYERS-1:0][NUM_VP-1:0][SUB_WIDTH:0]  row_base;
  logic [NUM_LAYERS-1:0][NUM_VP-1:0][ROW_BITS-1:0] row_acc;

  logic [NUM_LAYERS-1:0][NUM_VP-1:0][LDEPTH-1:0]   vec;
  logic [NUM_LAYERS-1:0][NUM_VP-1:0]               present;
  logic [BPI_BITS-1:0]                             bpi;
  logic                                            row_end;
  logic                                            last;

  assign busy     = (state == S_MAP);
  assign wr_ready = !busy;
  assign bpi      = v[BPI_BITS-1:0];
  assign row_end  = &bpi;
  assign last     = &v;

  // Compare v with every entry's slice: one match vector per layer and VP.
  always_comb begin
    for (int unsigned l = 0; l < NUM_LAYERS; l++) begin
      for (int unsigned n = 0; n < NUM_VP; n++) begin
        for (int unsigned j = 0; j < LDEPTH; j++) begin
          vec[l][n][j] = tbl_valid[l*LDEPTH + j] &&
            (((v ^ tbl_value[l*LDEPTH + j][n*SUB_WIDTH +: SUB_WIDTH]) &
              ~tbl_mask[l*LDEPTH + j][n*SUB_WIDTH +: SUB_WIDTH]) == '0);
        end
        present[l][n] = |vec[l][n];
      end
    end
  end

  // Memory writes for the value v of this cycle.
  always_comb begin
    for (int unsigned l = 0; l < NUM_LAYERS; l++) begin
      for (int unsigned n = 0; n < NUM_VP; n++) begin
        apt_we[l][n]    = busy && present[l][n];
        apt_waddr[l][n] = cnt[l][n][SUB_WIDTH-1:0];
        apt_wdata[l][n] = vec[l][n];
        bpt_we[l][n]    = busy && row_end;
        bpt_waddr[l][n] = v[SUB_WIDTH-1:BPI_BITS];
        bpt_wbits[l][n] = row_acc[l][n] | (ROW_BITS'(present[l][n]) << bpi);
        bpt_wli[l][n]   = row_base[l][n] - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_MAP;   // clear the BPTs after reset
      v         <= '0;
      cnt       <= '0;
      row_base  <= '0;
      row_acc   <= '0;
      tbl_valid <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        if (wr_en) begin
          tbl_value[wr_addr] <= wr_value;
          tbl_mask[wr_addr]  <= wr_mask;
          tbl_valid[wr_addr] <= wr_valid;
        end
        if (start) begin
          state    <= S_MAP;
          v        <= '0;
          cnt      <= '0;
          row_base <= '0;
          row_acc  <= '0;
        end
      end else begin
        for (int unsigned l = 0; l < NUM_LAYERS; l++) begin
          for (int unsigned n = 0; n < NUM_VP; n++) begin
            cnt[l][n] <= cnt[l][n] + (SUB_WIDTH+1)'(present[l][n]);
            if (row_end) begin
              row_acc[l][n]  <= '0;
              row_base[l][n] <= cnt[l][n] + (SUB_WIDTH+1)'(present[l][n]);
            end else begin
              row_acc[l][n]  <= row_acc[l][n] | (ROW_BITS'(present[l][n]) << bpi);
            end
          end
        end
        v <= v + 1'b1;
        if (last) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
      end
    end
  end

  // A sub-word value can only be present 2^w times in one pass, so the APT
  // write address never leaves the table.
  for (genvar l = 0; l < NUM_LAYERS; l++) begin : g_chk_l
    for (genvar n = 0; n < NUM_VP; n++) begin : g_chk_n
      a_apt_in_range: assert property (@(posedge clk) disable iff (!rst_n)
        apt_we[l][n] |-> cnt[l][n] < (SUB_WIDTH+1)'(1 << SUB_WIDTH));
    end
  end

endmodule
