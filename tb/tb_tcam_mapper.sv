// tb_tcam_mapper: mapping controller with 8-bit words, 4 words in two
// layers of 2, two VPs, p=2. The testbench records every BPT and APT write
// in its own arrays and, after each pass, compares them with the images
// the reference model computes from the same table. It also checks that a
// pass runs by itself after reset and leaves every BPT row empty with
// LI = -1, that busy lasts exactly 2^w = 16 clocks, that done pulses once,
// and that wr_ready is low while busy.
module tb_tcam_mapper;
  import tcam_ref_pkg::*;
  localparam int L = 2, N = 2, K = 4, LD = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_ready, wr_valid, start, busy, done;
  logic [1:0] wr_addr;
  logic [7:0] wr_value, wr_mask;
  logic [L-1:0][N-1:0]        bpt_we, apt_we;
  logic [L-1:0][N-1:0][1:0]   bpt_waddr;
  logic [L-1:0][N-1:0][3:0]   bpt_wbits, apt_waddr;
  logic [L-1:0][N-1:0][4:0]   bpt_wli;
  logic [L-1:0][N-1:0][LD-1:0] apt_wdata;

  logic [3:0]      m_bits [L][N][4];
  logic [4:0]      m_li   [L][N][4];
  logic [LD-1:0]   m_apt  [L][N][16];
  entry_t          tbl [MAXK];
  int              busy_cycles, done_pulses;

  always #5 clk = ~clk;

  tcam_mapper #(.WIDTH(8), .DEPTH(K), .NUM_VP(N), .BPI_BITS(2), .NUM_LAYERS(L)) dut (
    .clk, .rst_n, .wr_en, .wr_ready, .wr_addr, .wr_value, .wr_mask, .wr_valid,
    .start, .busy, .done, .bpt_we, .bpt_waddr, .bpt_wbits, .bpt_wli,
    .apt_we, .apt_waddr, .apt_wdata);

  always @(posedge clk) begin
    for (int l = 0; l < L; l++)
      for (int n = 0; n < N; n++) begin
        if (bpt_we[l][n]) begin
          m_bits[l][n][bpt_waddr[l][n]] <= bpt_wbits[l][n];
          m_li[l][n][bpt_waddr[l][n]]   <= bpt_wli[l][n];
        end
        if (apt_we[l][n]) m_apt[l][n][apt_waddr[l][n]] <= apt_wdata[l][n];
      end
    if (busy && rst_n) busy_cycles <= busy_cycles + 1;
    if (done && rst_n) done_pulses <= done_pulses + 1;
    if (busy && wr_ready) begin
      failures++;
      $display("FAIL wr_ready high while busy");
    end
  end

  task automatic wait_pass();
    int c;
    c = 0;
    while (!done && c < 100) begin @(posedge clk); c++; end
    @(negedge clk);
    checks++;
    if (busy_cycles != 16 || done_pulses != 1) begin
      failures++;
      $display("FAIL pass took %0d clocks, %0d done pulses", busy_cycles, done_pulses);
    end
  endtask

  task automatic compare_images();
    for (int l = 0; l < L; l++)
      for (int n = 0; n < N; n++) begin
        logic [MAXV-1:0] present;
        logic [MAXK-1:0] vecs [16];
        present = '0;
        for (int v = 0; v < 16; v++) begin
          vecs[v] = slice_vec(tbl, l * LD, LD, n * 4, 4, v);
          present[v] = |vecs[v];
        end
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (m_bits[l][n][r] !== present[r*4 +: 4] ||
              m_li[l][n][r] !== 5'(rank_of(present, r * 4) - 1)) begin
            failures++;
            $display("FAIL BPT l=%0d n=%0d row=%0d bits=%b li=%0d", l, n, r, m_bits[l][n][r], $signed(m_li[l][n][r]));
          end
        end
        for (int v = 0; v < 16; v++) if (present[v]) begin
          checks++;
          if (m_apt[l][n][rank_of(present, v)] !== vecs[v][LD-1:0]) begin
            failures++;
            $display("FAIL APT l=%0d n=%0d v=%0d row=%b exp=%b", l, n, v, m_apt[l][n][rank_of(present, v)], vecs[v][LD-1:0]);
          end
        end
      end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_value = 0; wr_mask = 0; wr_valid = 0; start = 0;
    busy_cycles = 0; done_pulses = 0;
    for (int j = 0; j < MAXK; j++) tbl[j].valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait_pass();            // automatic pass after reset: empty table
    compare_images();
    for (int pass = 0; pass < 40; pass++) begin
      for (int j = 0; j < K; j++) begin
        tbl[j] = rand_entry(8);
        @(negedge clk);
        wr_en = 1; wr_addr = 2'(j); wr_value = tbl[j].value[7:0];
        wr_mask = tbl[j].mask[7:0]; wr_valid = tbl[j].valid;
      end
      @(negedge clk);
      wr_en = 0; start = 1;
      busy_cycles = 0; done_pulses = 0;
      @(negedge clk);
      start = 0;
      wait_pass();
      compare_images();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
