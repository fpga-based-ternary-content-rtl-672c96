// tb_tcam_layer: one layer of two VPs (8-bit words, 4 words, w=4, p=2).
// For random ternary tables the testbench loads both VPs' BPT and APT
// images computed by the reference model, then searches all 256 keys and
// checks match lines, match flag and lowest matching address.
module tb_tcam_layer;
  import tcam_ref_pkg::*;
  int checks = 0, failures = 0;
  logic                  clk = 0;
  logic [1:0]            bpt_we, apt_we;
  logic [1:0][1:0]       bpt_waddr;
  logic [1:0][3:0]       bpt_wbits;
  logic [1:0][4:0]       bpt_wli;
  logic [1:0][3:0]       apt_waddr, apt_wdata;
  logic [7:0]            key;
  logic [3:0]            lines;
  logic                  match;
  logic [1:0]            addr;
  entry_t                tbl [MAXK];
  logic [MAXV-1:0]       present [2];
  logic [MAXK-1:0]       vecs [2][16];

  always #5 clk = ~clk;

  tcam_layer #(.NUM_VP(2), .SUB_WIDTH(4), .BPI_BITS(2), .DEPTH(4)) dut (
    .clk, .bpt_we, .bpt_waddr, .bpt_wbits, .bpt_wli,
    .apt_we, .apt_waddr, .apt_wdata, .key, .lines, .match, .addr);

  initial begin
    bpt_we = 0; apt_we = 0; key = 0;
    bpt_waddr = 0; bpt_wbits = 0; bpt_wli = 0; apt_waddr = 0; apt_wdata = 0;
    for (int pass = 0; pass < 30; pass++) begin
      for (int j = 0; j < MAXK; j++) tbl[j] = rand_entry(8);
      for (int n = 0; n < 2; n++) begin
        present[n] = '0;
        for (int v = 0; v < 16; v++) begin
          vecs[n][v] = slice_vec(tbl, 0, 4, n * 4, 4, v);
          present[n][v] = |vecs[n][v];
        end
      end
      for (int n = 0; n < 2; n++) begin
        for (int v = 0; v < 16; v++) if (present[n][v]) begin
          @(negedge clk);
          apt_we = '0; apt_we[n] = 1'b1;
          apt_waddr[n] = 4'(rank_of(present[n], v)); apt_wdata[n] = vecs[n][v][3:0];
        end
        @(negedge clk);
        apt_we = '0;
        for (int r = 0; r < 4; r++) begin
          @(negedge clk);
          bpt_we = '0; bpt_we[n] = 1'b1; bpt_waddr[n] = 2'(r);
          bpt_wbits[n] = present[n][r*4 +: 4];
          bpt_wli[n] = 5'(rank_of(present[n], r * 4) - 1);
        end
        @(negedge clk);
        bpt_we = '0;
      end
      for (int k = 0; k < 256; k++) begin
        int exp_a;
        logic [MAXK-1:0] exp_l;
        key = 8'(k);
        #1;
        exp_a = lowest_match(tbl, 4, 32'(k), 8);
        exp_l = all_matches(tbl, 4, 32'(k), 8);
        checks++;
        if (lines !== exp_l[3:0] || match !== (exp_a >= 0) || (exp_a >= 0 && addr !== 2'(exp_a))) begin
          failures++;
          $display("FAIL key=%h lines=%b exp=%b match=%b addr=%0d exp=%0d", key, lines, exp_l[3:0], match, addr, exp_a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
