// tb_tcam_top_wide: the TCAM at a non-default size, to check that the
// parameters scale: 12-bit words in three 4-bit vertical partitions,
// 8 words in two layers of 4, 1-bit BPI (BPT rows of 2 bits). Random
// ternary tables are written, mapped (each pass must take 2^4 = 16 clocks)
// and searched with all 4096 keys against the reference model.
module tb_tcam_top_wide;
  import tcam_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        wr_en, wr_ready, wr_valid, map_start, busy, map_done, match;
  logic [2:0]  wr_addr, match_addr;
  logic [11:0] wr_value, wr_mask, key;
  logic [7:0]  match_lines;
  entry_t      tbl [MAXK];
  int          n_match;

  always #5 clk = ~clk;

  tcam_top #(.WIDTH(12), .DEPTH(8), .VPS(3), .PBITS(1), .LAYERS(2)) dut (
    .clk, .rst_n, .wr_en, .wr_ready, .wr_addr, .wr_value, .wr_mask, .wr_valid,
    .map_start, .busy, .map_done, .key, .match, .match_addr, .match_lines);

  initial begin
    wr_en = 0; wr_addr = 0; wr_value = 0; wr_mask = 0; wr_valid = 0; map_start = 0; key = 0;
    n_match = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (busy) @(negedge clk);
    for (int pass = 0; pass < 12; pass++) begin
      int c;
      for (int j = 0; j < 8; j++) begin
        tbl[j] = rand_entry(12);
        // more don't cares so that wide keys still find matches
        tbl[j].mask = tbl[j].mask | (32'($urandom()) & 32'hfff);
        @(negedge clk);
        wr_en = 1; wr_addr = 3'(j); wr_value = tbl[j].value[11:0];
        wr_mask = tbl[j].mask[11:0]; wr_valid = tbl[j].valid;
      end
      @(negedge clk);
      wr_en = 0; map_start = 1;
      @(negedge clk);
      map_start = 0;
      c = 0;
      while (busy && c < 100) begin @(negedge clk); c++; end
      checks++;
      if (c != 16) begin failures++; $display("FAIL pass took %0d clocks", c); end
      for (int k = 0; k < 4096; k++) begin
        int exp_a;
        logic [MAXK-1:0] exp_l;
        key = 12'(k);
        #1;
        exp_a = lowest_match(tbl, 8, 32'(k), 12);
        exp_l = all_matches(tbl, 8, 32'(k), 12);
        if (exp_a >= 0) n_match++;
        checks++;
        if (match !== (exp_a >= 0) || match_lines !== exp_l[7:0] ||
            (exp_a >= 0 && match_addr !== 3'(exp_a))) begin
          failures++;
          if (failures < 10)
            $display("FAIL key=%h match=%b addr=%0d lines=%b exp %0d %b", key, match, match_addr, match_lines, exp_a, exp_l[7:0]);
        end
      end
    end
    checks++;
    if (n_match == 0) begin failures++; $display("FAIL no key ever matched"); end
    $display("keys that matched: %0d", n_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
