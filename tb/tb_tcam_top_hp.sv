// tb_tcam_top_hp: end-to-end test of the hybrid-partitioned variant: the
// same 8-bit, 4-word TCAM with two vertical partitions in each of two
// horizontal layers of 2 words (four hybrid partitions in all), joined by
// the global priority encoder. Same sequence and checks as the default
// configuration's test; the per-layer counts of BPT misses and empty APT
// ANDs are taken over both layers.
//
// Sequence: reset (the automatic mapping pass must leave an empty TCAM),
// a fixed table searched with the key 00011010 (three words match, the
// lowest address must win), then random ternary tables, each written
// through the table port, mapped, and searched with all 256 keys against
// the reference model. A write attempted while a pass runs must be held
// off. Each mechanism is counted and must occur at least once: search
// stopped by a BPT miss, BPT hits everywhere but no common word in the APT
// rows, single match, multiple match resolved by priority, match through
// a don't care bit, invalid entry ignored, write held off while busy, and
// mapping pass. Each pass must take 2^4 = 16 clocks; the search has no
// clock latency.
module tb_tcam_top_hp;
  import tcam_ref_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic       wr_en, wr_ready, wr_valid, map_start, busy, map_done, match;
  logic [1:0] wr_addr, match_addr;
  logic [7:0] wr_value, wr_mask, key;
  logic [3:0] match_lines;
  entry_t     tbl [MAXK];
  int n_bpt_miss, n_apt_miss, n_single, n_multi, n_dontcare, n_invalid, n_held, n_pass, n_gpe_both;

  always #5 clk = ~clk;

  tcam_top #(.LAYERS(2)) dut (
    .clk, .rst_n, .wr_en, .wr_ready, .wr_addr, .wr_value, .wr_mask, .wr_valid,
    .map_start, .busy, .map_done, .key, .match, .match_addr, .match_lines);

  task automatic write_entry(int a, entry_t e);
    @(negedge clk);
    wr_en = 1; wr_addr = 2'(a); wr_value = e.value[7:0]; wr_mask = e.mask[7:0]; wr_valid = e.valid;
    @(negedge clk);
    wr_en = 0;
  endtask

  // Start a pass, try to sneak a write in while it runs, count its clocks.
  task automatic map_table();
    int c;
    @(negedge clk);
    map_start = 1;
    @(negedge clk);
    map_start = 0;
    c = 0;
    // write attempt during the pass: must not reach the table
    if (busy && !wr_ready) begin
      wr_en = 1; wr_addr = 2'($urandom()); wr_value = 8'($urandom()); wr_mask = '0; wr_valid = 1;
      n_held++;
    end
    while (busy && c < 100) begin
      @(negedge clk);
      wr_en = 0;
      c++;
    end
    wr_en = 0;
    n_pass++;
    checks++;
    if (c != 16) begin
      failures++;
      $display("FAIL mapping pass took %0d clocks, expected 16", c);
    end
  endtask

  task automatic search_all();
    for (int k = 0; k < 256; k++) begin
      int exp_a;
      logic [MAXK-1:0] exp_l;
      key = 8'(k);
      #1;
      exp_a = lowest_match(tbl, 4, 32'(k), 8);
      exp_l = all_matches(tbl, 4, 32'(k), 8);
      checks++;
      if (match !== (exp_a >= 0) || match_lines !== exp_l[3:0] ||
          (exp_a >= 0 && match_addr !== 2'(exp_a))) begin
        failures++;
        $display("FAIL key=%b match=%b addr=%0d lines=%b exp addr=%0d lines=%b",
                 key, match, match_addr, match_lines, exp_a, exp_l[3:0]);
      end
      for (int l = 0; l < 2; l++) begin
        logic en_l, m_l;
        en_l = (l == 0) ? dut.g_layer[0].u_layer.enable : dut.g_layer[1].u_layer.enable;
        m_l  = (l == 0) ? dut.g_layer[0].u_layer.match  : dut.g_layer[1].u_layer.match;
        if (!en_l) n_bpt_miss++;
        else if (!m_l) n_apt_miss++;
      end
      if (dut.layer_match == 2'b11) n_gpe_both++;
      if ($countones(exp_l) == 1) n_single++;
      if ($countones(exp_l) > 1) n_multi++;
      if (exp_a >= 0 && (tbl[exp_a].mask[7:0] != 0)) n_dontcare++;
      for (int j = 0; j < 4; j++)
        if (!tbl[j].valid && ((tbl[j].value[7:0] ^ key) & ~tbl[j].mask[7:0]) == 0) n_invalid++;
    end
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_value = 0; wr_mask = 0; wr_valid = 0; map_start = 0; key = 0;
    {n_bpt_miss, n_apt_miss, n_single, n_multi, n_dontcare, n_invalid, n_held, n_pass, n_gpe_both} = '0;
    for (int j = 0; j < MAXK; j++) tbl[j] = '{value: 0, mask: 0, valid: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (busy) @(negedge clk);
    search_all();                       // empty table after reset

    // fixed table, searched with the example key 00011010
    tbl[0] = '{value: 32'b1111_0000, mask: 32'b0000_0000, valid: 1};
    tbl[1] = '{value: 32'b0001_1010, mask: 32'b0000_0101, valid: 1};  // 0001_1X1X
    tbl[2] = '{value: 32'b0001_1010, mask: 32'b0000_0000, valid: 1};
    tbl[3] = '{value: 32'b0000_1010, mask: 32'b1111_0000, valid: 1};  // XXXX_1010
    for (int j = 0; j < 4; j++) write_entry(j, tbl[j]);
    map_table();
    key = 8'b0001_1010;
    #1;
    checks++;
    if (!match || match_addr !== 2'd1 || match_lines !== 4'b1110) begin
      failures++;
      $display("FAIL example key: match=%b addr=%0d lines=%b", match, match_addr, match_lines);
    end
    search_all();

    for (int pass = 0; pass < 60; pass++) begin
      for (int j = 0; j < 4; j++) begin
        tbl[j] = rand_entry(8);
        write_entry(j, tbl[j]);
      end
      map_table();
      search_all();
    end

    mech("BPT miss (search stopped)", n_bpt_miss);
    mech("APT rows share no word", n_apt_miss);
    mech("single match", n_single);
    mech("multiple match, priority", n_multi);
    mech("match via don't care", n_dontcare);
    mech("invalid entry ignored", n_invalid);
    mech("write held off while busy", n_held);
    mech("mapping pass", n_pass);
    mech("both layers match, GPE picks", n_gpe_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
