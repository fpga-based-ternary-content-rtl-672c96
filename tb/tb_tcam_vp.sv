// tb_tcam_vp: one vertical partition (w=4, p=2, K=4). For random ternary
// columns the testbench computes the BPT and APT images from the
// reference model, loads them, and checks hit and APT row for every value
// of the sub-word with the enable high and low.
module tb_tcam_vp;
  import tcam_ref_pkg::*;
  int checks = 0, failures = 0;
  logic              clk = 0;
  logic              bpt_we, apt_we, en, hit;
  logic [1:0]        bpt_waddr;
  logic [3:0]        bpt_wbits;
  logic signed [4:0] bpt_wli;
  logic [3:0]        apt_waddr, apt_wdata, subword, row;
  entry_t            tbl [MAXK];
  logic [MAXV-1:0]   present;
  logic [MAXK-1:0]   vecs [16];

  always #5 clk = ~clk;

  tcam_vp #(.SUB_WIDTH(4), .BPI_BITS(2), .DEPTH(4)) dut (
    .clk, .bpt_we, .bpt_waddr, .bpt_wbits, .bpt_wli,
    .apt_we, .apt_waddr, .apt_wdata, .subword, .hit, .en, .row);

  initial begin
    bpt_we = 0; apt_we = 0; en = 0; subword = 0;
    bpt_waddr = 0; bpt_wbits = 0; bpt_wli = 0; apt_waddr = 0; apt_wdata = 0;
    for (int pass = 0; pass < 20; pass++) begin
      for (int j = 0; j < MAXK; j++) tbl[j] = rand_entry(4);
      present = '0;
      for (int v = 0; v < 16; v++) begin
        vecs[v] = slice_vec(tbl, 0, 4, 0, 4, v);
        present[v] = |vecs[v];
      end
      for (int v = 0; v < 16; v++) if (present[v]) begin
        @(negedge clk);
        bpt_we = 0; apt_we = 1; apt_waddr = 4'(rank_of(present, v)); apt_wdata = vecs[v][3:0];
      end
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        apt_we = 0; bpt_we = 1; bpt_waddr = 2'(r);
        bpt_wbits = present[r*4 +: 4];
        bpt_wli = 5'(rank_of(present, r * 4) - 1);
      end
      @(negedge clk);
      bpt_we = 0;
      for (int v = 0; v < 16; v++) begin
        for (int e = 0; e < 2; e++) begin
          subword = 4'(v); en = e[0];
          #1;
          checks++;
          // en high with hit low cannot happen inside a layer (the hit is
          // one input of the AND that makes en), so the row is not checked then
          if (hit !== present[v] ||
              (!(e && !present[v]) && row !== (e ? vecs[v][3:0] : 4'b0))) begin
            failures++;
            $display("FAIL v=%0d en=%0d hit=%b row=%b exp=%b", v, e, hit, row, vecs[v][3:0]);
          end
        end
      end
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
