// tb_tcam_bpt: writes random rows and Last Indexes into a w=4, p=2 BPT,
// then reads every sub-word value and checks row, LI, BPI and hit bit.
module tb_tcam_bpt;
  int checks = 0, failures = 0;
  logic              clk = 0;
  logic              we;
  logic [1:0]        waddr;
  logic [3:0]        wbits;
  logic signed [4:0] wli;
  logic [3:0]        subword;
  logic [3:0]        row_bits;
  logic signed [4:0] row_li;
  logic [1:0]        bpi;
  logic              hit;
  logic [3:0]        exp_bits [4];
  logic [4:0]        exp_li   [4];

  always #5 clk = ~clk;

  tcam_bpt #(.SUB_WIDTH(4), .BPI_BITS(2)) dut (.clk, .we, .waddr, .wbits, .wli,
                                               .subword, .row_bits, .row_li, .bpi, .hit);

  initial begin
    we = 0; waddr = 0; wbits = 0; wli = 0; subword = 0;
    for (int pass = 0; pass < 8; pass++) begin
      for (int r = 0; r < 4; r++) begin
        exp_bits[r] = 4'($urandom());
        exp_li[r]   = 5'($urandom_range(0, 16) - 1);
        @(negedge clk);
        we = 1; waddr = 2'(r); wbits = exp_bits[r]; wli = exp_li[r];
      end
      @(negedge clk);
      we = 0;
      for (int s = 0; s < 16; s++) begin
        subword = 4'(s);
        #1;
        checks++;
        if (row_bits !== exp_bits[s >> 2] || row_li !== exp_li[s >> 2] ||
            bpi !== 2'(s) || hit !== exp_bits[s >> 2][s & 3]) begin
          failures++;
          $display("FAIL s=%0d row=%b li=%0d hit=%b", s, row_bits, row_li, hit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
