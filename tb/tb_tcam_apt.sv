// tb_tcam_apt: fills a 16 x 4 APT with random rows, reads every row with
// the enable high (row returned) and low (all zeros).
module tb_tcam_apt;
  int checks = 0, failures = 0;
  logic       clk = 0;
  logic       we;
  logic [3:0] waddr, raddr;
  logic [3:0] wdata, rdata;
  logic       en;
  logic [3:0] model [16];

  always #5 clk = ~clk;

  tcam_apt #(.SUB_WIDTH(4), .DEPTH(4)) dut (.clk, .we, .waddr, .wdata, .raddr, .en, .rdata);

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0; en = 0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int r = 0; r < 16; r++) begin
        model[r] = 4'($urandom());
        @(negedge clk);
        we = 1; waddr = 4'(r); wdata = model[r];
      end
      @(negedge clk);
      we = 0;
      for (int r = 0; r < 16; r++) begin
        for (int e = 0; e < 2; e++) begin
          raddr = 4'(r); en = e[0];
          #1;
          checks++;
          if (rdata !== (e ? model[r] : 4'b0)) begin
            failures++;
            $display("FAIL r=%0d en=%0d rdata=%b exp=%b", r, e, rdata, model[r]);
          end
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
