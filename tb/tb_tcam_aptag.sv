// tb_tcam_aptag: exhaustive check of the APT address generator for w=4,
// p=2: every row pattern, BPI, enable and Last Index from -1 to 11.
module tb_tcam_aptag;
  int checks = 0, failures = 0;
  logic [3:0]        row_bits;
  logic signed [4:0] row_li;
  logic [1:0]        bpi;
  logic              en;
  logic [3:0]        apta;
  logic              apta_valid;

  tcam_aptag #(.SUB_WIDTH(4), .BPI_BITS(2)) dut (.row_bits, .row_li, .bpi, .en, .apta, .apta_valid);

  initial begin
    for (int r = 0; r < 16; r++)
      for (int b = 0; b < 4; b++)
        for (int li = -1; li < 12; li++)
          for (int e = 0; e < 2; e++) begin
            int ones, exp_a;
            row_bits = 4'(r); bpi = 2'(b); row_li = 5'(li); en = e[0];
            #1;
            ones = 0;
            for (int i = 0; i <= b; i++) if ((r >> i) & 1) ones++;
            exp_a = e ? (li + ones) & 15 : 0;
            checks++;
            if (apta_valid !== e[0] || apta !== 4'(exp_a)) begin
              failures++;
              $display("FAIL row=%b bpi=%0d li=%0d en=%0d apta=%0d exp=%0d", row_bits, b, li, e, apta, exp_a);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
