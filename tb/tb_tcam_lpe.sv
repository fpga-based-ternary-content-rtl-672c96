// tb_tcam_lpe: exhaustive check of the local priority encoder (8 lines).
module tb_tcam_lpe;
  int checks = 0, failures = 0;
  logic [7:0] lines;
  logic       match;
  logic [2:0] addr;

  tcam_lpe #(.DEPTH(8)) dut (.lines, .match, .addr);

  initial begin
    for (int i = 0; i < 256; i++) begin
      int exp_a;
      lines = 8'(i);
      #1;
      exp_a = 0;
      for (int b = 7; b >= 0; b--) if (lines[b]) exp_a = b;
      checks++;
      if (match !== (i != 0) || (i != 0 && addr !== 3'(exp_a))) begin
        failures++;
        $display("FAIL lines=%b match=%b addr=%0d exp=%0d", lines, match, addr, exp_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
