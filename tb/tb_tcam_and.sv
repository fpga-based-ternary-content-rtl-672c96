// tb_tcam_and: exhaustive check of the AND combiner, 1-bit and 4-bit wide.
module tb_tcam_and;
  int checks = 0, failures = 0;
  logic [2:0]       in1;
  logic             out1;
  logic [1:0][3:0]  in4;
  logic [3:0]       out4;

  tcam_and #(.N(3), .WIDTH(1)) dut1 (.in(in1), .out(out1));
  tcam_and #(.N(2), .WIDTH(4)) dut4 (.in(in4), .out(out4));

  initial begin
    for (int i = 0; i < 8; i++) begin
      in1 = 3'(i);
      #1;
      checks++;
      if (out1 !== (i == 7)) begin failures++; $display("FAIL 1-bit in=%b out=%b", in1, out1); end
    end
    for (int i = 0; i < 256; i++) begin
      in4 = 8'(i);
      #1;
      checks++;
      if (out4 !== (4'(i) & 4'(i >> 4))) begin failures++; $display("FAIL 4-bit in=%h out=%b", in4, out4); end
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
