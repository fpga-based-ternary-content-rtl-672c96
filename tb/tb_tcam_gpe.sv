// tb_tcam_gpe: exhaustive check of the global priority encoder, 4 layers of
// 2 words: the lowest matching layer wins and the address is layer*2+local.
module tb_tcam_gpe;
  int checks = 0, failures = 0;
  logic [3:0]      layer_match;
  logic [3:0][0:0] layer_addr;
  logic            match;
  logic [2:0]      addr;

  tcam_gpe #(.NUM_LAYERS(4), .DEPTH(2)) dut (.layer_match, .layer_addr, .match, .addr);

  initial begin
    for (int i = 0; i < 256; i++) begin
      int exp_a;
      layer_match = 4'(i);
      layer_addr  = 4'(i >> 4);
      #1;
      exp_a = -1;
      for (int l = 3; l >= 0; l--) if (layer_match[l]) exp_a = l * 2 + int'(layer_addr[l]);
      checks++;
      if (match !== (exp_a >= 0) || (exp_a >= 0 && addr !== 3'(exp_a))) begin
        failures++;
        $display("FAIL m=%b a=%b -> match=%b addr=%0d exp=%0d", layer_match, layer_addr, match, addr, exp_a);
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
