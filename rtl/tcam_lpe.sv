// tcam_lpe: local priority encoder.
//
// Takes the K match lines of one layer (bit j = stored word j matches) and
// returns the lowest-numbered matching word as the potential match address
// (PMA), with match high when any line is set. Where several words match,
// the lowest address wins; the source names the encoder but not its
// priority order, so lowest-address-first, the usual TCAM convention, is
// this design's choice. Combinational.
module tcam_lpe #(
  parameter int unsigned DEPTH  = 4,
  localparam int unsigned ABITS = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [DEPTH-1:0] lines,
  output logic             match,
  output logic [ABITS-1:0] addr
);

  always_comb begin
    match = 1'b0;
    addr  = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (lines[i]) begin
        match = 1'b1;
        addr  = ABITS'(i);
      end
    end
  end

endmodule
