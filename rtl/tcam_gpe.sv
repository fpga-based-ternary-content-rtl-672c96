// tcam_gpe: global priority encoder over horizontal layers.
//
// In the hybrid-partitioned organisation the stored words are spread over
// NUM_LAYERS layers, layer l holding addresses l*DEPTH .. l*DEPTH+DEPTH-1,
// and each layer's LPE reports a local match and address. The GPE picks the
// lowest-numbered layer that matches and forms the global address
// layer*DEPTH + local address. Lowest layer first
// is this design's choice, consistent with the LPE. Combinational.
module tcam_gpe #(
  parameter int unsigned NUM_LAYERS = 2,
  parameter int unsigned DEPTH      = 2,   // words per layer
  localparam int unsigned LBITS     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned GBITS     = $clog2(NUM_LAYERS * DEPTH) > 0 ? $clog2(NUM_LAYERS * DEPTH) : 1
) (
  input  logic [NUM_LAYERS-1:0]            layer_match,
  input  logic [NUM_LAYERS-1:0][LBITS-1:0] layer_addr,
  output logic                             match,
  output logic [GBITS-1:0]                 addr
);

  always_comb begin
    match = 1'b0;
    addr  = '0;
    for (int l = NUM_LAYERS - 1; l >= 0; l--) begin
      if (layer_match[l]) begin
        match = 1'b1;
        addr  = GBITS'(l * DEPTH) + GBITS'(layer_addr[l]);
      end
    end
  end

endmodule
