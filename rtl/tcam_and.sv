// tcam_and: bitwise AND of N vectors of WIDTH bits.
//
// Used twice per layer. With WIDTH = 1 it is the "1-bit ANDing" of the BPT
// hits, whose output enables the APT address generators: a search goes on
// only if every vertical partition holds its slice of the key. With WIDTH
// = K it is the "K-bit ANDing" of the APT rows, whose output has a 1 for
// every stored word that matches the whole key. Combinational.
module tcam_and #(
  parameter int unsigned N     = 2,
  parameter int unsigned WIDTH = 4
) (
  input  logic [N-1:0][WIDTH-1:0] in,
  output logic [WIDTH-1:0]        out
);

  always_comb begin
    out = '1;
    for (int unsigned i = 0; i < N; i++) out &= in[i];
  end

endmodule
