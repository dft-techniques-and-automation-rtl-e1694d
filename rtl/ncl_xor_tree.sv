// ncl_xor_tree: balanced tree of two-input XOR gates that folds N otherwise
// unobservable nets into a single primary output (their parity).
//
// Level by level, neighbouring signals are paired into an XOR; an odd one out
// moves up unchanged. Six inputs give three XORs, then one, then a last one
// with the carried signal: depth ceil(log2 N). The tree shape follows the
// observation method; the pairing order is this design's. The XORs load the
// observed nets but do not change circuit function.
//
// Ports: in[N-1:0], po. Timing: combinational.
module ncl_xor_tree #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] in,
  output logic         po
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // node[l][i]: signal i at level l; level 0 is the inputs.
  logic [N-1:0] node [LEVELS+1];

  always_comb begin
    int unsigned width;
    for (int unsigned l = 0; l <= LEVELS; l++) node[l] = '0;
    node[0] = in;
    width = N;
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (2 * i + 1 < width)      node[l][i] = node[l-1][2*i] ^ node[l-1][2*i+1];
        else if (2 * i + 1 == width) node[l][i] = node[l-1][2*i];
      end
      width = (width + 1) / 2;
    end
  end

  assign po = node[LEVELS][0];

endmodule
