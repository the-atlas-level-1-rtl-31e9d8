// mibak_adder_tree: the backplane multiplicity adder.
//
// Adds the 18-bit multiplicities of the 16 octant modules threshold by threshold in a
// binary tree of four levels (16 -> 8 -> 4 -> 2 -> 1). Every adder saturates at 7, so the
// result for each threshold is min(7, sum) in 3 bits, giving the 18-bit total that the
// MICTP forwards to the CTP. Purely combinational, like the programmable-logic adder
// tree of the backplane it models.
//
// The binary tree and the 16 x 6 x 3-bit inputs follow the description; saturation at 7
// is this design's choice.
module mibak_adder_tree
  import muctpi_pkg::*;
#(
  parameter int N = NUM_OCT
) (
  input  logic [N-1:0][MULTS_W-1:0] mult_in,
  output logic [MULTS_W-1:0]        mult_sum
);
  localparam int LEVELS = $clog2(N);

  function automatic logic [MULTS_W-1:0] sat_add(input logic [MULTS_W-1:0] x,
                                                 input logic [MULTS_W-1:0] y);
    logic [MULTS_W-1:0] r;
    for (int t = 0; t < NUM_THR; t++) begin
      logic [MULT_W:0] s;
      s = {1'b0, x[t*MULT_W +: MULT_W]} + {1'b0, y[t*MULT_W +: MULT_W]};
      r[t*MULT_W +: MULT_W] = s[MULT_W] ? '1 : s[MULT_W-1:0];
    end
    return r;
  endfunction

  // node[l] holds 2**(LEVELS-l) partial sums; node[0] are the inputs (zero padded).
  logic [MULTS_W-1:0] node [LEVELS+1][2**LEVELS];

  always_comb begin
    for (int i = 0; i < 2**LEVELS; i++) node[0][i] = (i < N) ? mult_in[i] : '0;
    for (int l = 1; l <= LEVELS; l++) begin
      for (int i = 0; i < 2**LEVELS; i++) node[l][i] = '0;
      for (int i = 0; i < 2**(LEVELS-l); i++)
        node[l][i] = sat_add(node[l-1][2*i], node[l-1][2*i+1]);
    end
  end
  assign mult_sum = node[LEVELS][0];
endmodule
