// falcon_bitslice: the BITSLICE bit transpose.
//
// With lane width W there are N = 256/W lanes. The input is read as N lanes
// of W bits and the output as W lanes of N bits: bit i of input lane j becomes
// bit j of output lane i. Running BITSLICE at width W and then at width 256/W
// restores the original value. A source lane whose mask is set contributes
// zeros. The mask of a lane is taken from src_be, the byte write enables of
// the lane control (enable low = masked), at the lane's least significant
// byte. Combinational, one cycle in the execute stage.
// Transpose direction, the bit order checked against the four-lane example of
// the architecture, and zeroing of masked lanes follow the document.
module falcon_bitslice
  import falcon_pkg::*;
(
  input  logic [XLEN-1:0]   x,
  input  wcode_t            width,
  input  logic [NBYTES-1:0] src_be,
  output logic [XLEN-1:0]   y
);
  logic [XLEN-1:0] res [6];

  for (genvar g = 0; g < 6; g++) begin : g_w
    localparam int unsigned W = 8 << g;
    localparam int unsigned N = XLEN / W;
    always_comb begin
      res[g] = '0;
      for (int j = 0; j < N; j++)
        for (int i = 0; i < W; i++)
          res[g][i*N + j] = x[j*W + i] & src_be[j*(W/8)];
    end
  end

  assign y = (width <= W256) ? res[width] : x;
endmodule
