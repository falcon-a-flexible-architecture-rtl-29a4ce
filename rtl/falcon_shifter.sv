// falcon_shifter: lane-wise shifts and rotates by an immediate amount.
//
// Serves SLi, SRi, ROLi and RORi for every lane width from 8 to 256 bits.
// One shifter per width is built and the result for the current width code
// is selected. Shifts by at least the lane width give zero; rotates take the
// amount modulo the lane width. Logical right shift only. The document names
// shift and rotate operations but not their hardware; this combinational
// per-width structure is this design's choice.
module falcon_shifter
  import falcon_pkg::*;
(
  input  logic [XLEN-1:0] x,
  input  wcode_t          width,
  input  logic [1:0]      kind,   // 0 shift left, 1 shift right, 2 rotate left, 3 rotate right
  input  logic [6:0]      amt,
  output logic [XLEN-1:0] y
);
  logic [XLEN-1:0] res [6];

  for (genvar g = 0; g < 6; g++) begin : g_w
    localparam int unsigned W  = 8 << g;
    localparam int unsigned N  = XLEN / W;
    localparam int unsigned RB = (g > 4) ? 7 : 3 + g;  // bits of a rotate amount
    logic [RB-1:0] r;
    logic          big;
    assign r   = amt[RB-1:0];                      // amount modulo W
    assign big = (32'(amt) >= W);
    for (genvar l = 0; l < N; l++) begin : g_l
      logic [W-1:0]   v;
      logic [2*W-1:0] dl, dr;
      assign v  = x[l*W +: W];
      assign dl = {v, v} << r;                     // upper half: rotate left
      assign dr = {v, v} >> r;                     // lower half: rotate right
      always_comb begin
        unique case (kind)
          2'd0:    res[g][l*W +: W] = big ? '0 : (v << amt);
          2'd1:    res[g][l*W +: W] = big ? '0 : (v >> amt);
          2'd2:    res[g][l*W +: W] = dl[2*W-1:W];
          default: res[g][l*W +: W] = dr[W-1:0];
        endcase
      end
    end
  end

  assign y = (width <= W256) ? res[width] : x;
endmodule
