// falcon_lane_ctrl: lane masks and lane write enables.
//
// Holds the global 32-bit mask register, one bit per 8-bit lane position.
// SET_MASK (set_mask high) sets every mask bit to the least significant bit of
// the lane, at the current lane width, that holds the corresponding byte of
// the source register, so a lane whose value is odd becomes masked. For lane
// widths above 8 bits only the mask bit of the lane's least significant byte
// is used. be gives one write enable per byte: high unless the byte's lane is
// masked. The mask register is updated at the clock edge and used by the
// instruction that executes next; clear (program start) unmasks every lane.
// Mask polarity (1 = masked) and the byte-wise register layout follow the
// document; the clear value is this design's choice.
module falcon_lane_ctrl
  import falcon_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  wcode_t            width,
  input  logic              set_mask,
  input  logic [XLEN-1:0]   src,
  output logic [NBYTES-1:0] mask,
  output logic [NBYTES-1:0] be
);
  logic [NBYTES-1:0] mask_next;

  always_comb begin
    int unsigned bpl;  // bytes per lane
    bpl = 1 << width;
    for (int b = 0; b < NBYTES; b++) begin
      mask_next[b] = src[(b / bpl) * bpl * 8];
      be[b]        = !mask[(b / bpl) * bpl];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        mask <= '0;
    else if (clear)    mask <= '0;
    else if (set_mask) mask <= mask_next;
  end
endmodule
