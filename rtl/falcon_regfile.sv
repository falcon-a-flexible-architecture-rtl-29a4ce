// falcon_regfile: Falcon's 16 x 256-bit register file.
//
// Sixteen falcon_regfile_slice instances side by side, one per 16-bit
// execution lane, so that each lane reads and writes only its own slice.
// Three asynchronous read ports and one write port with 32 byte enables
// (one per 8-bit lane, driven by the lane masks). Writes take effect at the
// clock edge; a read in the same cycle returns the old value, which the
// backend's forwarding paths cover.
module falcon_regfile
  import falcon_pkg::*;
(
  input  logic            clk,
  input  logic            clear,
  input  logic [3:0]      ra1,
  input  logic [3:0]      ra2,
  input  logic [3:0]      ra3,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2,
  output logic [XLEN-1:0] rd3,
  input  logic            we,
  input  logic [3:0]      wa,
  input  logic [NBYTES-1:0] wbe,
  input  logic [XLEN-1:0] wd
);
  for (genvar s = 0; s < NUNITS; s++) begin : g_slice
    falcon_regfile_slice u_slice (
      .clk  (clk),
      .clear(clear),
      .ra1  (ra1),
      .ra2  (ra2),
      .ra3  (ra3),
      .rd1  (rd1[16*s +: 16]),
      .rd2  (rd2[16*s +: 16]),
      .rd3  (rd3[16*s +: 16]),
      .we   (we),
      .wa   (wa),
      .wbe  (wbe[2*s +: 2]),
      .wd   (wd[16*s +: 16])
    );
  end
endmodule
