// falcon_regfile_slice: one 16-bit slice of Falcon's register file.
//
// The 16 x 256-bit register file is built from sixteen of these slices, one
// per 16-bit execution lane; slice s holds bits 16s+15..16s of all sixteen
// registers. Three asynchronous read ports serve R1, R2 and R3 of the
// instruction in register read. The single write port writes at the clock
// edge, with one enable per byte so that masked 8-bit lanes keep their value.
// clear zeroes every register (part of the reset done when a program starts).
module falcon_regfile_slice (
  input  logic        clk,
  input  logic        clear,
  input  logic [3:0]  ra1,
  input  logic [3:0]  ra2,
  input  logic [3:0]  ra3,
  output logic [15:0] rd1,
  output logic [15:0] rd2,
  output logic [15:0] rd3,
  input  logic        we,
  input  logic [3:0]  wa,
  input  logic [1:0]  wbe,
  input  logic [15:0] wd
);
  logic [15:0] regs [16];

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
  assign rd3 = regs[ra3];

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int r = 0; r < 16; r++) regs[r] <= '0;
    end else if (we) begin
      if (wbe[0]) regs[wa][7:0]  <= wd[7:0];
      if (wbe[1]) regs[wa][15:8] <= wd[15:8];
    end
  end
endmodule
