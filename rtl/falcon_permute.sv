// falcon_permute: the 8x32 lane permutation network (PERMUTE).
//
// Result lane i receives data lane idx[i] mod N, where N = 256/W is the
// number of lanes and idx[i] is the value of lane i of the shuffle register;
// masked lanes are kept by the write enables of the backend. The network has
// eight 32-bit output ports; each port can take a 32-bit window starting at
// any of the 32 byte positions of the data register. A pass moves eight
// chunks of min(W, 32) bits, so a full permutation takes 4 passes (cycles)
// for 8-bit lanes, 2 for 16-bit lanes and 1 for 32-bit and wider lanes, where
// a lane of W > 32 bits is moved as W/32 words.
// Timing: hold run high from the first cycle of the instruction; done is high
// in the cycle of the last pass, when y holds the complete result. The pass
// counter returns to zero after done.
// The port count, the byte-window ports and the pass counts are read from the
// document's 8x32 size and its 1-4 cycle count; lane i reading from lane
// idx[i] follows the worked four-lane example.
module falcon_permute
  import falcon_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  wcode_t          width,
  input  logic [XLEN-1:0] idx,
  input  logic [XLEN-1:0] data,
  output logic            done,
  output logic [XLEN-1:0] y,
  output logic [1:0]      pass
);
  localparam int unsigned PORTS = 8;

  logic [XLEN-1:0] res_q, res_now;
  logic [1:0]      last_pass;
  logic [2*XLEN-1:0] data2;

  assign data2     = {data, data};
  assign last_pass = (width == W8) ? 2'd3 : (width == W16) ? 2'd1 : 2'd0;
  assign done      = run && (pass == last_pass);

  // Per port: the 32-bit source window it reads in this pass.
  logic [31:0] word [PORTS];
  logic [1:0]  lsb;    // log2 of the bytes one port moves (1, 2 or 4)
  logic [1:0]  lcpl;   // log2 of the 32-bit chunks in one lane
  logic [2:0]  ln;     // log2 of the number of lanes

  assign lsb  = (width >= W32) ? 2'd2 : 2'(width);
  assign lcpl = (width > W32) ? 2'(width - 3'd2) : 2'd0;
  assign ln   = 3'd5 - 3'(width);

  for (genvar k = 0; k < PORTS; k++) begin : g_port
    always_comb begin
      logic [4:0] c, lane_byte, sub, sel, src_off;
      c         = {pass, 3'(k)};
      lane_byte = 5'((c >> lcpl) << (3'(lcpl) + 3'(lsb)));
      sub       = c & 5'((1 << lcpl) - 1);
      sel       = idx[8*lane_byte +: 5] & 5'((1 << ln) - 1);
      src_off   = 5'(((sel << lcpl) + sub) << lsb);
      word[k]   = data2[8*src_off +: 32];
    end
  end

  // Per destination byte: which pass and port write it, fixed by the width.
  for (genvar d = 0; d < NBYTES; d++) begin : g_byte
    localparam int unsigned P8  = d % 8,        S8  = d / 8;
    localparam int unsigned P16 = (d / 2) % 8,  S16 = d / 16, B16 = d % 2;
    localparam int unsigned P32 = d / 4,        B32 = d % 4;
    always_comb begin
      res_now[8*d +: 8] = res_q[8*d +: 8];
      if (width == W8) begin
        if (pass == 2'(S8)) res_now[8*d +: 8] = word[P8][7:0];
      end else if (width == W16) begin
        if (pass == 2'(S16)) res_now[8*d +: 8] = word[P16][8*B16 +: 8];
      end else begin
        res_now[8*d +: 8] = word[P32][8*B32 +: 8];
      end
    end
  end

  assign y = res_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass  <= '0;
      res_q <= '0;
    end else if (run) begin
      res_q <= res_now;
      pass  <= done ? 2'd0 : pass + 1'b1;
    end else begin
      pass <= '0;
    end
  end
endmodule
