// falcon_exec_unit: one 16-bit execution unit of the Falcon backend.
//
// Each of the sixteen units holds a four-input multiply-accumulate unit that
// computes A + B + C x D on 16-bit operands, and a 16-bit logical unit; an
// output multiplexer picks one of the two. The 16x16 multiplier is built
// from four 8x8 partial products. In split mode only the two diagonal
// products are used, so the unit works as two independent 8-bit MACs:
//   y[15:0]  = A[7:0]  + B[7:0]  + C[7:0]  * D[7:0]
//   y[31:16] = A[15:8] + B[15:8] + C[15:8] * D[15:8]
// In 16-bit mode y = A + B + C x D, which never exceeds 32 bits. The backend
// builds additions (C = carry in, D = 1), multiplications (A = B = 0) and the
// rows of long-word schoolbook multiplication (A = accumulator digit,
// B = carry digit of the neighbouring unit) from this one operation.
// Purely combinational; the backend registers the result in its accumulators
// or write-back stage.
module falcon_exec_unit (
  input  logic        split,     // 1: two 8-bit MACs
  input  logic        sel_logic, // 1: result from the logical unit
  input  logic [1:0]  lop,       // 0 AND, 1 OR, 2 XOR, 3 NOT A
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic [15:0] c,
  input  logic [15:0] d,
  output logic [31:0] y
);
  logic [15:0] pp_ll, pp_lh, pp_hl, pp_hh;  // 8x8 partial products
  logic [31:0] mac16;
  logic [15:0] mac8_lo, mac8_hi;
  logic [15:0] lres;

  assign pp_ll = c[7:0]  * d[7:0];
  assign pp_lh = c[7:0]  * d[15:8];
  assign pp_hl = c[15:8] * d[7:0];
  assign pp_hh = c[15:8] * d[15:8];

  assign mac16   = 32'(a) + 32'(b) + 32'(pp_ll) + (32'(pp_lh) << 8) + (32'(pp_hl) << 8)
                 + (32'(pp_hh) << 16);
  assign mac8_lo = 16'(a[7:0])  + 16'(b[7:0])  + pp_ll;
  assign mac8_hi = 16'(a[15:8]) + 16'(b[15:8]) + pp_hh;

  always_comb begin
    unique case (lop)
      2'd0: lres = a & b;
      2'd1: lres = a | b;
      2'd2: lres = a ^ b;
      default: lres = ~a;
    endcase
  end

  always_comb begin
    if (sel_logic)  y = {16'h0, lres};
    else if (split) y = {mac8_hi, mac8_lo};
    else            y = mac16;
  end
endmodule
