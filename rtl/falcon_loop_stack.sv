// falcon_loop_stack: hardware loop stack of the Falcon frontend.
//
// Holds up to DEPTH nested loops as (start address, remaining count) pairs.
// The fetch unit pushes an entry when it pre-decodes LOOP_BEGIN, with the
// address of the bundle after the LOOP_BEGIN and the instruction's iteration
// count. At LOOP_END it looks at top_count: if it is above zero it jumps to
// top_addr and asserts decr, which lowers the count by one; otherwise it
// asserts pop. A loop body therefore runs count + 1 times. Operations take
// effect at the clock edge; push and pop in one cycle are not used. Pushing
// onto a full stack or popping an empty one sets the sticky error flag and is
// otherwise ignored (error handling is this design's choice).
module falcon_loop_stack #(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned AWIDTH = 32,
  parameter int unsigned CWIDTH = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              push,
  input  logic [AWIDTH-1:0] push_addr,
  input  logic [CWIDTH-1:0] push_count,
  input  logic              decr,
  input  logic              pop,
  output logic [AWIDTH-1:0] top_addr,
  output logic [CWIDTH-1:0] top_count,
  output logic              empty,
  output logic              full,
  output logic              error
);
  localparam int unsigned PW = $clog2(DEPTH + 1);

  logic [AWIDTH-1:0] addr_q  [DEPTH];
  logic [CWIDTH-1:0] count_q [DEPTH];
  logic [PW-1:0]     sp;     // number of valid entries
  logic [PW-1:0]     top;

  assign empty     = (sp == '0);
  assign full      = (sp == PW'(DEPTH));
  assign top       = empty ? '0 : sp - 1'b1;
  assign top_addr  = addr_q[top[$clog2(DEPTH)-1:0]];
  assign top_count = count_q[top[$clog2(DEPTH)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp    <= '0;
      error <= 1'b0;
    end else if (clear) begin
      sp    <= '0;
      error <= 1'b0;
    end else begin
      if (push) begin
        if (full) error <= 1'b1;
        else      sp    <= sp + 1'b1;
      end else if (pop) begin
        if (empty) error <= 1'b1;
        else       sp    <= sp - 1'b1;
      end else if (decr && empty) begin
        error <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) begin
      addr_q[sp[$clog2(DEPTH)-1:0]]  <= push_addr;
      count_q[sp[$clog2(DEPTH)-1:0]] <= push_count;
    end else if (decr && !empty && !pop) begin
      count_q[top[$clog2(DEPTH)-1:0]] <= top_count - 1'b1;
    end
  end
endmodule
