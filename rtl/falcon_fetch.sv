// falcon_fetch: instruction fetch, pre-decode and PC of the Falcon frontend.
//
// Fetches one 32-bit bundle (two 16-bit instruction words, the first in bits
// 15:0) per request over the instruction bus and pushes it into the fetch
// buffer. Because Falcon has no data-dependent branches, every control
// decision is made here and is never wrong:
//  * The pre-decoder follows instruction boundaries, skipping the immediate
//    words of long LDi instructions, so it knows which words are opcodes.
//  * LOOP_BEGIN and LOOP_END must start a bundle and fill it (the second word
//    is ignored). They are executed here and never reach the buffer:
//    LOOP_BEGIN pushes (address of the next bundle, count) onto the loop
//    stack; LOOP_END jumps back while the top count is above zero, lowering
//    it by one, and otherwise pops the entry and falls through.
//  * A HALT instruction stops fetching after its bundle.
// One request is outstanding at a time; the next address is computed in the
// cycle the response arrives and issued in that same cycle, so a memory that
// answers in the cycle after a request sustains one bundle per cycle. A
// request is only issued while the buffer has room for its bundle.
// start loads the program address and clears all fetch and loop state.
// The document gives the loop semantics, the loop stack, the 32-bit bundles
// and the alignment rule for loops; the bundle layout, the single
// outstanding request and the handling of HALT are this design's choices.
module falcon_fetch
  import falcon_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned LOOP_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] start_pc,
  // instruction bus
  output bus_req_t    ireq,
  input  logic        ireq_ready,
  input  bus_rsp_t    irsp,
  // fetch buffer
  output logic        buf_push,
  output logic [31:0] buf_wdata,
  input  logic [$clog2(BUF_DEPTH+1)-1:0] buf_count,
  // status
  output logic        running,
  output logic        loop_error,
  output logic        loop_taken,   // a LOOP_END jumped back this cycle
  output logic        loop_exit     // a LOOP_END popped its loop this cycle
);
  logic [31:0] pc, raddr, next_pc;
  logic        outst;
  logic [4:0]  skip, skip_next;
  logic        got;
  logic [15:0] h0, h1;
  logic        is_loopb, is_loope, halt_seen, h1_is_op;
  logic        ls_push, ls_decr, ls_pop, ls_empty, ls_full, ls_err;
  logic [31:0] ls_addr;
  logic [10:0] ls_count;
  logic        can_issue;

  function automatic opcode_e opc(input logic [15:0] h);
    return opcode_e'(h[15:11]);
  endfunction

  assign got      = outst && irsp.valid;
  assign h0       = irsp.rdata[15:0];
  assign h1       = irsp.rdata[31:16];
  assign is_loopb = (skip == 0) && (opc(h0) == OP_LOOPB);
  assign is_loope = (skip == 0) && (opc(h0) == OP_LOOPE);

  // Boundary tracking over the two words of an ordinary bundle.
  always_comb begin
    logic [4:0] s;
    s         = skip;
    halt_seen = 1'b0;
    if (s != 0) s = s - 1'b1;
    else if (opc(h0) == OP_LDI) s = 5'(ldi_halfwords(wcode_t'(h0[6:4])));
    else if (opc(h0) == OP_HALT) halt_seen = 1'b1;
    h1_is_op = !halt_seen && (s == 0);
    if (!halt_seen) begin
      if (s != 0) s = s - 1'b1;
      else if (opc(h1) == OP_LDI) s = 5'(ldi_halfwords(wcode_t'(h1[6:4])));
      else if (opc(h1) == OP_HALT) halt_seen = 1'b1;
    end
    skip_next = s;
  end

  always_comb begin
    ls_push    = 1'b0;
    ls_decr    = 1'b0;
    ls_pop     = 1'b0;
    buf_push   = 1'b0;
    loop_taken = 1'b0;
    loop_exit  = 1'b0;
    next_pc    = raddr + 32'd4;
    if (got) begin
      if (is_loopb) begin
        ls_push = 1'b1;
      end else if (is_loope) begin
        if (ls_count != 0) begin
          ls_decr    = 1'b1;
          loop_taken = 1'b1;
          next_pc    = ls_addr;
        end else begin
          ls_pop    = 1'b1;
          loop_exit = 1'b1;
        end
      end else begin
        buf_push = 1'b1;
      end
    end
  end

  assign buf_wdata = irsp.rdata;
  assign can_issue = running && !(got && buf_push && halt_seen) && (!outst || got)
                   && (32'(buf_count) + 32'(buf_push) + 1 <= BUF_DEPTH);

  always_comb begin
    ireq       = '0;
    ireq.valid = can_issue;
    ireq.addr  = got ? next_pc : pc;
  end

  falcon_loop_stack #(.DEPTH(LOOP_DEPTH), .AWIDTH(32), .CWIDTH(11)) u_loops (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (start),
    .push      (ls_push),
    .push_addr (raddr + 32'd4),
    .push_count(h0[10:0]),
    .decr      (ls_decr),
    .pop       (ls_pop),
    .top_addr  (ls_addr),
    .top_count (ls_count),
    .empty     (ls_empty),
    .full      (ls_full),
    .error     (ls_err)
  );

  assign loop_error = ls_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      raddr   <= '0;
      outst   <= 1'b0;
      skip    <= '0;
      running <= 1'b0;
    end else if (start) begin
      pc      <= start_pc;
      raddr   <= start_pc;
      outst   <= 1'b0;
      skip    <= '0;
      running <= 1'b1;
    end else begin
      if (got) begin
        pc    <= next_pc;
        outst <= 1'b0;
        if (buf_push) skip <= skip_next;
        if (buf_push && halt_seen) running <= 1'b0;
      end
      if (ireq.valid && ireq_ready) begin
        outst <= 1'b1;
        raddr <= ireq.addr;
      end
    end
  end

  // A loop instruction may only start a bundle.
  a_loop_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      (got && !is_loopb && !is_loope && h1_is_op) |->
      (opc(h1) != OP_LOOPB && opc(h1) != OP_LOOPE))
    else $error("loop instruction in the second half of a bundle");

endmodule
