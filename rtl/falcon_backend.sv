// falcon_backend: Falcon's SIMD backend.
//
// Executes decoded micro-ops in three stages: register read, execute and
// write back. The register file is 16 x 256 bits, split into sixteen 16-bit
// slices that feed sixteen 16-bit execution units (falcon_exec_unit).
//
// Register read: R1, R2 and R3 are read and forwarded from the execute stage
// (when it completes in the same cycle) and from the write-back stage, which
// removes all read-after-write stalls; masked bytes of a forwarded result
// keep the older value. A micro-op leaves register read only when the execute
// stage is free or finishing.
// Execute: one cycle, except
//   * MUL with lanes of 32 bits or more: schoolbook multiplication over
//     K = W/16 cycles. In cycle i digit i of each lane's multiplier is
//     broadcast to every unit of the lane, which adds digit j-i of the
//     multiplicand times that digit to its accumulator, carries rippling
//     from unit to unit. A 256-bit product therefore takes 16 cycles;
//   * PERMUTE: 1 to 4 passes through the permutation network;
//   * LD, ST, IN, OUT: until the memory unit has moved all eight words.
// 8-bit lanes use each unit as two 8-bit MACs; wider additions chain the
// carries of the units of a lane. Results are written under the lane masks
// of falcon_lane_ctrl; BITSLICE writes every bit and masks its source lanes
// instead. SET_MASK updates the mask register; HALT sets halted once every
// earlier instruction has written back.
// The stage split, forwarding, the unit structure, the multiply schedule and
// the cycle counts follow the document. Shifts by an immediate, the exact
// instruction set and the carry-chain adder are this design's choices. The
// multiplier digits reach the units through multiplexers in this module, not
// through the permutation network as in the document.
module falcon_backend
  import falcon_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  // from decode
  input  logic            uop_valid,
  input  uop_t            uop,
  output logic            uop_ready,
  // memory unit
  output logic            lsu_run,
  output opcode_e         lsu_op,
  output logic [31:0]     lsu_addr,
  output logic [XLEN-1:0] lsu_wdata,
  input  logic            lsu_done,
  input  logic [XLEN-1:0] lsu_rdata,
  // status
  output logic            halted,
  output logic            fwd_event,     // an operand was forwarded this cycle
  output logic            stall_event    // register read held by a busy execute stage
);
  // ---------------- register read ----------------
  logic [XLEN-1:0] rf1, rf2, rf3, op1, op2, op3;
  logic            advance;

  // execute stage registers
  logic            ex_valid;
  uop_t            ex;
  logic [XLEN-1:0] ex_a, ex_b, ex_c;
  logic [3:0]      ex_cyc;
  logic            ex_done, ex_we;
  logic [XLEN-1:0] ex_res;
  logic [NBYTES-1:0] ex_be;

  // write-back stage registers
  logic              wb_valid, wb_we;
  logic [3:0]        wb_rd;
  logic [XLEN-1:0]   wb_data;
  logic [NBYTES-1:0] wb_be;

  falcon_regfile u_rf (
    .clk  (clk),
    .clear(clear),
    .ra1  (uop.rd),
    .ra2  (uop.rs2),
    .ra3  (uop.rs3),
    .rd1  (rf1),
    .rd2  (rf2),
    .rd3  (rf3),
    .we   (wb_valid && wb_we),
    .wa   (wb_rd),
    .wbe  (wb_be),
    .wd   (wb_data)
  );

  function automatic logic [XLEN-1:0] merge(input logic [XLEN-1:0] old_v,
                                            input logic [XLEN-1:0] new_v,
                                            input logic [NBYTES-1:0] be);
    logic [XLEN-1:0] r;
    for (int b = 0; b < NBYTES; b++) r[8*b +: 8] = be[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
    return r;
  endfunction

  logic ex_fwd_ok, wb_fwd_ok;
  assign ex_fwd_ok = ex_valid && ex_done && ex_we;
  assign wb_fwd_ok = wb_valid && wb_we;

  function automatic logic [XLEN-1:0] fwd(input logic [3:0] ra, input logic [XLEN-1:0] rf,
                                          input logic exok, input logic [3:0] exrd,
                                          input logic [XLEN-1:0] exv, input logic [NBYTES-1:0] exbe,
                                          input logic wbok, input logic [3:0] wbrd,
                                          input logic [XLEN-1:0] wbv, input logic [NBYTES-1:0] wbbe);
    logic [XLEN-1:0] v;
    v = rf;
    if (wbok && wbrd == ra) v = merge(v, wbv, wbbe);
    if (exok && exrd == ra) v = merge(v, exv, exbe);
    return v;
  endfunction

  assign op1 = fwd(uop.rd,  rf1, ex_fwd_ok, ex.rd, ex_res, ex_be, wb_fwd_ok, wb_rd, wb_data, wb_be);
  assign op2 = fwd(uop.rs2, rf2, ex_fwd_ok, ex.rd, ex_res, ex_be, wb_fwd_ok, wb_rd, wb_data, wb_be);
  assign op3 = fwd(uop.rs3, rf3, ex_fwd_ok, ex.rd, ex_res, ex_be, wb_fwd_ok, wb_rd, wb_data, wb_be);

  assign uop_ready   = !ex_valid || ex_done;
  assign advance     = uop_valid && uop_ready;
  assign stall_event = uop_valid && !uop_ready;
  assign fwd_event   = advance && (
      (ex_fwd_ok && (ex.rd == uop.rd || ex.rd == uop.rs2 || ex.rd == uop.rs3)) ||
      (wb_fwd_ok && (wb_rd == uop.rd || wb_rd == uop.rs2 || wb_rd == uop.rs3)));

  // ---------------- execute ----------------
  logic              is_add, is_sub, is_mul, is_logic, is_long_mul;
  logic [3:0]        k_last;          // last multiply step, K - 1
  logic [NBYTES-1:0] lane_be, mask_unused;
  logic [15:0]       acc_q [NUNITS];  // per-unit accumulators
  logic              u_split, u_logic;
  logic [1:0]        u_lop;
  logic [XLEN-1:0]   unit_res, shift_res, bs_res, perm_res;
  logic              perm_done;

  assign is_add      = (ex.op == OP_ADD);
  assign is_sub      = (ex.op == OP_SUB);
  assign is_mul      = (ex.op == OP_MUL);
  assign is_logic    = (ex.op inside {OP_AND, OP_OR, OP_XOR, OP_NOT, OP_MOV});
  assign is_long_mul = is_mul && (ex.width >= W32);
  assign k_last      = 4'((1 << (ex.width - 1)) - 1);   // W/16 - 1 for W >= 32

  assign u_split = (ex.width == W8);
  assign u_logic = is_logic;
  always_comb begin
    unique case (ex.op)
      OP_AND:  u_lop = 2'd0;
      OP_OR:   u_lop = 2'd1;
      OP_MOV:  u_lop = 2'd1;
      OP_XOR:  u_lop = 2'd2;
      default: u_lop = 2'd3;
    endcase
  end

  // Operand routing into the units. Digit broadcast and digit shift for the
  // long multiply come over the permutation network's broadcast path.
  for (genvar u = 0; u < NUNITS; u++) begin : g_unit
    logic [15:0] ua, ub, uc, ud;
    logic [31:0] uy, prev_y;   // this unit's result, the lower neighbour's result

    if (u == 0) begin : g_first
      assign prev_y = '0;
    end else begin : g_next
      assign prev_y = g_unit[u-1].uy;
    end

    always_comb begin
      int unsigned kd, j, base, i;
      logic [15:0] x, y;
      kd   = (ex.width >= W32) ? (1 << (ex.width - 1)) : 1;  // digits per lane
      j    = u & (kd - 1);
      base = u - j;
      i    = 32'(ex_cyc);
      x    = ex_b[16*u +: 16];
      y    = ex_c[16*u +: 16];
      ua = '0;
      ub = '0;
      uc = '0;
      ud = '0;
      if (is_add || is_sub) begin
        ua = x;
        ub = is_sub ? ~y : y;
        if (ex.width == W8) begin
          uc = is_sub ? 16'h0101 : 16'h0000;
          ud = 16'h0101;
        end else begin
          if (j == 0) uc = {15'h0, is_sub};
          else uc = {15'h0, prev_y[16]};
          ud = 16'h0001;
        end
      end else if (is_mul && !is_long_mul) begin
        uc = x;
        ud = y;
      end else if (is_long_mul) begin
        ua = (i == 0) ? 16'h0 : acc_q[u];
        if (j != 0) ub = prev_y[31:16];
        uc = (j >= i) ? ex_b[16*(base + j - i) +: 16] : 16'h0;
        ud = ex_c[16*(base + i) +: 16];
      end else if (is_logic) begin
        ua = x;
        ub = (ex.op == OP_MOV) ? 16'h0 : y;
      end
    end

    falcon_exec_unit u_eu (
      .split    (u_split && !is_logic),
      .sel_logic(u_logic),
      .lop      (u_lop),
      .a        (ua),
      .b        (ub),
      .c        (uc),
      .d        (ud),
      .y        (uy)
    );

    assign unit_res[16*u +: 16] = (u_split && !is_logic) ? {uy[23:16], uy[7:0]}
                                                         : uy[15:0];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                            acc_q[u] <= '0;
      else if (clear)                        acc_q[u] <= '0;
      else if (ex_valid && is_long_mul)      acc_q[u] <= uy[15:0];
    end
  end

  falcon_shifter u_shift (
    .x    (ex_a),
    .width(ex.width),
    .kind (2'(ex.op - OP_SLI)),
    .amt  (ex.imm7),
    .y    (shift_res)
  );

  falcon_lane_ctrl u_lanes (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (clear),
    .width   (ex.width),
    .set_mask(ex_valid && ex.op == OP_SETM),
    .src     (ex_a),
    .mask    (mask_unused),
    .be      (lane_be)
  );

  falcon_bitslice u_bslice (
    .x     (ex_b),
    .width (ex.width),
    .src_be(lane_be),
    .y     (bs_res)
  );

  falcon_permute u_perm (
    .clk  (clk),
    .rst_n(rst_n),
    .run  (ex_valid && ex.op == OP_PERM),
    .width(ex.width),
    .idx  (ex_b),
    .data (ex_c),
    .done (perm_done),
    .y    (perm_res),
    .pass ()
  );

  assign lsu_run   = ex_valid && (ex.op inside {OP_LD, OP_ST, OP_IN, OP_OUT});
  assign lsu_op    = ex.op;
  assign lsu_addr  = ex_b[31:0];
  assign lsu_wdata = ex_a;

  always_comb begin
    ex_res = unit_res;
    ex_we  = 1'b1;
    ex_be  = lane_be;
    ex_done = 1'b1;
    unique case (ex.op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_MOV: ;
      OP_MUL:    ex_done = !is_long_mul || (ex_cyc == k_last);
      OP_SLI, OP_SRI, OP_ROLI, OP_RORI: ex_res = shift_res;
      OP_LDI:    ex_res = ex.imm;
      OP_PERM: begin
        ex_res  = perm_res;
        ex_done = perm_done;
      end
      OP_BSLICE: begin
        ex_res = bs_res;
        ex_be  = '1;
      end
      OP_LD, OP_IN: begin
        ex_res  = lsu_rdata;
        ex_done = lsu_done;
      end
      OP_ST, OP_OUT: begin
        ex_we   = 1'b0;
        ex_done = lsu_done;
      end
      default: ex_we = 1'b0;   // SET_MASK, HALT, NOP
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex       <= '0;
      ex_a     <= '0;
      ex_b     <= '0;
      ex_c     <= '0;
      ex_cyc   <= '0;
      wb_valid <= 1'b0;
      wb_we    <= 1'b0;
      wb_rd    <= '0;
      wb_data  <= '0;
      wb_be    <= '0;
      halted   <= 1'b0;
    end else if (clear) begin
      ex_valid <= 1'b0;
      ex_cyc   <= '0;
      wb_valid <= 1'b0;
      halted   <= 1'b0;
    end else begin
      // write back
      wb_valid <= ex_valid && ex_done;
      wb_we    <= ex_we;
      wb_rd    <= ex.rd;
      wb_data  <= ex_res;
      wb_be    <= ex_be;
      if (ex_valid && ex_done && ex.op == OP_HALT) halted <= 1'b1;
      // execute
      if (ex_valid && !ex_done) ex_cyc <= ex_cyc + 1'b1;
      if (advance) begin
        ex_valid <= 1'b1;
        ex       <= uop;
        ex_a     <= op1;
        ex_b     <= op2;
        ex_c     <= op3;
        ex_cyc   <= '0;
      end else if (ex_done) begin
        ex_valid <= 1'b0;
      end
    end
  end
endmodule
