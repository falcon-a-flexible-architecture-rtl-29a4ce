// falcon_decode: instruction decode unit of the Falcon frontend.
//
// Takes 32-bit bundles from the fetch buffer and splits them into 16-bit
// instruction words, low half first, one word per cycle. Short instructions
// become a decoded micro-op (uop_t) at once. A long LDi is followed by its
// immediate, one 16-bit word per cycle, least significant first; the unit
// collects it and then spreads it over the 256-bit register according to the
// current lane width W and the load width L:
//   L <  W: every lane receives the immediate, zero extended;
//   L >= W: the immediate is repeated to fill 256 bits, then cut into lanes.
// SET_WIDTH is executed here: the unit keeps the current width and attaches
// it to every micro-op it issues. NOP is dropped. After a HALT it stops.
// Output: uop_valid/uop are registered and held until uop_ready. start clears
// the unit (width returns to 8 bits, which is this design's reset choice).
// The LDi spreading rule and the width tracking follow the document; the
// one-word-per-cycle split is this design's choice.
module falcon_decode
  import falcon_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  // fetch buffer
  input  logic        buf_empty,
  input  logic [31:0] buf_rdata,
  output logic        buf_pop,
  // to the backend
  output logic        uop_valid,
  output uop_t        uop,
  input  logic        uop_ready,
  output wcode_t      cur_width
);
  logic            hsel;        // which half of the bundle is next
  logic            collecting;  // gathering LDi immediate words
  logic [4:0]      imm_cnt, imm_total;
  logic [XLEN-1:0] imm_acc;
  logic [3:0]      ldi_rd;
  wcode_t          ldi_w;
  logic            stopped;
  logic            consume;
  logic [15:0]     hw;
  opcode_e         op;

  assign hw      = hsel ? buf_rdata[31:16] : buf_rdata[15:0];
  assign op      = opcode_e'(hw[15:11]);
  assign consume = !buf_empty && !stopped && (!uop_valid || uop_ready);
  assign buf_pop = consume && hsel;

  // The immediate with the current word added, and that value spread over
  // the register for every pair (load width L, lane width W). The pair in
  // use is selected when the micro-op is issued.
  logic [XLEN-1:0] acc_next, spread_v;
  logic [XLEN-1:0] spread_tab [6][6];

  always_comb begin
    acc_next = imm_acc;
    acc_next[16*imm_cnt[3:0] +: 16] = hw;
  end

  for (genvar gl = 0; gl < 6; gl++) begin : g_l
    for (genvar gw = 0; gw < 6; gw++) begin : g_w
      localparam int unsigned L = 8 << gl;
      localparam int unsigned W = 8 << gw;
      if (L >= W) begin : g_rep
        assign spread_tab[gl][gw] = {(XLEN / L){acc_next[L-1:0]}};
      end else begin : g_ext
        assign spread_tab[gl][gw] = {(XLEN / W){{(W - L){1'b0}}, acc_next[L-1:0]}};
      end
    end
  end

  assign spread_v = (ldi_w <= W256 && cur_width <= W256) ? spread_tab[ldi_w][cur_width] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hsel       <= 1'b0;
      collecting <= 1'b0;
      imm_cnt    <= '0;
      imm_total  <= '0;
      imm_acc    <= '0;
      ldi_rd     <= '0;
      ldi_w      <= W8;
      stopped    <= 1'b0;
      cur_width  <= W8;
      uop_valid  <= 1'b0;
      uop        <= '0;
    end else if (start) begin
      hsel       <= 1'b0;
      collecting <= 1'b0;
      imm_cnt    <= '0;
      stopped    <= 1'b0;
      cur_width  <= W8;
      uop_valid  <= 1'b0;
    end else begin
      if (uop_valid && uop_ready) uop_valid <= 1'b0;
      if (consume) begin
        hsel <= !hsel;
        if (collecting) begin
          imm_acc <= acc_next;
          imm_cnt <= imm_cnt + 1'b1;
          if (imm_cnt + 1'b1 == imm_total) begin
            collecting <= 1'b0;
            uop_valid  <= 1'b1;
            uop.op     <= OP_LDI;
            uop.rd     <= ldi_rd;
            uop.rs2    <= '0;
            uop.rs3    <= '0;
            uop.imm7   <= '0;
            uop.width  <= cur_width;
            uop.imm    <= spread_v;
          end
        end else begin
          unique case (op)
            OP_NOP, OP_LOOPB, OP_LOOPE: ;
            OP_SETW: if (hw[6:4] <= W256) cur_width <= wcode_t'(hw[6:4]);
            OP_LDI: begin
              collecting <= 1'b1;
              imm_cnt    <= '0;
              imm_total  <= 5'(ldi_halfwords(wcode_t'(hw[6:4] <= W256 ? hw[6:4] : W256)));
              imm_acc    <= '0;
              ldi_rd     <= hw[3:0];
              ldi_w      <= (hw[6:4] <= W256) ? wcode_t'(hw[6:4]) : W256;
            end
            default: begin
              uop_valid <= 1'b1;
              uop.op    <= op;
              uop.rd    <= hw[3:0];
              uop.rs2   <= hw[7:4];
              uop.rs3   <= {hw[3], hw[10:8]};
              uop.imm7  <= hw[10:4];
              uop.width <= cur_width;
              uop.imm   <= '0;
              if (op == OP_HALT) stopped <= 1'b1;
            end
          endcase
        end
      end
    end
  end
endmodule
