// falcon_lsu: the LD and ST units of Falcon's memory unit.
//
// Moves one 256-bit register to or from memory or the data buffers, as eight
// 32-bit words, least significant word first:
//   LD  reads  words addr, addr+4, ... addr+28 over the scratchpad/memory bus
//   ST  writes them
//   IN  pops eight words from the input buffer (host-to-Falcon FIFO)
//   OUT pushes eight words into the output buffer (Falcon-to-host FIFO)
// The backend holds run high while the instruction is in its execute stage
// and is stalled until done, which is high in the cycle the last word moves;
// rdata is then complete. An empty input buffer or a full output buffer makes
// the unit wait, which blocks execution as the architecture requires. Bus
// transfers are issued one at a time (a new request only after the previous
// response). waiting is high in every cycle the unit cannot move a word.
// The word order, the one-outstanding bus protocol and the 32-bit buffer
// entries are this design's choices.
module falcon_lsu
  import falcon_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  opcode_e         op,
  input  logic [31:0]     addr,
  input  logic [XLEN-1:0] wdata,
  output logic            done,
  output logic [XLEN-1:0] rdata,
  output logic            waiting,
  // scratchpad / memory bus
  output bus_req_t        dreq,
  input  logic            dreq_ready,
  input  bus_rsp_t        drsp,
  // input buffer
  input  logic            in_empty,
  input  logic [31:0]     in_data,
  output logic            in_pop,
  // output buffer
  input  logic            out_full,
  output logic            out_push,
  output logic [31:0]     out_data
);
  logic [2:0]      k;          // word being transferred
  logic            outst;      // bus request outstanding
  logic [XLEN-1:0] buf_q;
  logic            is_mem;
  logic            move;       // a word completes this cycle
  logic [31:0]     word_in;

  assign is_mem = (op == OP_LD) || (op == OP_ST);

  always_comb begin
    dreq       = '0;
    in_pop     = 1'b0;
    out_push   = 1'b0;
    out_data   = wdata[32*k +: 32];
    move       = 1'b0;
    word_in    = 32'h0;
    if (run) begin
      unique case (op)
        OP_IN: begin
          in_pop  = !in_empty;
          move    = !in_empty;
          word_in = in_data;
        end
        OP_OUT: begin
          out_push = !out_full;
          move     = !out_full;
        end
        OP_LD, OP_ST: begin
          dreq.valid = !outst;
          dreq.we    = (op == OP_ST);
          dreq.addr  = addr + {27'h0, k, 2'b00};
          dreq.wdata = wdata[32*k +: 32];
          move       = outst && drsp.valid;
          word_in    = drsp.rdata;
        end
        default: ;
      endcase
    end
    rdata = buf_q;
    rdata[32*k +: 32] = word_in;
  end

  assign done    = move && (k == 3'd7);
  assign waiting = run && !move;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k     <= '0;
      outst <= 1'b0;
      buf_q <= '0;
    end else if (!run) begin
      k     <= '0;
      outst <= 1'b0;
    end else begin
      if (is_mem) begin
        if (dreq.valid && dreq_ready) outst <= 1'b1;
        else if (drsp.valid)          outst <= 1'b0;
      end
      if (move) begin
        buf_q[32*k +: 32] <= word_in;
        k <= k + 1'b1;
      end
    end
  end
endmodule
