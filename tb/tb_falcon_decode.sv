// tb_falcon_decode: checks the decode unit against the reference spreading
// function and the encoding. Random instruction lists (all register forms,
// immediate forms, LDi at every load width under every lane width, SET_WIDTH,
// NOPs and loop bundles) are assembled into 32-bit bundles and offered with
// random gaps while the backend side accepts micro-ops at a random rate.
// Every micro-op must carry the fields of its instruction, the current lane
// width and, for LDi, the correctly spread immediate. NOP, SET_WIDTH and loop
// instructions must not issue, nothing may issue after HALT, and start must
// return the width to 8 bits.
module tb_falcon_decode;
  import falcon_pkg::*;
  import falcon_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic buf_empty, buf_pop;
  logic [31:0] buf_rdata;
  logic uop_valid, uop_ready;
  uop_t uop;
  wcode_t cur_width;
  logic [31:0] bmem [4096];
  int b_rd = 0, b_wr = 0, checks = 0, failures = 0, rdy_pct = 60, gap_pct = 20;
  logic gap = 0;
  uop_t got[$];

  always #5 clk = ~clk;
  falcon_decode dut (.*);

  assign buf_empty = (b_rd == b_wr) || gap;
  assign buf_rdata = bmem[b_rd % 4096];

  always @(negedge clk) begin
    gap       <= ($urandom_range(99) < gap_pct);
    uop_ready <= ($urandom_range(99) < rdy_pct);
  end
  always @(posedge clk) begin
    if (buf_pop) b_rd <= b_rd + 1;
    if (uop_valid && uop_ready) got.push_back(uop);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic instr_t rnd_instr();
    v256_t v;
    for (int j = 0; j < 8; j++) v[32*j +: 32] = $urandom;
    case ($urandom_range(9))
      0, 1:    return mk_ldi($urandom_range(15), $urandom_range(5), v);
      2:       return mk(OP_SETW, 0, 0, 0, $urandom_range(5));
      3:       return mk(opcode_e'(OP_SLI + $urandom_range(3)), $urandom_range(15), 0, 0,
                         $urandom_range(127));
      4:       return mk(OP_NOP);
      5:       return mk_loop($urandom_range(2047));
      6:       return mk(OP_LOOPE);
      default: return mk(opcode_e'($urandom_range(OP_SETM, OP_MOV)), $urandom_range(15),
                         $urandom_range(15), $urandom_range(7), 0);
    endcase
  endfunction

  initial begin
    instr_t p[$];
    logic [15:0] hw[$], one[$];
    uop_t exp_q[$], e;
    int w;
    foreach (bmem[i]) bmem[i] = 0;
    uop_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      p.delete();
      for (int k = 0; k < 60; k++) p.push_back(rnd_instr());
      p.push_back(mk(OP_HALT));
      p.push_back(mk(OP_ADD, 1, 2, 3));   // must not issue
      // expected micro-ops
      exp_q.delete();
      w = 0;
      foreach (p[k]) begin
        if (p[k].op == OP_SETW) begin w = p[k].imm7; continue; end
        if (p[k].op inside {OP_NOP, OP_LOOPB, OP_LOOPE, OP_SETW}) continue;
        e = '0;
        e.op = p[k].op;
        e.width = wcode_t'(w);
        if (p[k].op == OP_LDI) begin
          e.rd  = 4'(p[k].rd);
          e.imm = r_spread(p[k].val, p[k].lw, w);
        end else begin
          one.delete();
          assemble('{p[k]}, one);
          e.rd   = one[0][3:0];
          e.rs2  = one[0][7:4];
          e.rs3  = {one[0][3], one[0][10:8]};
          e.imm7 = one[0][10:4];
        end
        exp_q.push_back(e);
        if (p[k].op == OP_HALT) break;
      end
      assemble(p, hw);
      got.delete();
      gap_pct = (n % 2) ? 0 : 30;
      rdy_pct = (n % 3) ? 100 : 40;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      check(cur_width == W8, "start returns the width to 8 bits");
      b_rd = 0;
      b_wr = 0;
      for (int k = 0; k < hw.size() / 2; k++) bmem[k] = {hw[2*k + 1], hw[2*k]};
      b_wr = hw.size() / 2;
      repeat (hw.size() * 4 + 100) @(posedge clk);
      check(got.size() == exp_q.size(), $sformatf("micro-op count %0d vs %0d", got.size(), exp_q.size()));
      for (int k = 0; k < got.size() && k < exp_q.size(); k++)
        check(got[k] == exp_q[k], $sformatf("micro-op %0d (%s)", k, exp_q[k].op.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
