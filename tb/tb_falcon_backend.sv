// tb_falcon_backend: checks the SIMD backend on its own against the
// instruction-level reference model. Random micro-op streams at random lane
// widths (arithmetic including long multiplies, logic, shifts and rotates,
// PERMUTE, BITSLICE, SET_MASK, LDi values, LD/ST/IN/OUT) are offered with
// random gaps. A behavioural memory unit answers LD/ST/IN/OUT after a random
// delay. At the end every register is sent out with OUT, and all words the
// backend sent out must equal the model's. HALT must raise halted only after
// the last write-back. Forwarding and read stalls must both occur.
module tb_falcon_backend;
  import falcon_pkg::*;
  import falcon_ref_pkg::*;
  localparam int unsigned MAXU = 2048;
  logic clk = 0, rst_n = 0, clear = 0;
  logic uop_valid, uop_ready;
  uop_t uop;
  logic lsu_run, lsu_done;
  opcode_e lsu_op;
  logic [31:0] lsu_addr;
  logic [XLEN-1:0] lsu_wdata, lsu_rdata;
  logic halted, fwd_event, stall_event;
  uop_t uops [MAXU];
  int n_uops = 0, u_idx = 0, checks = 0, failures = 0, n_fwd = 0, n_stall = 0;
  logic gap = 0;
  int gap_pct = 20;
  // memory unit model
  int lat = 0, cnt = 0;
  logic [31:0] tmem [int unsigned];
  logic [31:0] in_words [8192];
  int in_rd = 0;
  logic [31:0] rx[$];

  always #5 clk = ~clk;
  falcon_backend dut (.*);

  assign uop_valid = (u_idx < n_uops) && !gap;
  assign uop       = uops[u_idx % MAXU];

  always @(negedge clk) gap <= ($urandom_range(99) < gap_pct);

  always @(posedge clk) begin
    if (uop_valid && uop_ready) u_idx <= u_idx + 1;
    if (fwd_event) n_fwd++;
    if (stall_event) n_stall++;
  end

  assign lsu_done = lsu_run && (cnt == lat);
  always_comb begin
    lsu_rdata = '0;
    for (int k = 0; k < 8; k++) begin
      if (lsu_op == OP_IN)
        lsu_rdata[32*k +: 32] = in_words[(in_rd + k) % 8192];
      else if (lsu_op == OP_LD && tmem.exists(lsu_addr + 4*k))
        lsu_rdata[32*k +: 32] = tmem[lsu_addr + 4*k];
    end
  end
  always @(posedge clk) begin
    if (!lsu_run) cnt <= 0;
    else if (lsu_done) begin
      cnt <= 0;
      lat <= $urandom_range(0, 9);
      case (lsu_op)
        OP_IN:  in_rd <= in_rd + 8;
        OP_ST:  for (int k = 0; k < 8; k++) tmem[lsu_addr + 4*k] = lsu_wdata[32*k +: 32];
        OP_OUT: for (int k = 0; k < 8; k++) rx.push_back(lsu_wdata[32*k +: 32]);
        default: ;
      endcase
    end else cnt <= cnt + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic v256_t rnd256();
    v256_t v;
    for (int j = 0; j < 8; j++) v[32*j +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    falcon_model m;
    instr_t i;
    uop_t u;
    int w, t;
    m = new();
    foreach (in_words[k]) begin
      in_words[k] = $urandom;
      m.inq.push_back(in_words[k]);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    clear = 1;                 // registers start empty, as after a program start
    @(negedge clk);
    clear = 0;
    w = 0;
    for (int n = 0; n < 1500; n++) begin
      int kind;
      kind = $urandom_range(19);
      if (kind == 0) begin
        i = mk(OP_SETW, 0, 0, 0, $urandom_range(5));
      end else if (kind <= 3) begin
        i = mk_ldi($urandom_range(15), $urandom_range(5), rnd256());
      end else if (kind == 4) begin
        i = mk(OP_SETM, $urandom_range(15));
      end else if (kind == 5) begin
        i = mk(opcode_e'(OP_SLI + $urandom_range(3)), $urandom_range(15), 0, 0, $urandom_range(127));
      end else if (kind == 6) begin
        i = mk(opcode_e'(OP_LD + $urandom_range(3)), $urandom_range(15), $urandom_range(15));
      end else begin
        opcode_e ops[11] = '{OP_PERM, OP_BSLICE, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR,
                             OP_XOR, OP_NOT, OP_MOV, OP_MUL};
        i = mk(ops[$urandom_range(10)], $urandom_range(15), $urandom_range(15), $urandom_range(7));
      end
      m.exec(i);
      if (i.op == OP_SETW) begin w = i.imm7; continue; end
      u = '0;
      u.op = i.op; u.rd = 4'(i.rd); u.rs2 = 4'(i.rs2); u.rs3 = 4'(i.rs3);
      u.imm7 = 7'(i.imm7); u.width = wcode_t'(w);
      if (i.op == OP_LDI) u.imm = r_spread(i.val, i.lw, w);
      uops[n_uops++] = u;
    end
    for (int r = 0; r < 16; r++) begin
      i = mk(OP_OUT, r);
      m.exec(i);
      u = '0; u.op = OP_OUT; u.rd = 4'(r); u.width = wcode_t'(w);
      uops[n_uops++] = u;
    end
    u = '0; u.op = OP_HALT;
    uops[n_uops++] = u;
    t = 0;
    while (!halted && t < 200000) begin @(posedge clk); t++; end
    check(halted, "halted after HALT");
    check(u_idx == n_uops, "every micro-op accepted");
    check(rx.size() == m.outq.size(), $sformatf("output words %0d vs %0d", rx.size(), m.outq.size()));
    for (int k = 0; k < rx.size() && k < m.outq.size(); k++)
      check(rx[k] === m.outq[k], $sformatf("output word %0d: %h vs %h", k, rx[k], m.outq[k]));
    check(n_fwd > 0, "forwarding happened");
    check(n_stall > 0, "read stalls happened");
    // clear empties the register file
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    rx.delete();
    n_uops = 0;
    u_idx = 0;
    u = '0; u.op = OP_OUT; u.rd = 4'd5;
    uops[n_uops++] = u;
    repeat (50) @(posedge clk);
    check(rx.size() == 8 && rx[0] == 0 && rx[7] == 0, "clear empties the registers");
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
