// tb_falcon_fetch: checks the fetch unit with its loop stack against a
// program-level loop interpreter. Random programs with nested loops (up to
// the stack depth), long LDi instructions whose immediate words may look
// like loop opcodes, and a final HALT are assembled into memory behind a
// stalling bus. The bundles pushed into a real fetch buffer, drained at a
// random rate, must hold exactly the dynamic instruction sequence, loops
// unrolled and loop instructions removed, ending with the bundle that holds
// HALT. The number of taken LOOP_ENDs is checked, and a program nesting
// deeper than the stack must raise the loop error.
module tb_falcon_fetch;
  import falcon_pkg::*;
  import falcon_ref_pkg::*;
  localparam int unsigned BASE = 32'h400;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] start_pc = BASE;
  bus_req_t ireq;
  logic ireq_ready;
  bus_rsp_t irsp;
  logic buf_push, buf_pop, buf_full, buf_empty;
  logic [31:0] buf_wdata, buf_rdata;
  logic [3:0] buf_count;
  logic running, loop_error, loop_taken, loop_exit;
  int checks = 0, failures = 0, n_taken = 0, pop_pct = 70;
  logic [15:0] rx[$];

  always #5 clk = ~clk;

  falcon_fetch #(.BUF_DEPTH(8), .LOOP_DEPTH(4)) dut (.*);
  falcon_fifo #(.WIDTH(32), .DEPTH(8)) u_buf (
    .clk(clk), .rst_n(rst_n), .clear(start), .push(buf_push), .wdata(buf_wdata),
    .pop(buf_pop), .rdata(buf_rdata), .full(buf_full), .empty(buf_empty), .count(buf_count));
  falcon_mem_model #(.WORDS(4096), .STALL_PCT(20)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(ireq), .ready(ireq_ready), .rsp(irsp));

  assign buf_pop = !buf_empty && ($urandom_range(99) < pop_pct);

  always @(posedge clk) begin
    if (buf_pop) begin
      rx.push_back(buf_rdata[15:0]);
      rx.push_back(buf_rdata[31:16]);
    end
    if (loop_taken) n_taken++;
    if (buf_push && buf_full) begin
      failures++;
      $display("FAIL: push into a full buffer");
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic instr_t rnd_instr();
    int unsigned k;
    k = $urandom_range(9);
    case (k)
      0, 1, 2: begin
        v256_t v;
        for (int j = 0; j < 8; j++) v[32*j +: 32] = $urandom;
        // make some immediate words look like loop instructions
        if ($urandom_range(1)) v[15:11] = 5'($urandom_range(1) ? OP_LOOPB : OP_LOOPE);
        if ($urandom_range(1)) v[31:27] = 5'($urandom_range(1) ? OP_LOOPB : OP_LOOPE);
        return mk_ldi($urandom_range(15), $urandom_range(5), v);
      end
      3: return mk(OP_SETW, $urandom_range(15), 0, 0, $urandom_range(5));
      4: return mk(OP_SLI, $urandom_range(15), 0, 0, $urandom_range(127));
      5: return mk(OP_NOP);
      default: return mk(opcode_e'(OP_ADD + $urandom_range(5)), $urandom_range(15),
                         $urandom_range(15), $urandom_range(7));
    endcase
  endfunction

  function automatic void gen(ref instr_t p[$], input int depth, input int n);
    for (int k = 0; k < n; k++) begin
      if (depth < 4 && $urandom_range(5) == 0) begin
        p.push_back(mk_loop($urandom_range(3)));
        gen(p, depth + 1, $urandom_range(1, 4));
        p.push_back(mk(OP_LOOPE));
      end else begin
        p.push_back(rnd_instr());
      end
    end
  endfunction

  // Program-level interpretation of the loops.
  function automatic int unroll(instr_t p[$], ref instr_t o[$]);
    int pc = 0, jumps = 0;
    int st_pc[$], st_cnt[$];
    o.delete();
    while (pc < p.size()) begin
      if (p[pc].op == OP_LOOPB) begin
        st_pc.push_back(pc + 1);
        st_cnt.push_back(p[pc].count);
        pc++;
      end else if (p[pc].op == OP_LOOPE) begin
        if (st_cnt[$] != 0) begin
          st_cnt[$] = st_cnt[$] - 1;
          pc = st_pc[$];
          jumps++;
        end else begin
          void'(st_pc.pop_back());
          void'(st_cnt.pop_back());
          pc++;
        end
      end else begin
        o.push_back(p[pc]);
        if (p[pc].op == OP_HALT) break;
        pc++;
      end
    end
    return jumps;
  endfunction

  // Instruction words without NOPs, up to and including HALT; also
  // reports how many words followed HALT.
  function automatic void strip(logic [15:0] h[$], ref logic [15:0] o[$], ref int after);
    int k = 0;
    o.delete();
    after = -1;
    while (k < h.size()) begin
      opcode_e op;
      op = opcode_e'(h[k][15:11]);
      if (op == OP_LDI) begin
        int n;
        n = ldi_halfwords(wcode_t'(h[k][6:4]));
        for (int j = 0; j <= n && k + j < h.size(); j++) o.push_back(h[k + j]);
        k += n + 1;
      end else begin
        if (op != OP_NOP) o.push_back(h[k]);
        k++;
        if (op == OP_HALT) begin
          after = h.size() - k;
          break;
        end
      end
    end
  endfunction

  task automatic load(instr_t p[$]);
    logic [15:0] hw[$];
    assemble(p, hw);
    for (int k = 0; k < hw.size() / 2; k++)
      u_mem.mem[BASE / 4 + k] = {hw[2*k + 1], hw[2*k]};
  endtask

  task automatic go();
    rx.delete();
    n_taken = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    instr_t p[$], flat[$];
    logic [15:0] ehw[$], e[$], g[$];
    int jumps, after, t;
    foreach (u_mem.mem[i]) u_mem.mem[i] = 32'hffff_ffff;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      p.delete();
      gen(p, 0, $urandom_range(2, 12));
      p.push_back(mk(OP_HALT));
      jumps = unroll(p, flat);
      assemble(flat, ehw);
      strip(ehw, e, after);
      pop_pct = (n % 3 == 0) ? 100 : 30;
      load(p);
      go();
      t = 0;
      while ((running || !buf_empty) && t < 20000) begin @(posedge clk); t++; end
      repeat (20) @(posedge clk);
      check(!running && buf_empty, "program ran to its end");
      strip(rx, g, after);
      check(g == e, $sformatf("instruction stream of program %0d (%0d vs %0d words)", n, g.size(), e.size()));
      check(after >= 0 && after <= 1, "HALT in the last fetched bundle");
      check(n_taken == jumps, "taken loop ends");
      check(!loop_error, "no loop error");
    end
    // five nested loops overflow the four-entry stack
    p.delete();
    for (int k = 0; k < 5; k++) p.push_back(mk_loop(0));
    p.push_back(mk(OP_ADD, 1, 2, 3));
    for (int k = 0; k < 5; k++) p.push_back(mk(OP_LOOPE));
    p.push_back(mk(OP_HALT));
    load(p);
    go();
    repeat (200) @(posedge clk);
    check(loop_error, "loop stack overflow reported");
    go();
    check(!loop_error, "start clears the loop error");
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
