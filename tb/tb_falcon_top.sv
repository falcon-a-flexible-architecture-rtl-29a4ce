// tb_falcon_top: end-to-end test of the Falcon co-processor at its default
// parameters (shared memory bus, 16-entry data buffers, 8-entry fetch
// buffer, 4-entry loop stack).
//
// The test generates a program, runs it on a reference interpreter and on
// the RTL, and compares every word the program writes to the output buffer
// and every word it stores to memory. The program covers every width from 8
// to 256 bits, LDi in its spreading and repeating forms, masked execution,
// PERMUTE with 4, 2 and 1 passes, BITSLICE in both directions (including the
// bitsliced 32-bit permutation pattern of DES), 256-bit multiplication,
// nested hardware loops, loads and stores over the shared bus, and a random
// instruction mix that produces read-after-write forwarding. The host feeds
// the input buffer slowly and drains the output buffer slowly, so the
// backend must block on both. Each mechanism is counted and a mechanism that
// never happened is a failure. A rejected program pointer is checked too,
// and a second program overflows the loop stack.
module tb_falcon_top;
  import falcon_pkg::*;
  import falcon_ref_pkg::*;

  localparam int unsigned PROG_ADDR = 32'h100;
  localparam int unsigned LD_ADDR   = 32'h5000;
  localparam int unsigned ST_ADDR   = 32'h4000;
  localparam int unsigned OVF_ADDR  = 32'h6000;

  logic        clk = 0, rst_n = 0;
  logic        host_valid = 0, host_we = 0, host_ready;
  logic [3:0]  host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  bus_req_t    mem_req, spm_req;
  logic        mem_ready;
  bus_rsp_t    mem_rsp, spm_rsp;
  logic        busy, done, error;

  always #5 clk = ~clk;

  falcon_top dut (
    .clk(clk), .rst_n(rst_n),
    .host_valid(host_valid), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_ready(host_ready), .host_rdata(host_rdata),
    .mem_req(mem_req), .mem_ready(mem_ready), .mem_rsp(mem_rsp),
    .spm_req(spm_req), .spm_ready(1'b1), .spm_rsp(spm_rsp),
    .busy(busy), .done(done), .error(error)
  );
  assign spm_rsp = '0;

  falcon_mem_model #(.WORDS(16384), .STALL_PCT(10)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mem_req), .ready(mem_ready), .rsp(mem_rsp)
  );

  int checks = 0, failures = 0;
  longint cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_loop_taken = 0, n_loop_exit = 0, n_fwd = 0, n_rr_stall = 0, n_in_wait = 0,
      n_out_wait = 0, n_mem_wait = 0, n_perm4 = 0, n_perm2 = 0, n_longmul16 = 0,
      n_masked = 0, n_arb_conflict = 0, n_fbuf_full = 0, n_host_in_stall = 0,
      n_host_out_stall = 0, n_bslice = 0, n_loop_ovf = 0, t_wait = 0;
  always @(posedge clk) if (rst_n && $test$plusargs("trace") && dut.u_backend.wb_valid && dut.u_backend.wb_we)
    $display("rtl: wb r%0d <= %h be=%h", dut.u_backend.wb_rd, dut.u_backend.wb_data, dut.u_backend.wb_be);
  always @(posedge clk) if (rst_n) begin
    cycles <= cycles + 1;
    if (dut.u_fetch.loop_taken) n_loop_taken++;
    if (dut.u_fetch.loop_exit) n_loop_exit++;
    if (dut.u_fetch.u_loops.push && dut.u_fetch.u_loops.full) n_loop_ovf++;
    if (dut.fwd_event) n_fwd++;
    if (dut.stall_event) n_rr_stall++;
    if (dut.lsu_waiting && dut.lsu_op == OP_IN && dut.in_empty) n_in_wait++;
    if (dut.lsu_waiting && dut.lsu_op == OP_OUT && dut.out_full) n_out_wait++;
    if (dut.lsu_waiting && (dut.lsu_op == OP_LD || dut.lsu_op == OP_ST)) n_mem_wait++;
    if (dut.u_backend.ex_valid && dut.u_backend.ex.op == OP_PERM && dut.u_backend.ex.width == W8
        && dut.u_backend.ex_done && dut.u_backend.ex_cyc == 3) n_perm4++;
    if (dut.u_backend.ex_valid && dut.u_backend.ex.op == OP_PERM && dut.u_backend.ex.width == W16
        && dut.u_backend.ex_done && dut.u_backend.ex_cyc == 1) n_perm2++;
    if (dut.u_backend.ex_valid && dut.u_backend.ex.op == OP_MUL && dut.u_backend.ex.width == W256
        && dut.u_backend.ex_done && dut.u_backend.ex_cyc == 15) n_longmul16++;
    if (dut.u_backend.ex_valid && dut.u_backend.ex_we && dut.u_backend.ex.op != OP_BSLICE
        && dut.u_backend.ex_be != '1) n_masked++;
    if (dut.u_backend.ex_valid && dut.u_backend.ex.op == OP_BSLICE) n_bslice++;
    if (dut.f_req.valid && dut.d_req.valid) n_arb_conflict++;
    if (dut.fb_full) n_fbuf_full++;
    if (host_valid && !host_ready && host_we) n_host_in_stall++;
    if (host_valid && !host_ready && !host_we) n_host_out_stall++;
  end

  // Cycle counts of the multi-cycle operations, checked where they finish.
  always @(posedge clk) if (rst_n && dut.u_backend.ex_valid && dut.u_backend.ex_done) begin
    if (dut.u_backend.ex.op == OP_MUL && dut.u_backend.ex.width >= W32) begin
      checks++;
      if (32'(dut.u_backend.ex_cyc) + 1 != (1 << (dut.u_backend.ex.width - 1))) begin
        failures++;
        $display("FAIL: long multiply at width code %0d took %0d cycles",
                 dut.u_backend.ex.width, dut.u_backend.ex_cyc + 1);
      end
    end
    if (dut.u_backend.ex.op == OP_PERM) begin
      checks++;
      if (32'(dut.u_backend.ex_cyc) + 1 != ((dut.u_backend.ex.width == W8) ? 4 :
                                            (dut.u_backend.ex.width == W16) ? 2 : 1)) begin
        failures++;
        $display("FAIL: permute at width code %0d took %0d cycles",
                 dut.u_backend.ex.width, dut.u_backend.ex_cyc + 1);
      end
    end
  end

  // ---------------- host bus functional model ----------------
  // One access; gives up (drops the request) if it has not completed within
  // 40 cycles, so that two host threads sharing the port cannot deadlock.
  semaphore hbus = new(1);

  task automatic host_try(input logic we, input logic [3:0] a, input logic [31:0] d,
                          output logic [31:0] rd, output bit ok);
    int waited;
    hbus.get(1);
    @(negedge clk);
    host_valid = 1; host_we = we; host_addr = a; host_wdata = d;
    #1;
    waited = 0;
    while (!host_ready && waited < 40) begin
      @(posedge clk);
      #1;
      waited++;
    end
    ok = host_ready;
    rd = host_rdata;
    if (ok) @(posedge clk);
    #1 host_valid = 0;
    hbus.put(1);
  endtask

  task automatic host_write(input logic [3:0] a, input logic [31:0] d);
    logic [31:0] unused;
    bit ok;
    do begin
      host_try(1'b1, a, d, unused, ok);
      if (!ok) repeat (5) @(posedge clk);
    end while (!ok);
  endtask

  task automatic host_read(input logic [3:0] a, output logic [31:0] d);
    bit ok;
    do begin
      host_try(1'b0, a, 32'h0, d, ok);
      if (!ok) repeat (5) @(posedge clk);
    end while (!ok);
  endtask

  // ---------------- program ----------------
  instr_t      prog[$];
  logic [15:0] hw[$];
  falcon_model model;
  int          des_out_index;

  function automatic v256_t rnd256();
    v256_t v;
    for (int k = 0; k < 8; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  function automatic int r3(input int rd);
    return (rd & 8) | $urandom_range(7);
  endfunction

  function automatic void gen_program();
    // DES P-permutation as a 0-based table (bit i of the result is bit P[i]).
    int des_p[32] = '{15,6,19,20,28,11,27,16,0,14,22,25,4,17,30,9,
                      1,7,23,13,31,26,2,8,18,12,29,5,21,10,3,24};
    v256_t tbl;
    int nrand = 80;
    prog.push_back(mk(OP_SETW, 0, 0, 0, 2));                    // 32-bit lanes
    prog.push_back(mk_ldi(0, 5, rnd256()));                     // full 256-bit value
    prog.push_back(mk_ldi(1, 0, 256'($urandom_range(255))));    // 8-bit, spread
    prog.push_back(mk_ldi(2, 3, rnd256()));                     // 64-bit, repeated
    prog.push_back(mk_ldi(3, 1, 256'($urandom_range(65535))));  // 16-bit, spread
    prog.push_back(mk(OP_IN, 4));
    prog.push_back(mk(OP_IN, 5));
    prog.push_back(mk(OP_ADD, 6, 4, 5));
    prog.push_back(mk(OP_SUB, 7, 6, 5));                         // forwarded operand
    prog.push_back(mk(OP_OUT, 7));
    // multiplication at every width
    for (int w = 0; w <= 5; w++) begin
      prog.push_back(mk(OP_SETW, 0, 0, 0, w));
      prog.push_back(mk(OP_MUL, 6, 4, 5));
      prog.push_back(mk(OP_OUT, 6));
    end
    // shifts and rotates
    prog.push_back(mk(OP_SETW, 0, 0, 0, 1));
    prog.push_back(mk(OP_ROLI, 9, 0, 0, 5));
    prog.push_back(mk(OP_SETW, 0, 0, 0, 4));
    prog.push_back(mk(OP_SRI, 10, 0, 0, 77));
    // masked execution at 8-bit lanes, then unmask
    prog.push_back(mk(OP_SETW, 0, 0, 0, 0));
    prog.push_back(mk(OP_SETM, 4));
    prog.push_back(mk(OP_ADD, 11, 4, 9));
    prog.push_back(mk(OP_XOR, 12, 12, 12));
    prog.push_back(mk_ldi(13, 0, 0));
    prog.push_back(mk(OP_SETW, 0, 0, 0, 2));
    prog.push_back(mk(OP_SETM, 5));                               // 32-bit lane masks
    prog.push_back(mk(OP_MUL, 11, 11, 10));
    prog.push_back(mk(OP_SETM, 13));                              // unmask all
    prog.push_back(mk(OP_OUT, 11));
    // permutations at 8, 16, 32 and 64 bits
    prog.push_back(mk(OP_SETW, 0, 0, 0, 0));
    prog.push_back(mk(OP_PERM, 14, 2, 9));
    prog.push_back(mk(OP_SETW, 0, 0, 0, 1));
    prog.push_back(mk(OP_PERM, 15, 0, 14));
    prog.push_back(mk(OP_SETW, 0, 0, 0, 2));
    prog.push_back(mk(OP_PERM, 9, 0, 11));
    prog.push_back(mk(OP_SETW, 0, 0, 0, 3));
    prog.push_back(mk(OP_PERM, 10, 4, 10));
    prog.push_back(mk(OP_OUT, 14));
    prog.push_back(mk(OP_OUT, 15));
    // DES permutation of eight 32-bit half blocks: bitslice, permute, bitslice
    tbl = '0;
    foreach (des_p[i]) tbl[8*i +: 8] = 8'(des_p[i]);
    prog.push_back(mk(OP_SETW, 0, 0, 0, 2));
    prog.push_back(mk(OP_MOV, 12, 4));
    prog.push_back(mk(OP_BSLICE, 12, 12));
    prog.push_back(mk_ldi(1, 5, tbl));
    prog.push_back(mk(OP_SETW, 0, 0, 0, 0));
    prog.push_back(mk(OP_PERM, 12, 1, 12));
    prog.push_back(mk(OP_BSLICE, 12, 12));
    prog.push_back(mk(OP_OUT, 12));
    des_out_index = 8 * 10;
    // nested hardware loops
    prog.push_back(mk(OP_SETW, 0, 0, 0, 4));
    prog.push_back(mk_loop(3));
    prog.push_back(mk(OP_ADD, 7, 7, 6));
    prog.push_back(mk_loop(2));
    prog.push_back(mk(OP_XOR, 8, 8, 15));
    prog.push_back(mk(OP_ROLI, 8, 8, 0, 3));
    prog.push_back(mk(OP_LOOPE));
    prog.push_back(mk(OP_LOOPE));
    // loads and stores over the shared bus
    prog.push_back(mk(OP_SETW, 0, 0, 0, 2));
    prog.push_back(mk_ldi(9, 2, 256'(LD_ADDR)));
    prog.push_back(mk(OP_LD, 10, 9));
    prog.push_back(mk_ldi(9, 2, 256'(ST_ADDR)));
    prog.push_back(mk(OP_ST, 8, 9));
    prog.push_back(mk(OP_ST, 10, 9));                            // overwrites; last store wins
    prog.push_back(mk(OP_LD, 13, 9));
    // random instruction mix
    void'($value$plusargs("nrand=%d", nrand));
    for (int n = 0; n < nrand; n++) begin
      int rd, k;
      opcode_e ops[11] = '{OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_MOV,
                           OP_SLI, OP_RORI, OP_PERM};
      if ($urandom_range(7) == 0) prog.push_back(mk(OP_SETW, 0, 0, 0, $urandom_range(5)));
      rd = $urandom_range(15);
      k  = $urandom_range(10);
      prog.push_back(mk(ops[k], rd, $urandom_range(15), r3(rd), $urandom_range(127)));
    end
    prog.push_back(mk(OP_SETW, 0, 0, 0, 0));
    prog.push_back(mk(OP_BSLICE, 3, 5));
    prog.push_back(mk(OP_IN, 2));
    prog.push_back(mk(OP_IN, 5));
    prog.push_back(mk(OP_IN, 7));
    for (int r = 0; r < 16; r++) prog.push_back(mk(OP_OUT, r));
    prog.push_back(mk(OP_HALT));
  endfunction

  logic [31:0] in_words[$];
  logic [31:0] got[$];

  initial begin
    logic [31:0] st;
    int n_in;
    model = new();
    gen_program();
    assemble(prog, hw);
    n_in = 0;
    foreach (prog[i]) if (prog[i].op == OP_IN) n_in++;
    for (int k = 0; k < 8 * n_in; k++) in_words.push_back($urandom);
    model.inq = in_words;
    for (int k = 0; k < 8; k++) model.mem[LD_ADDR + 4*k] = $urandom;
    model.trace = $test$plusargs("trace");
    model.run(prog);

    for (int k = 0; k < 16384; k++) u_mem.mem[k] = 32'h0;
    for (int k = 0; k < hw.size(); k += 2)
      u_mem.mem[(PROG_ADDR >> 2) + k/2] = {hw[k+1], hw[k]};
    for (int k = 0; k < 8; k++) u_mem.mem[(LD_ADDR >> 2) + k] = model.mem[LD_ADDR + 4*k];

    repeat (3) @(posedge clk);
    rst_n = 1;

    // A misaligned and an out-of-window pointer are rejected.
    host_write(4'h0, PROG_ADDR + 2);
    host_read(4'h4, st);
    check(st[2] == 1'b1 && st[0] == 1'b0 && error, "misaligned program pointer rejected");
    host_write(4'h0, 32'h0002_0000);
    host_read(4'h4, st);
    check(st[2] == 1'b1 && st[0] == 1'b0, "out-of-window program pointer rejected");

    host_write(4'h0, PROG_ADDR);
    host_read(4'h4, st);
    check(st[0] == 1'b1 && st[2] == 1'b0, "program started");
    fork
      begin   // feed input after a delay, so that IN has to wait
        repeat (300) @(posedge clk);
        foreach (in_words[k]) host_write(4'h8, in_words[k]);
      end
      begin   // drain output slowly, after a delay that lets the buffer fill
        logic [31:0] d;
        repeat (1500) @(posedge clk);
        for (int k = 0; k < model.outq.size(); k++) begin
          repeat ($urandom_range(3)) @(posedge clk);
          host_read(4'hC, d);
          got.push_back(d);
        end
      end
    join
    while (!done) @(posedge clk);
    host_read(4'h4, st);
    check(st[1] == 1'b1 && st[0] == 1'b0, "status shows done");

    check(got.size() == model.outq.size(), "output word count");
    foreach (model.outq[k]) begin
      checks++;
      if (got[k] !== model.outq[k]) begin
        failures++;
        if (failures < 20) $display("FAIL: output word %0d: got %h expected %h", k, got[k], model.outq[k]);
      end
    end
    // The DES permutation, checked against its definition: bit i of each
    // 32-bit half block becomes bit des_p[i]'s value.
    begin
      int des_p[32] = '{15,6,19,20,28,11,27,16,0,14,22,25,4,17,30,9,
                        1,7,23,13,31,26,2,8,18,12,29,5,21,10,3,24};
      for (int l = 0; l < 8; l++) begin
        logic [31:0] x, e;
        x = in_words[l];
        for (int i = 0; i < 32; i++) e[i] = x[des_p[i]];
        check(got[des_out_index + l] == e, $sformatf("DES permutation of half block %0d", l));
      end
    end
    for (int k = 0; k < 8; k++)
      check(u_mem.mem[(ST_ADDR >> 2) + k] == model.mem[ST_ADDR + 4*k], $sformatf("stored word %0d", k));

    // A second program nests five loops: the fifth LOOP_BEGIN overflows the
    // four-entry loop stack and the last LOOP_END finds it empty. Both are
    // reported in STATUS; the program still reaches HALT.
    begin
      instr_t p2[$];
      logic [15:0] h2[$];
      for (int k = 0; k < 5; k++) p2.push_back(mk_loop(0));
      p2.push_back(mk(OP_ADD, 1, 2, 3));
      for (int k = 0; k < 5; k++) p2.push_back(mk(OP_LOOPE));
      p2.push_back(mk(OP_HALT));
      assemble(p2, h2);
      for (int k = 0; k < h2.size(); k += 2)
        u_mem.mem[(OVF_ADDR >> 2) + k/2] = {h2[k+1], h2[k]};
      host_write(4'h0, OVF_ADDR);
      check(!error, "start clears the error flags");
      repeat (2) @(posedge clk);
      t_wait = 0;
      while (!done && t_wait < 2000) begin @(posedge clk); t_wait++; end
      host_read(4'h4, st);
      check(st[3] == 1'b1 && st[1] == 1'b1 && error, "loop stack overflow reported in status");
    end
    check(n_loop_ovf > 0, "loop stack overflow happened");

    $display("program: %0d words, %0d instructions executed by the model, %0d cycles",
             hw.size(), model.executed, cycles);
    $display("events: loop_taken=%0d loop_exit=%0d forward=%0d rr_stall=%0d in_wait=%0d out_wait=%0d",
             n_loop_taken, n_loop_exit, n_fwd, n_rr_stall, n_in_wait, n_out_wait);
    $display("events: mem_wait=%0d perm4=%0d perm2=%0d longmul16=%0d masked=%0d bitslice=%0d",
             n_mem_wait, n_perm4, n_perm2, n_longmul16, n_masked, n_bslice);
    $display("events: arb_conflict=%0d fbuf_full=%0d host_in_stall=%0d host_out_stall=%0d",
             n_arb_conflict, n_fbuf_full, n_host_in_stall, n_host_out_stall);
    check(n_loop_taken > 0, "loop jump happened");
    check(n_loop_exit > 0, "loop exit happened");
    check(n_fwd > 0, "forwarding happened");
    check(n_rr_stall > 0, "register-read stall happened");
    check(n_in_wait > 0, "wait on empty input buffer happened");
    check(n_out_wait > 0, "wait on full output buffer happened");
    check(n_mem_wait > 0, "memory access stall happened");
    check(n_perm4 > 0, "4-pass permute happened");
    check(n_perm2 > 0, "2-pass permute happened");
    check(n_longmul16 > 0, "16-cycle 256-bit multiply happened");
    check(n_masked > 0, "masked write happened");
    check(n_bslice > 0, "bitslice happened");
    check(n_arb_conflict > 0, "bus arbitration conflict happened");
    check(n_fbuf_full > 0, "fetch buffer full happened");
    check(n_host_in_stall > 0, "host stalled on full input buffer");
    check(n_host_out_stall > 0, "host stalled on empty output buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
