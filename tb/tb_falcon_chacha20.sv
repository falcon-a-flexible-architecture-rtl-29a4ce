// tb_falcon_chacha20: runs the ChaCha20 block function on the whole Falcon
// co-processor at its default parameters and checks the keystream.
//
// Two 64-byte blocks are computed in parallel with 32-bit lanes. Register
// R0..R3 hold the four rows of the 4 x 4 word state, one block in lanes 0-3
// and the other in lanes 4-7, so one ADD/XOR/ROLi sequence performs the four
// column quarter-rounds of both blocks at once. Before a diagonal round,
// PERMUTE rotates rows 1, 2 and 3 left by one, two and three words inside
// each block (index registers R8..R10, loaded by 256-bit LDi); after it, the
// rotation is undone. A LOOP_BEGIN/LOOP_END pair runs the ten double rounds.
// The host writes the 32 state words through DATA_IN and reads the 32
// keystream words through DATA_OUT. Block 0 uses the well-known test vector
// (key 00 01 .. 1f, nonce 00 00 00 09 00 00 00 4a 00 00 00 00, counter 1),
// whose first output word is 0xe4e7f110. Block 1 uses a random key, nonce and
// counter. Both are compared with a plain ChaCha20 model written in this
// file, which is itself checked on the standard quarter-round example. The
// cycle count from start to done is printed.
module tb_falcon_chacha20;
  import falcon_pkg::*;
  import falcon_ref_pkg::*;

  localparam int unsigned PROG_ADDR = 32'h200;

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

  falcon_mem_model #(.WORDS(4096), .STALL_PCT(0)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mem_req), .ready(mem_ready), .rsp(mem_rsp)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ChaCha20 model ----------------
  typedef logic [31:0] state_t [16];

  function automatic logic [31:0] rotl(input logic [31:0] x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic void qr(inout logic [31:0] a, b, c, d);
    a += b; d ^= a; d = rotl(d, 16);
    c += d; b ^= c; b = rotl(b, 12);
    a += b; d ^= a; d = rotl(d, 8);
    c += d; b ^= c; b = rotl(b, 7);
  endfunction

  function automatic state_t chacha_block(input state_t in);
    state_t x;
    x = in;
    for (int r = 0; r < 10; r++) begin
      qr(x[0], x[4], x[8],  x[12]);
      qr(x[1], x[5], x[9],  x[13]);
      qr(x[2], x[6], x[10], x[14]);
      qr(x[3], x[7], x[11], x[15]);
      qr(x[0], x[5], x[10], x[15]);
      qr(x[1], x[6], x[11], x[12]);
      qr(x[2], x[7], x[8],  x[13]);
      qr(x[3], x[4], x[9],  x[14]);
    end
    for (int k = 0; k < 16; k++) x[k] += in[k];
    return x;
  endfunction

  // Initial state: four constants, eight key words, counter, three nonce words.
  function automatic state_t chacha_init(input logic [31:0] key [8], input logic [31:0] ctr,
                                         input logic [31:0] nonce [3]);
    state_t s;
    s[0] = 32'h61707865; s[1] = 32'h3320646e; s[2] = 32'h79622d32; s[3] = 32'h6b206574;
    for (int k = 0; k < 8; k++) s[4 + k] = key[k];
    s[12] = ctr;
    for (int k = 0; k < 3; k++) s[13 + k] = nonce[k];
    return s;
  endfunction

  // ---------------- program ----------------
  // Index vector for a rotation by k words inside each group of four lanes:
  // lane i gathers lane (i & 4) | ((i + k) & 3).
  function automatic v256_t rot_idx(input int k);
    v256_t v = '0;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = (i & 4) | ((i + k) & 3);
    return v;
  endfunction

  instr_t      prog[$];
  logic [15:0] hw[$];

  task automatic quarter_rounds();
    prog.push_back(mk(OP_ADD, 0, 0, 1)); prog.push_back(mk(OP_XOR, 3, 3, 0));
    prog.push_back(mk(OP_ROLI, 3, 0, 0, 16));
    prog.push_back(mk(OP_ADD, 2, 2, 3)); prog.push_back(mk(OP_XOR, 1, 1, 2));
    prog.push_back(mk(OP_ROLI, 1, 0, 0, 12));
    prog.push_back(mk(OP_ADD, 0, 0, 1)); prog.push_back(mk(OP_XOR, 3, 3, 0));
    prog.push_back(mk(OP_ROLI, 3, 0, 0, 8));
    prog.push_back(mk(OP_ADD, 2, 2, 3)); prog.push_back(mk(OP_XOR, 1, 1, 2));
    prog.push_back(mk(OP_ROLI, 1, 0, 0, 7));
  endtask

  // Rotate rows 1, 2 and 3 by the index registers given.
  task automatic rotate_rows(input int i1, input int i2, input int i3);
    prog.push_back(mk(OP_PERM, 1, i1, 1));
    prog.push_back(mk(OP_PERM, 2, i2, 2));
    prog.push_back(mk(OP_PERM, 3, i3, 3));
  endtask

  task automatic gen_program();
    prog.push_back(mk(OP_SETW, 0, 0, 0, 2));                  // 32-bit lanes
    prog.push_back(mk_ldi(8, 5, rot_idx(1)));
    prog.push_back(mk_ldi(9, 5, rot_idx(2)));
    prog.push_back(mk_ldi(10, 5, rot_idx(3)));
    for (int r = 0; r < 4; r++) prog.push_back(mk(OP_IN, r));
    for (int r = 0; r < 4; r++) prog.push_back(mk(OP_MOV, 4 + r, r));
    prog.push_back(mk_loop(9));                                // ten double rounds
    quarter_rounds();                                          // column round
    rotate_rows(8, 9, 10);
    quarter_rounds();                                          // diagonal round
    rotate_rows(10, 9, 8);
    prog.push_back(mk(OP_LOOPE));
    for (int r = 0; r < 4; r++) prog.push_back(mk(OP_ADD, r, r, 4 + r));
    for (int r = 0; r < 4; r++) prog.push_back(mk(OP_OUT, r));
    prog.push_back(mk(OP_HALT));
  endtask

  // ---------------- host accesses ----------------
  task automatic host_access(input logic we, input logic [3:0] a, input logic [31:0] d,
                             output logic [31:0] rd);
    @(negedge clk);
    host_valid = 1; host_we = we; host_addr = a; host_wdata = d;
    #1;
    while (!host_ready) begin
      @(posedge clk);
      #1;
    end
    rd = host_rdata;
    @(posedge clk);
    #1 host_valid = 0;
  endtask

  initial begin
    logic [31:0] key0 [8], key1 [8], nonce0 [3], nonce1 [3], d, st;
    logic [31:0] ta, tb, tc, td;
    state_t s0, s1, e0, e1;
    logic [31:0] got [32];
    longint t0, t1;

    // The model's quarter round on the standard example.
    ta = 32'h11111111; tb = 32'h01020304; tc = 32'h9b8d6f43; td = 32'h01234567;
    qr(ta, tb, tc, td);
    check(ta == 32'hea2a92f4 && tb == 32'hcb1cf8ce && tc == 32'h4581472e && td == 32'h5881c4bb,
          "reference quarter round");

    for (int k = 0; k < 8; k++)
      key0[k] = {8'(4*k + 3), 8'(4*k + 2), 8'(4*k + 1), 8'(4*k)};  // little-endian bytes
    nonce0[0] = 32'h09000000; nonce0[1] = 32'h4a000000; nonce0[2] = 32'h00000000;
    for (int k = 0; k < 8; k++) key1[k] = $urandom;
    for (int k = 0; k < 3; k++) nonce1[k] = $urandom;
    s0 = chacha_init(key0, 32'd1, nonce0);
    s1 = chacha_init(key1, $urandom, nonce1);
    e0 = chacha_block(s0);
    e1 = chacha_block(s1);
    check(e0[0] == 32'he4e7f110, "reference keystream word 0 of the test vector");

    gen_program();
    assemble(prog, hw);
    for (int k = 0; k < 4096; k++) u_mem.mem[k] = 32'h0;
    for (int k = 0; k < hw.size(); k += 2)
      u_mem.mem[(PROG_ADDR >> 2) + k/2] = {(k + 1 < hw.size()) ? hw[k+1] : 16'h0, hw[k]};

    repeat (3) @(posedge clk);
    rst_n = 1;
    host_access(1'b1, 4'h0, PROG_ADDR, d);
    t0 = $time;
    // Row r of the state: block 0 words 4r..4r+3, then block 1 words 4r..4r+3.
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) host_access(1'b1, 4'h8, s0[4*r + c], d);
      for (int c = 0; c < 4; c++) host_access(1'b1, 4'h8, s1[4*r + c], d);
    end
    for (int k = 0; k < 32; k++) host_access(1'b0, 4'hC, 32'h0, got[k]);
    while (!done) @(posedge clk);
    t1 = $time;
    do host_access(1'b0, 4'h4, 32'h0, st); while (st[0]);   // poll STATUS as a host would
    check(st[1] == 1'b1 && st[0] == 1'b0 && !error,
          $sformatf("program finished without error (STATUS %h, error %b)", st, error));

    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        check(got[8*r + c] == e0[4*r + c],
              $sformatf("block 0 word %0d: got %h expected %h", 4*r + c, got[8*r + c], e0[4*r + c]));
        check(got[8*r + 4 + c] == e1[4*r + c],
              $sformatf("block 1 word %0d: got %h expected %h", 4*r + c, got[8*r + 4 + c], e1[4*r + c]));
      end
    $display("two ChaCha20 blocks: %0d instruction words, %0d cycles from start to done",
             hw.size(), (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
