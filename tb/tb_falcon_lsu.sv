// tb_falcon_lsu: checks the LD and ST units: 256-bit stores and loads over a
// memory with random back-pressure (eight words, least significant first,
// at consecutive addresses), IN from an input buffer that is sometimes empty
// and OUT into an output buffer that is sometimes full, with the unit
// waiting in both cases and done marking the last word.
module tb_falcon_lsu;
  import falcon_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, done, waiting;
  opcode_e op = OP_NOP;
  logic [31:0] addr = 0;
  logic [255:0] wdata = 0, rdata;
  bus_req_t dreq;
  logic dreq_ready;
  bus_rsp_t drsp;
  logic in_empty, in_pop, out_full, out_push;
  logic [31:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [31:0] inmem [64];
  int in_wr = 0, in_rd = 0;
  logic [31:0] outq[$];
  bit out_block;

  always #5 clk = ~clk;

  falcon_lsu dut (.*);
  falcon_mem_model #(.WORDS(1024), .STALL_PCT(30)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(dreq), .ready(dreq_ready), .rsp(drsp));

  assign in_empty = (in_wr == in_rd);
  assign in_data  = inmem[in_rd % 64];
  assign out_full = out_block;

  always @(posedge clk) begin
    if (in_pop) in_rd <= in_rd + 1;
    if (out_push) outq.push_back(out_data);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] rnd();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  task automatic exec(input opcode_e o, input logic [31:0] a, input logic [255:0] d,
                      output logic [255:0] r, output int cyc);
    @(negedge clk);
    op = o; addr = a; wdata = d; run = 1; cyc = 1;
    #1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      #1;
    end
    r = rdata;
    @(negedge clk);
    run = 0;
  endtask

  initial begin
    logic [255:0] v, r;
    int cyc, n_wait_in = 0, n_wait_out = 0;
    out_block = 0;
    foreach (inmem[i]) inmem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [31:0] a;
      a = 32'(($urandom_range(100)) * 32);
      v = rnd();
      exec(OP_ST, a, v, r, cyc);
      for (int k = 0; k < 8; k++) check(u_mem.mem[(a >> 2) + k] == v[32*k +: 32], "stored word");
      check(cyc >= 16, "store takes at least two cycles per word");
      exec(OP_LD, a, '0, r, cyc);
      check(r == v, "loaded value");
    end
    for (int n = 0; n < 20; n++) begin
      v = rnd();
      fork
        exec(OP_IN, 0, '0, r, cyc);
        begin
          for (int k = 0; k < 8; k++) begin
            repeat ($urandom_range(3)) @(negedge clk);
            inmem[in_wr % 64] = v[32*k +: 32];
            in_wr = in_wr + 1;
          end
        end
      join
      if (cyc > 8) n_wait_in++;
      check(r == v, "IN value");
      v = rnd();
      outq.delete();
      fork
        exec(OP_OUT, 0, v, r, cyc);
        begin
          repeat (8) begin
            out_block = $urandom_range(1);
            @(negedge clk);
          end
          out_block = 0;
        end
      join
      if (cyc > 8) n_wait_out++;
      check(outq.size() == 8, "OUT word count");
      for (int k = 0; k < 8; k++) check(outq[k] == v[32*k +: 32], "OUT word");
    end
    check(n_wait_in > 0 && n_wait_out > 0, "waits on empty input and full output happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
