// tb_falcon_fifo: checks falcon_fifo (data buffers and fetch buffer) against
// a queue: random push/pop traffic including pushes when full and pops when
// empty, the full/empty/count outputs every cycle, first-word fall-through
// data, and the synchronous clear.
module tb_falcon_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  always #5 clk = ~clk;

  falcon_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_full = 0, n_empty = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(count == q.size(), "count");
      check(full == (q.size() == DEPTH), "full");
      check(empty == (q.size() == 0), "empty");
      if (q.size() > 0) check(rdata == q[0], "head data");
      if (full) n_full++;
      if (empty) n_empty++;
      clear = (cyc % 997 == 500);
      push  = $urandom_range(1) == 1 || (cyc / 300) % 2 == 1 && $urandom_range(3) != 0;
      pop   = $urandom_range(1) == 1 && !((cyc / 300) % 2 == 1);
      wdata = $urandom;
      @(posedge clk);
      if (clear) q.delete();
      else begin
        bit do_pop, do_push;
        do_pop  = pop && q.size() > 0;
        do_push = push && q.size() < DEPTH;
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(wdata);
      end
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
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
