// tb_falcon_loop_stack: checks the 4-entry loop stack against a queue model:
// random pushes, count decrements and pops, the top entry every cycle,
// full/empty, and the error flag on overflow and underflow.
module tb_falcon_loop_stack;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, decr = 0, pop = 0;
  logic [31:0] push_addr = 0, top_addr;
  logic [10:0] push_count = 0, top_count;
  logic empty, full, error;
  int checks = 0, failures = 0;
  logic [31:0] ma[$];
  logic [10:0] mc[$];
  bit merr;

  always #5 clk = ~clk;
  falcon_loop_stack #(.DEPTH(4), .AWIDTH(32), .CWIDTH(11)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_over = 0;
    merr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int r;
      @(negedge clk);
      check(empty == (ma.size() == 0) && full == (ma.size() == 4), "empty/full");
      check(error == merr, "error flag");
      if (ma.size() > 0) check(top_addr == ma[$] && top_count == mc[$], "top entry");
      r = $urandom_range(9);
      push = (r < 4); decr = (r >= 4 && r < 7); pop = (r >= 7);
      push_addr = $urandom; push_count = $urandom;
      if (n % 500 == 499) begin push = 0; decr = 0; pop = 0; clear = 1; end else clear = 0;
      @(posedge clk);
      if (clear) begin ma.delete(); mc.delete(); merr = 0; end
      else if (push) begin
        if (ma.size() == 4) begin merr = 1; n_over++; end
        else begin ma.push_back(push_addr); mc.push_back(push_count); end
      end else if (pop) begin
        if (ma.size() == 0) merr = 1;
        else begin void'(ma.pop_back()); void'(mc.pop_back()); end
      end else if (decr) begin
        if (ma.size() == 0) merr = 1;
        else mc[$] = mc[$] - 1;
      end
    end
    check(n_over > 0, "overflow exercised");
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
