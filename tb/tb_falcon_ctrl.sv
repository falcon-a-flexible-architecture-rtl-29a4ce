// tb_falcon_ctrl: checks the control unit's host registers: program pointer
// validation (misaligned, below and above the window, valid), the start
// pulse and busy/done status around a halt, the loop error bit, and the
// DATA_IN / DATA_OUT registers with their stalls on a full input buffer and
// an empty output buffer, and a restart: data accesses wait in the start
// cycle, and a HALT still flagged from the last program does not end it.
module tb_falcon_ctrl;
  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_we = 0, host_ready;
  logic [3:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic start, halted = 0, loop_error = 0, busy, bad_ptr;
  logic [31:0] start_pc;
  logic in_push, in_full = 0, out_pop, out_empty = 1;
  logic [31:0] in_wdata, out_rdata = 32'h1234_5678;
  logic [7:0] in_count = 8'd3, out_count = 8'd5;
  int checks = 0, failures = 0, n_start = 0, n_push = 0, n_pop = 0;

  always #5 clk = ~clk;
  falcon_ctrl #(.PROG_BASE(32'h1000), .PROG_SIZE(32'h1000)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (start) n_start++;
    if (in_push) n_push++;
    if (out_pop) n_pop++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Returns the number of cycles the access waited.
  task automatic acc(input logic we, input logic [3:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output int waited);
    @(negedge clk);
    host_valid = 1; host_we = we; host_addr = a; host_wdata = d;
    waited = 0;
    #1;
    while (!host_ready) begin
      @(negedge clk);
      waited++;
      #1;
    end
    rd = host_rdata;
    @(negedge clk);
    host_valid = 0;
  endtask

  initial begin
    logic [31:0] r;
    int w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    acc(1, 4'h0, 32'h1002, r, w);                     // misaligned
    acc(0, 4'h4, 0, r, w);
    check(r[2] && !r[0] && n_start == 0, "misaligned pointer rejected");
    acc(1, 4'h0, 32'h0ffc, r, w);                     // below window
    acc(0, 4'h4, 0, r, w);
    check(r[2] && n_start == 0, "pointer below window rejected");
    acc(1, 4'h0, 32'h2000, r, w);                     // above window
    acc(0, 4'h4, 0, r, w);
    check(r[2] && n_start == 0, "pointer above window rejected");
    acc(1, 4'h0, 32'h1ffc, r, w);                     // valid
    check(start && start_pc == 32'h1ffc, "start pulse with the new pointer");
    repeat (3) @(posedge clk);
    check(n_start == 1, "start lasts one cycle");
    acc(0, 4'h4, 0, r, w);
    check(r[0] && !r[1] && !r[2] && busy && !bad_ptr, "busy after start");
    check(r[15:8] == 8'd3 && r[23:16] == 8'd5, "buffer fill levels in status");
    acc(0, 4'h0, 0, r, w);
    check(r == 32'h1ffc, "pointer read back");
    loop_error = 1;
    halted = 1;
    @(negedge clk);
    halted = 0;
    acc(0, 4'h4, 0, r, w);
    check(!r[0] && r[1] && r[3], "done and loop error after halt");
    // data in: one free slot, then full for a while
    acc(1, 4'h8, 32'hAAAA, r, w);
    check(w == 0 && n_push == 1 && in_wdata == 32'hAAAA, "data in accepted");
    fork
      acc(1, 4'h8, 32'hBBBB, r, w);
      begin in_full = 1; repeat (5) @(negedge clk); in_full = 0; end
    join
    check(w >= 4 && n_push == 2, "data in stalls while the buffer is full");
    fork
      acc(0, 4'hC, 0, r, w);
      begin repeat (4) @(negedge clk); out_empty = 0; end
    join
    check(w >= 3 && n_pop == 1 && r == 32'h1234_5678, "data out stalls while the buffer is empty");
    // Restart while the last program's HALT is still flagged: a data access in
    // the start cycle must wait, and the old HALT must not end the new program.
    out_empty = 1;
    halted = 1;
    acc(1, 4'h0, 32'h1000, r, w);
    check(start, "start pulse on restart");
    host_valid = 1; host_we = 1; host_addr = 4'h8; host_wdata = 32'hCCCC;
    #1;
    check(!host_ready && !in_push, "data in waits in the start cycle");
    @(negedge clk);
    halted = 0;
    #1;
    check(host_ready && in_push, "data in accepted after the start cycle");
    @(negedge clk);
    host_valid = 0;
    acc(0, 4'h4, 0, r, w);
    check(r[0] && !r[1], "restart is busy and not done");
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
