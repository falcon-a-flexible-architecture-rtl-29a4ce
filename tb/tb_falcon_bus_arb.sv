// tb_falcon_bus_arb: checks the shared-bus arbiter: two requesters (fetch
// and data), each with at most one outstanding request, issue random reads
// and writes to a memory with random back-pressure. Every read must return
// the data last written to that address, responses must go to the
// requester that made the request, and data must win when both ask.
module tb_falcon_bus_arb;
  import falcon_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t f_req, d_req, m_req;
  logic f_ready, d_ready, m_ready;
  bus_rsp_t f_rsp, d_rsp, m_rsp;
  int checks = 0, failures = 0, n_both = 0;
  logic [31:0] shadow [256];

  always #5 clk = ~clk;
  falcon_bus_arb dut (.*);
  falcon_mem_model #(.WORDS(256), .STALL_PCT(25)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(m_req), .ready(m_ready), .rsp(m_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && f_req.valid && d_req.valid) begin
    n_both++;
    checks++;
    if (f_ready) begin failures++; $display("FAIL: fetch granted over data"); end
  end

  // Requester: reads from its own half of the memory only, so the expected
  // value is known when the request is made.
  task automatic requester(input bit is_d, input int n);
    for (int k = 0; k < n; k++) begin
      bus_req_t r;
      logic [31:0] exp_v;
      int w;
      w = $urandom_range(127) + (is_d ? 128 : 0);
      r.valid = 1;
      r.we    = $urandom_range(1);
      r.addr  = 32'(w * 4);
      r.wdata = $urandom;
      exp_v   = shadow[w];
      @(negedge clk);
      if (is_d) d_req = r; else f_req = r;
      #1;
      while (!(is_d ? d_ready : f_ready)) begin @(negedge clk); #1; end
      @(negedge clk);
      if (is_d) d_req = '0; else f_req = '0;
      #1;
      while (!(is_d ? d_rsp.valid : f_rsp.valid)) begin @(negedge clk); #1; end
      if (r.we) shadow[w] = r.wdata;
      else check((is_d ? d_rsp.rdata : f_rsp.rdata) == exp_v, "read data routed to its requester");
      repeat ($urandom_range(2)) @(negedge clk);
    end
  endtask

  initial begin
    f_req = '0; d_req = '0;
    foreach (shadow[i]) begin shadow[i] = 0; u_mem.mem[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      requester(0, 400);
      requester(1, 400);
    join
    check(n_both > 0, "simultaneous requests happened");
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
