// tb_falcon_permute: checks the 8x32 permutation network: the four-lane
// example of the architecture (data x0 x1 x2 x3 with shuffle 1 3 0 2 gives
// x1 x3 x0 x2), random permutations, broadcasts and out-of-range indices at
// every lane width against the reference, and the number of passes: 4 for
// 8-bit lanes, 2 for 16-bit lanes, 1 for wider lanes.
module tb_falcon_permute;
  import falcon_pkg::*;
  import falcon_ref_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, done;
  wcode_t width = 0;
  logic [255:0] idx = 0, data = 0, y;
  logic [1:0] pass;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  falcon_permute dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] rnd();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  task automatic do_perm(input int w, input logic [255:0] i, input logic [255:0] d,
                         output logic [255:0] r, output int cyc);
    @(negedge clk);
    width = wcode_t'(w); idx = i; data = d; run = 1;
    cyc = 1;
    #1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      #1;
    end
    r = y;
    @(negedge clk);
    run = 0;
  endtask

  initial begin
    logic [255:0] r, i, d;
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Four 64-bit lanes, as in the worked example.
    d = {64'h3333, 64'h2222, 64'h1111, 64'h0000};   // x3 x2 x1 x0
    i = {64'd2, 64'd0, 64'd3, 64'd1};               // lane0=1 lane1=3 lane2=0 lane3=2
    do_perm(3, i, d, r, cyc);
    check(r == {64'h2222, 64'h0000, 64'h3333, 64'h1111}, "four-lane example");
    check(cyc == 1, "one pass for 64-bit lanes");
    for (int n = 0; n < 300; n++) begin
      int w;
      w = n % 6;
      i = rnd();
      d = rnd();
      if (n % 7 == 0) i = '0;  // broadcast lane 0
      do_perm(w, i, d, r, cyc);
      check(r == r_perm(i, d, w), $sformatf("random permutation width code %0d", w));
      check(cyc == (w == 0 ? 4 : w == 1 ? 2 : 1), "pass count");
    end
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
