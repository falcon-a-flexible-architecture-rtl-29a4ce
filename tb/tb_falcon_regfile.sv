// tb_falcon_regfile: checks the 16 x 256-bit register file (sixteen 16-bit
// slices) against an array model: random writes with random byte enables,
// three independent read ports, the write landing at the clock edge, and the
// clear that zeroes every register.
module tb_falcon_regfile;
  import falcon_pkg::*;
  logic clk = 0, clear = 0, we = 0;
  logic [3:0] ra1 = 0, ra2 = 0, ra3 = 0, wa = 0;
  logic [255:0] rd1, rd2, rd3, wd = 0;
  logic [31:0] wbe = 0;
  logic [255:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  falcon_regfile dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] rnd();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    foreach (model[r]) model[r] = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra1 = $urandom; ra2 = $urandom; ra3 = $urandom;
      #1;
      check(rd1 == model[ra1] && rd2 == model[ra2] && rd3 == model[ra3], "read ports");
      we  = $urandom_range(1);
      wa  = $urandom;
      wd  = rnd();
      wbe = $urandom_range(3) == 0 ? 32'hffffffff : $urandom;
      @(posedge clk);
      if (we) for (int b = 0; b < 32; b++) if (wbe[b]) model[wa][8*b +: 8] = wd[8*b +: 8];
    end
    @(negedge clk);
    we = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int r = 0; r < 16; r++) begin
      ra1 = 4'(r);
      #1 check(rd1 == '0, "cleared");
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
