// tb_falcon_lane_ctrl: checks the lane mask register and the byte write
// enables: SET_MASK at every lane width from random source registers, the
// enables derived for every width from the stored mask (including a mask set
// at one width and used at another), and the clear.
module tb_falcon_lane_ctrl;
  import falcon_pkg::*;
  import falcon_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, set_mask = 0;
  wcode_t width = 0;
  logic [255:0] src = 0;
  logic [31:0] mask, be, mmask;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  falcon_lane_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    mmask = '0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      width = wcode_t'($urandom_range(5));
      for (int k = 0; k < 8; k++) src[32*k +: 32] = $urandom;
      set_mask = $urandom_range(1);
      #1;
      check(mask == mmask, "mask register");
      check(be == r_be(mmask, int'(width)), "byte enables");
      @(posedge clk);
      if (set_mask) mmask = r_setmask(src, int'(width));
    end
    @(negedge clk);
    set_mask = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    #1 check(mask == '0 && be == '1, "clear unmasks all lanes");
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
