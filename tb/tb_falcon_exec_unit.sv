// tb_falcon_exec_unit: checks one execution unit: the 16-bit A + B + C x D
// MAC, the same MAC split into two 8-bit MACs, and the four logical
// operations, on random and extreme operands.
module tb_falcon_exec_unit;
  logic split, sel_logic;
  logic [1:0] lop;
  logic [15:0] a, b, c, d;
  logic [31:0] y;
  int checks = 0, failures = 0;

  falcon_exec_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s a=%h b=%h c=%h d=%h y=%h", what, a, b, c, d, y); end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] e;
      if (n < 4) begin
        a = 16'hffff; b = 16'hffff; c = 16'hffff; d = 16'hffff;
      end else begin
        a = $urandom; b = $urandom; c = $urandom; d = $urandom;
      end
      split = 0; sel_logic = 0; lop = 0;
      #1 e = 32'(a) + 32'(b) + 32'(c) * 32'(d);
      check(y == e, "16-bit MAC");
      split = 1;
      #1 e = {16'(a[15:8]) + 16'(b[15:8]) + 16'(c[15:8]) * 16'(d[15:8]),
              16'(a[7:0]) + 16'(b[7:0]) + 16'(c[7:0]) * 16'(d[7:0])};
      check(y == e, "split 8-bit MAC");
      sel_logic = 1;
      for (int k = 0; k < 4; k++) begin
        lop = 2'(k);
        #1;
        case (k)
          0: e = {16'h0, a & b};
          1: e = {16'h0, a | b};
          2: e = {16'h0, a ^ b};
          default: e = {16'h0, ~a};
        endcase
        check(y == e, "logical unit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
