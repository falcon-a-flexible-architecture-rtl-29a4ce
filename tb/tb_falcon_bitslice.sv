// tb_falcon_bitslice: checks the BITSLICE transpose at every lane width
// against the reference, that BITSLICE at width W followed by BITSLICE at
// width 256/W restores the value (W = 8, 16, 32), and that masked source lanes give zeros.
module tb_falcon_bitslice;
  import falcon_pkg::*;
  import falcon_ref_pkg::*;
  wcode_t width;
  logic [255:0] x, y;
  logic [31:0] src_be;
  int checks = 0, failures = 0;

  falcon_bitslice dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 600; n++) begin
      logic [255:0] v, t;
      logic [31:0] m;
      int w;
      w = n % 6;
      for (int k = 0; k < 8; k++) v[32*k +: 32] = $urandom;
      m = (n % 3 == 0) ? $urandom : 32'h0;
      x = v; width = wcode_t'(w); src_be = r_be(m, w);
      #1;
      check(y == r_bslice(v, w, m), $sformatf("transpose width code %0d", w));
      // spot check one bit against the definition
      if (m == 0) check(y[3 * (256 / (8 << w)) + 0] == v[0 * (8 << w) + 3], "bit 3 of lane 0");
      if (m == 0 && w <= 2) begin   // 256/W is itself a lane width
        t = y;
        x = t; width = wcode_t'(2 - w); src_be = '1;
        #1 check(y == v, "inverse at width 256/W");
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
