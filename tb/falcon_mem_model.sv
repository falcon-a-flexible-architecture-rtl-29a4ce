// falcon_mem_model: behavioural model of the SRAM on Falcon's memory bus.
//
// Not synthesizable design: a testbench stand-in for the 64 KB SRAM macro of
// the evaluation system. Word-addressed array of WORDS 32-bit words. A
// request is accepted when valid and ready are high; the response (read data
// or write acknowledge) comes in the next cycle. With STALL_PCT above zero,
// ready is randomly held low that percentage of the time to exercise
// back-pressure. The array is public to the testbench for loading programs
// and checking results.
module falcon_mem_model
  import falcon_pkg::*;
#(
  parameter int unsigned WORDS     = 16384,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output logic     ready,
  output bus_rsp_t rsp
);
  logic [31:0] mem [WORDS];
  logic        rdy_q;
  int unsigned accepted;

  assign ready = rdy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp      <= '0;
      rdy_q    <= 1'b1;
      accepted <= 0;
    end else begin
      rsp.valid <= 1'b0;
      rdy_q     <= ($urandom_range(99) >= STALL_PCT);
      if (req.valid && ready) begin
        accepted  <= accepted + 1;
        rsp.valid <= 1'b1;
        if (req.we) begin
          mem[(req.addr >> 2) % WORDS] <= req.wdata;
          rsp.rdata <= 32'h0;
        end else begin
          rsp.rdata <= mem[(req.addr >> 2) % WORDS];
        end
      end
    end
  end
endmodule
