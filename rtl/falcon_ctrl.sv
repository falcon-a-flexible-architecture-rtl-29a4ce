// falcon_ctrl: Falcon's control unit, the host-side memory-mapped registers.
//
// The host starts a program by writing its address to PROG_PTR. If the
// address is word aligned and lies inside the program window
// [PROG_BASE, PROG_BASE + PROG_SIZE), the unit pulses start for one cycle
// (the cycle after the write, when start_pc holds the new address),
// which clears all internal state of the co-processor and starts fetching
// at that address; otherwise it sets the error flag and nothing runs.
// Streaming data goes through two further registers backed by FIFOs: a write
// to DATA_IN pushes a word into the input buffer and a read of DATA_OUT pops
// one from the output buffer. The host bus is a single-cycle register port:
// an access completes in the cycle in which host_ready is high, with read data
// valid in that cycle. A write to a full input buffer or a read of an empty
// output buffer holds host_ready low until it can complete, and so does a
// DATA_IN or DATA_OUT access in the start cycle, which clears both buffers.
//   0x00 PROG_PTR  rw  program address (write starts a program)
//   0x04 STATUS    r   bit0 busy, bit1 done, bit2 bad pointer, bit3 loop
//                      stack error, bits 15:8 input fill, bits 23:16 output fill
//   0x08 DATA_IN   w   input buffer
//   0x0C DATA_OUT  r   output buffer
// The register map, the program window check and the host handshake are this
// design's choices; the document gives the pointer register, the reset on
// start, the pointer check and the buffered data registers.
module falcon_ctrl #(
  parameter logic [31:0] PROG_BASE = 32'h0000_0000,
  parameter logic [31:0] PROG_SIZE = 32'h0001_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // host register port
  input  logic        host_valid,
  input  logic        host_we,
  input  logic [3:0]  host_addr,
  input  logic [31:0] host_wdata,
  output logic        host_ready,
  output logic [31:0] host_rdata,
  // to the core
  output logic        start,
  output logic [31:0] start_pc,
  input  logic        halted,
  input  logic        loop_error,
  output logic        busy,
  output logic        bad_ptr,
  // buffers
  output logic        in_push,
  output logic [31:0] in_wdata,
  input  logic        in_full,
  input  logic [7:0]  in_count,
  output logic        out_pop,
  input  logic [31:0] out_rdata,
  input  logic        out_empty,
  input  logic [7:0]  out_count
);
  typedef enum logic [1:0] {R_PTR = 2'd0, R_STATUS = 2'd1, R_DIN = 2'd2, R_DOUT = 2'd3} reg_e;

  logic  done_q;
  logic  ptr_ok;
  reg_e  sel;
  logic  wr_ptr;

  assign sel      = reg_e'(host_addr[3:2]);
  assign ptr_ok   = (host_wdata[1:0] == 2'b00) && (host_wdata >= PROG_BASE)
                 && (host_wdata - PROG_BASE < PROG_SIZE);
  assign wr_ptr   = host_valid && host_we && (sel == R_PTR);
  assign in_wdata = host_wdata;

  always_comb begin
    host_ready = 1'b1;
    host_rdata = 32'h0;
    in_push    = 1'b0;
    out_pop    = 1'b0;
    unique case (sel)
      R_PTR:    host_rdata = start_pc;
      R_STATUS: host_rdata = {8'h0, out_count, in_count, 4'h0, loop_error, bad_ptr, done_q, busy};
      R_DIN: begin
        host_ready = !(host_we && (in_full || start));
        in_push    = host_valid && host_we && !in_full && !start;
      end
      R_DOUT: begin
        host_ready = host_we || (!out_empty && !start);
        host_rdata = out_rdata;
        out_pop    = host_valid && !host_we && !out_empty && !start;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done_q   <= 1'b0;
      bad_ptr  <= 1'b0;
      start_pc <= 32'h0;
      start    <= 1'b0;
    end else if (wr_ptr) begin
      start    <= ptr_ok;          // one cycle later, with start_pc valid
      start_pc <= host_wdata;
      busy     <= ptr_ok;
      done_q   <= 1'b0;
      bad_ptr  <= !ptr_ok;
    end else begin
      start <= 1'b0;
      if (busy && halted && !start) begin   // halted may still hold the last program's HALT
        busy   <= 1'b0;
        done_q <= 1'b1;
      end
    end
  end
endmodule
