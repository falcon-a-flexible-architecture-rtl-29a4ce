// falcon_top: the Falcon cryptography co-processor.
//
// A 256-bit, in-order SIMD machine for energy-limited devices. A host
// processor writes a program into memory, passes its address through the
// control unit's PROG_PTR register and streams data through the DATA_IN and
// DATA_OUT registers. Inside:
//   control unit   falcon_ctrl      host registers, pointer check, start
//   frontend       falcon_fetch     fetch, pre-decode, PC and 4-entry loop stack
//                  falcon_fifo      8-entry fetch buffer
//                  falcon_decode    decode, SET_WIDTH tracking, LDi spreading
//   backend        falcon_backend   register read / execute / write back,
//                                   16 x 16-bit execution units, permutation
//                                   network, bitslice, lane masks
//   memory unit    falcon_lsu       LD and ST units
//                  falcon_fifo x2   input and output buffers
// Memory configuration (SHARED_MEM): 1 sends instruction fetches and LD/ST
// over the one memory bus (mem_req/mem_rsp) through falcon_bus_arb, which is
// the evaluated configuration; 0 sends LD/ST over the separate scratchpad bus
// (spm_req/spm_rsp) and leaves mem_* to instruction fetch.
// Both buses: a request is taken when valid and ready are high; one response
// per request (read data or write acknowledge) comes back later, in order.
// done goes high when the program has executed HALT; error when the program
// pointer was rejected or the loop stack over- or underflowed.
// The unit structure, the 8-entry fetch buffer, the 4-entry loop stack and
// the two memory configurations follow the document. Buffer depths, the host
// register map and the bus protocol are not given by it and are this
// design's choice.
module falcon_top
  import falcon_pkg::*;
#(
  parameter bit          SHARED_MEM = 1'b1,
  parameter int unsigned IN_DEPTH   = 16,
  parameter int unsigned OUT_DEPTH  = 16,
  parameter int unsigned FBUF_DEPTH = 8,
  parameter int unsigned LOOP_DEPTH = 4,
  parameter logic [31:0] PROG_BASE  = 32'h0000_0000,
  parameter logic [31:0] PROG_SIZE  = 32'h0001_0000
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
  // memory bus (instructions, and data when SHARED_MEM)
  output bus_req_t    mem_req,
  input  logic        mem_ready,
  input  bus_rsp_t    mem_rsp,
  // private scratchpad bus (data when !SHARED_MEM)
  output bus_req_t    spm_req,
  input  logic        spm_ready,
  input  bus_rsp_t    spm_rsp,
  // status
  output logic        busy,
  output logic        done,
  output logic        error
);
  logic        start, halted, loop_err, running;
  logic [31:0] start_pc;
  logic        bad_ptr;

  // ---------------- control unit and data buffers ----------------
  logic                         in_push, in_pop, in_full, in_empty;
  logic [31:0]                  in_wdata, in_rdata;
  logic [$clog2(IN_DEPTH+1)-1:0] in_count;
  logic                         out_push, out_pop, out_full, out_empty;
  logic [31:0]                  out_wdata, out_rdata;
  logic [$clog2(OUT_DEPTH+1)-1:0] out_count;

  falcon_ctrl #(.PROG_BASE(PROG_BASE), .PROG_SIZE(PROG_SIZE)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .host_valid(host_valid),
    .host_we   (host_we),
    .host_addr (host_addr),
    .host_wdata(host_wdata),
    .host_ready(host_ready),
    .host_rdata(host_rdata),
    .start     (start),
    .start_pc  (start_pc),
    .halted    (halted),
    .loop_error(loop_err),
    .busy      (busy),
    .bad_ptr   (bad_ptr),
    .in_push   (in_push),
    .in_wdata  (in_wdata),
    .in_full   (in_full),
    .in_count  (8'(in_count)),
    .out_pop   (out_pop),
    .out_rdata (out_rdata),
    .out_empty (out_empty),
    .out_count (8'(out_count))
  );

  falcon_fifo #(.WIDTH(32), .DEPTH(IN_DEPTH)) u_inbuf (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .push(in_push), .wdata(in_wdata), .pop(in_pop), .rdata(in_rdata),
    .full(in_full), .empty(in_empty), .count(in_count)
  );

  falcon_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_outbuf (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .push(out_push), .wdata(out_wdata), .pop(out_pop), .rdata(out_rdata),
    .full(out_full), .empty(out_empty), .count(out_count)
  );

  // ---------------- frontend ----------------
  bus_req_t    f_req;
  logic        f_ready;
  bus_rsp_t    f_rsp;
  logic        fb_push, fb_pop, fb_full, fb_empty;
  logic [31:0] fb_wdata, fb_rdata;
  logic [$clog2(FBUF_DEPTH+1)-1:0] fb_count;
  logic        loop_taken, loop_exit;
  logic        uop_valid, uop_ready;
  uop_t        uop;
  wcode_t      cur_width;

  falcon_fetch #(.BUF_DEPTH(FBUF_DEPTH), .LOOP_DEPTH(LOOP_DEPTH)) u_fetch (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .start_pc  (start_pc),
    .ireq      (f_req),
    .ireq_ready(f_ready),
    .irsp      (f_rsp),
    .buf_push  (fb_push),
    .buf_wdata (fb_wdata),
    .buf_count (fb_count),
    .running   (running),
    .loop_error(loop_err),
    .loop_taken(loop_taken),
    .loop_exit (loop_exit)
  );

  falcon_fifo #(.WIDTH(32), .DEPTH(FBUF_DEPTH)) u_fbuf (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .push(fb_push), .wdata(fb_wdata), .pop(fb_pop), .rdata(fb_rdata),
    .full(fb_full), .empty(fb_empty), .count(fb_count)
  );

  falcon_decode u_decode (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .buf_empty(fb_empty),
    .buf_rdata(fb_rdata),
    .buf_pop  (fb_pop),
    .uop_valid(uop_valid),
    .uop      (uop),
    .uop_ready(uop_ready),
    .cur_width(cur_width)
  );

  // ---------------- backend and memory unit ----------------
  logic            lsu_run, lsu_done, lsu_waiting;
  opcode_e         lsu_op;
  logic [31:0]     lsu_addr;
  logic [XLEN-1:0] lsu_wdata, lsu_rdata;
  logic            fwd_event, stall_event;
  bus_req_t        d_req;
  logic            d_ready;
  bus_rsp_t        d_rsp;

  falcon_backend u_backend (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (start),
    .uop_valid  (uop_valid),
    .uop        (uop),
    .uop_ready  (uop_ready),
    .lsu_run    (lsu_run),
    .lsu_op     (lsu_op),
    .lsu_addr   (lsu_addr),
    .lsu_wdata  (lsu_wdata),
    .lsu_done   (lsu_done),
    .lsu_rdata  (lsu_rdata),
    .halted     (halted),
    .fwd_event  (fwd_event),
    .stall_event(stall_event)
  );

  falcon_lsu u_lsu (
    .clk       (clk),
    .rst_n     (rst_n),
    .run       (lsu_run),
    .op        (lsu_op),
    .addr      (lsu_addr),
    .wdata     (lsu_wdata),
    .done      (lsu_done),
    .rdata     (lsu_rdata),
    .waiting   (lsu_waiting),
    .dreq      (d_req),
    .dreq_ready(d_ready),
    .drsp      (d_rsp),
    .in_empty  (in_empty),
    .in_data   (in_rdata),
    .in_pop    (in_pop),
    .out_full  (out_full),
    .out_push  (out_push),
    .out_data  (out_wdata)
  );

  if (SHARED_MEM) begin : g_shared
    falcon_bus_arb u_arb (
      .clk    (clk),
      .rst_n  (rst_n),
      .f_req  (f_req),
      .f_ready(f_ready),
      .f_rsp  (f_rsp),
      .d_req  (d_req),
      .d_ready(d_ready),
      .d_rsp  (d_rsp),
      .m_req  (mem_req),
      .m_ready(mem_ready),
      .m_rsp  (mem_rsp)
    );
    assign spm_req = '0;
  end else begin : g_private
    assign mem_req = f_req;
    assign f_ready = mem_ready;
    assign f_rsp   = mem_rsp;
    assign spm_req = d_req;
    assign d_ready = spm_ready;
    assign d_rsp   = spm_rsp;
  end

  assign done  = halted;
  assign error = loop_err || bad_ptr;
endmodule
