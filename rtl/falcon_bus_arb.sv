// falcon_bus_arb: shares one memory bus between instruction fetch and data.
//
// When Falcon is configured to use the shared memory rather than its private
// scratchpad bus, instruction fetches and LD/ST transfers go out on the same
// bus. Both requesters keep at most one request outstanding. The arbiter
// grants one request at a time, data before fetch (a data access stalls the
// backend), and blocks further grants until the response of the granted
// request has come back, which it routes to the requester that owns it.
// Priority and the one-outstanding rule are this design's choices.
module falcon_bus_arb
  import falcon_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t f_req,
  output logic     f_ready,
  output bus_rsp_t f_rsp,
  input  bus_req_t d_req,
  output logic     d_ready,
  output bus_rsp_t d_rsp,
  output bus_req_t m_req,
  input  logic     m_ready,
  input  bus_rsp_t m_rsp
);
  logic busy_q, owner_d_q;   // a request is outstanding; it belongs to data
  logic pick_d;

  assign pick_d = d_req.valid;

  always_comb begin
    m_req   = '0;
    f_ready = 1'b0;
    d_ready = 1'b0;
    if (!busy_q) begin
      if (pick_d) begin
        m_req   = d_req;
        d_ready = m_ready;
      end else begin
        m_req   = f_req;
        f_ready = m_ready;
      end
    end
    f_rsp.valid = m_rsp.valid && busy_q && !owner_d_q;
    f_rsp.rdata = m_rsp.rdata;
    d_rsp.valid = m_rsp.valid && busy_q && owner_d_q;
    d_rsp.rdata = m_rsp.rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      owner_d_q <= 1'b0;
    end else if (!busy_q) begin
      if (m_req.valid && m_ready) begin
        busy_q    <= 1'b1;
        owner_d_q <= pick_d;
      end
    end else if (m_rsp.valid) begin
      busy_q <= 1'b0;
    end
  end
endmodule
