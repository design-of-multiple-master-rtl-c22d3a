// ocp_addr_decoder: connects the arbiter's output to one of NS slaves by slave ID.
//
// The top SID_W bits of MAddr hold the slave ID (SID). The decoder keeps one ID per slave port
// in a small table (SLAVE_IDS, default 000, 001, 010 for the memory, the FIFO and the dual-port
// FIFO, as in the document) and compares the SID with every entry. The request goes to the
// matching slave, with the SID bits cleared so the slave sees only its offset. That slave's
// response is returned to the master. NS and the table are parameters, so any number of
// slaves can be attached.
//
// While a Read or Write-non-post is waiting for its response, the decoder remembers which slave
// took it and keeps routing that slave's response (and the master's MRespAccept) until the
// response is taken. A command whose SID matches no entry is accepted by the decoder itself and,
// if it needs a response, answered with ERR one cycle later; this is this design's choice (the
// document does not say).
module ocp_addr_decoder
  import ocp_pkg::*;
#(
  parameter int unsigned NS = 3,
  parameter logic [SID_W-1:0] SLAVE_IDS [NS] = '{3'b000, 3'b001, 3'b010}
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ocp_req_t m_req,
  output ocp_rsp_t m_rsp,
  output ocp_req_t s_req [NS],
  input  ocp_rsp_t s_rsp [NS]
);
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;

  logic [SID_W-1:0] sid;
  logic             hit;
  logic [SW-1:0]    hit_idx;
  logic             pend;          // a response is owed by slave pend_idx
  logic [SW-1:0]    pend_idx;
  logic             err_pend;      // a response is owed by the decoder (no slave matched)
  logic [SW-1:0]    cur;           // slave whose response is routed back this cycle
  logic             miss_accept;

  assign sid = m_req.maddr[ADDR_W-1 -: SID_W];

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < NS; i++) begin
      if (!hit && sid == SLAVE_IDS[i]) begin
        hit     = 1'b1;
        hit_idx = SW'(i);
      end
    end
  end

  assign cur         = pend ? pend_idx : hit_idx;
  assign miss_accept = !pend && !err_pend && !hit && (m_req.mcmd != CMD_IDLE);

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      s_req[i] = REQ_IDLE;
      if (SW'(i) == cur && (pend || hit)) begin
        s_req[i] = m_req;
        s_req[i].maddr[ADDR_W-1 -: SID_W] = '0;
        if (pend) s_req[i].mcmd = CMD_IDLE;   // only the response phase continues
      end
    end
    m_rsp = RSP_IDLE;
    if (err_pend) begin
      m_rsp.sresp = RESP_ERR;
    end else if (miss_accept) begin
      m_rsp.scmdaccept  = 1'b1;
      m_rsp.sdataaccept = is_write(m_req.mcmd);
    end else if (pend || hit) begin
      m_rsp = s_rsp[cur];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= 1'b0;
      pend_idx <= '0;
      err_pend <= 1'b0;
    end else begin
      if (!pend && hit && s_rsp[hit_idx].scmdaccept && needs_resp(m_req.mcmd)) begin
        pend     <= 1'b1;
        pend_idx <= hit_idx;
      end else if (pend && s_rsp[pend_idx].sresp != RESP_NULL && m_req.mrespaccept) begin
        pend <= 1'b0;
      end
      if (miss_accept && needs_resp(m_req.mcmd)) err_pend <= 1'b1;
      else if (err_pend && m_req.mrespaccept)    err_pend <= 1'b0;
    end
  end

endmodule
