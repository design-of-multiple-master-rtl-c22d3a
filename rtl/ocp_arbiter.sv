// ocp_arbiter: ring-counter arbiter that shares one OCP path among NM masters.
//
// As the document describes, a one-hot ring counter selects one master at a time, starting with
// master 0 after reset. If the selected master is idle (MCmd = Idle) the token moves on to the
// next master at the next clock edge. Otherwise the master keeps the grant and completes its
// Read, Write or Write-non-post operations; the grant passes on only once its MCmd is Idle again.
// Masters are thus served strictly in turn, and an idle master costs one cycle of the token's
// round. NM is a parameter, so any number of masters can be connected.
//
// This design adds one rule: the grant also stays while a Read or Write-non-post that was
// accepted is still waiting for its response, so that the response is returned to the right
// master. The granted master's request is passed through to s_req combinationally, and s_rsp
// goes back to it; the other masters see an idle response (no SCmdAccept, SResp NULL).
module ocp_arbiter
  import ocp_pkg::*;
#(
  parameter int unsigned NM = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ocp_req_t        m_req [NM],
  output ocp_rsp_t        m_rsp [NM],
  output ocp_req_t        s_req,
  input  ocp_rsp_t        s_rsp,
  output logic [NM-1:0]   grant
);
  logic outstanding;         // a response is owed to the granted master
  logic busy;

  always_comb begin
    s_req = REQ_IDLE;
    for (int i = 0; i < NM; i++) begin
      m_rsp[i] = RSP_IDLE;
      if (grant[i]) begin
        s_req    = m_req[i];
        m_rsp[i] = s_rsp;
      end
    end
  end

  assign busy = (s_req.mcmd != CMD_IDLE) || outstanding;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant       <= NM'(1);
      outstanding <= 1'b0;
    end else begin
      if (s_rsp.scmdaccept && needs_resp(s_req.mcmd))
        outstanding <= 1'b1;
      else if (s_rsp.sresp != RESP_NULL && s_req.mrespaccept)
        outstanding <= 1'b0;
      if (!busy) grant <= (NM > 1) ? {grant[NM-2:0], grant[NM-1]} : grant;
    end
  end

`ifndef SYNTHESIS
  assert property (@(posedge clk) disable iff (!rst_n) $onehot(grant));
`endif

endmodule
