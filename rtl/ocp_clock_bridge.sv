// ocp_clock_bridge: carries OCP transactions between two clock domains.
//
// The document only says that clock bridges let masters and slaves run at different clock
// frequencies; how the bridge works is this design's choice. It moves one transaction at a time
// with a toggle (four-phase free, two-phase) handshake:
//   1. Master side, idle: a command on m_req is copied into a holding register and the request
//      toggle flips.
//   2. The toggle passes a SYNC_STAGES flip-flop synchronizer into s_clk. The slave side then
//      drives the held request on s_req until SCmdAccept. For a Read or Write-non-post it waits
//      for SResp != NULL, takes it (MRespAccept in that cycle) and stores SResp/SData. It then
//      flips the acknowledge toggle.
//   3. The acknowledge toggle is synchronized back into m_clk. The master side then gives
//      SCmdAccept (and SDataAccept for writes) for one cycle. For a Read or Write-non-post it
//      presents the stored response on m_rsp from the next cycle until MRespAccept.
// The held request and response registers are stable while their toggle crosses, so only the
// single toggle bits are synchronized. The master therefore sees SCmdAccept only after the far
// slave has taken the command. A transaction costs about two synchronizer delays in each
// direction.
module ocp_clock_bridge
  import ocp_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic     rst_n,
  // master side
  input  logic     m_clk,
  input  ocp_req_t m_req,
  output ocp_rsp_t m_rsp,
  // slave side
  input  logic     s_clk,
  output ocp_req_t s_req,
  input  ocp_rsp_t s_rsp
);
  // ---------------- master side ----------------
  typedef enum logic [1:0] {MS_IDLE, MS_WAIT, MS_RESP} m_state_e;
  typedef enum logic [1:0] {SS_IDLE, SS_REQ, SS_RESP}  s_state_e;

  m_state_e              mst;
  ocp_req_t              hold_req;          // written in m_clk, read in s_clk
  logic                  req_tgl;
  logic [SYNC_STAGES-1:0] ack_sync;
  logic                  ack_seen;
  logic                  ack_tgl;            // driven in s_clk
  ocp_resp_e             hold_resp;          // written in s_clk, read in m_clk
  logic [DATA_W-1:0]     hold_data;
  logic                  m_accept;

  assign m_accept = (mst == MS_WAIT) && (ack_sync[SYNC_STAGES-1] != ack_seen);

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      mst      <= MS_IDLE;
      hold_req <= REQ_IDLE;
      req_tgl  <= 1'b0;
      ack_sync <= '0;
      ack_seen <= 1'b0;
    end else begin
      ack_sync <= {ack_sync[SYNC_STAGES-2:0], ack_tgl};
      unique case (mst)
        MS_IDLE: if (m_req.mcmd != CMD_IDLE) begin
          hold_req             <= m_req;
          hold_req.mrespaccept <= 1'b0;
          req_tgl              <= ~req_tgl;
          mst                  <= MS_WAIT;
        end
        MS_WAIT: if (m_accept) begin
          ack_seen <= ~ack_seen;
          mst      <= needs_resp(hold_req.mcmd) ? MS_RESP : MS_IDLE;
        end
        MS_RESP: if (m_req.mrespaccept) mst <= MS_IDLE;
        default: mst <= MS_IDLE;
      endcase
    end
  end

  always_comb begin
    m_rsp             = RSP_IDLE;
    m_rsp.scmdaccept  = m_accept;
    m_rsp.sdataaccept = m_accept && is_write(hold_req.mcmd);
    if (mst == MS_RESP) begin
      m_rsp.sresp = hold_resp;
      m_rsp.sdata = hold_data;
    end
  end

  // ---------------- slave side ----------------
  s_state_e               sst;
  logic [SYNC_STAGES-1:0] req_sync;
  logic                   req_seen;

  always_ff @(posedge s_clk or negedge rst_n) begin
    if (!rst_n) begin
      sst       <= SS_IDLE;
      req_sync  <= '0;
      req_seen  <= 1'b0;
      ack_tgl   <= 1'b0;
      hold_resp <= RESP_NULL;
      hold_data <= '0;
    end else begin
      req_sync <= {req_sync[SYNC_STAGES-2:0], req_tgl};
      unique case (sst)
        SS_IDLE: if (req_sync[SYNC_STAGES-1] != req_seen) begin
          req_seen <= ~req_seen;
          sst      <= SS_REQ;
        end
        SS_REQ: if (s_rsp.scmdaccept) begin
          if (needs_resp(hold_req.mcmd)) sst <= SS_RESP;
          else begin
            ack_tgl <= ~ack_tgl;
            sst     <= SS_IDLE;
          end
        end
        SS_RESP: if (s_rsp.sresp != RESP_NULL) begin
          hold_resp <= s_rsp.sresp;
          hold_data <= s_rsp.sdata;
          ack_tgl   <= ~ack_tgl;
          sst       <= SS_IDLE;
        end
        default: sst <= SS_IDLE;
      endcase
    end
  end

  always_comb begin
    s_req             = REQ_IDLE;
    if (sst == SS_REQ) s_req = hold_req;
    s_req.mrespaccept = (sst == SS_RESP);
  end

endmodule
