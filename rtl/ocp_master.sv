// ocp_master: a simple OCP master FSM for Write, Write-non-post and Read.
//
// A command given on the user port (cmd_valid with cmd/addr/data, taken when cmd_ready is high)
// is put on the OCP bus with MCmd, MAddr and MData all in the same cycle, as the document
// describes for its OCP master (unlike the AXI master, it does not wait before sending data).
// MDataValid is high with the write data. The FSM holds the request until SCmdAccept. A posted
// Write is then complete; a Read or Write-non-post waits for SResp != NULL, takes it with
// MRespAccept in that same cycle and reports rdata/resp with a one-cycle `done` pulse.
//
// States: IDLE -> REQ -> (RESP) -> IDLE. The request is registered, so MCmd appears the cycle
// after cmd_valid; the user port and the `done` pulse are this design's choices.
module ocp_master
  import ocp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // user port
  input  logic              cmd_valid,
  input  ocp_cmd_e          cmd,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data,
  output logic              cmd_ready,
  output logic              done,
  output logic [DATA_W-1:0] rdata,
  output ocp_resp_e         resp,
  // OCP master port
  output ocp_req_t          ocp_req,
  input  ocp_rsp_t          ocp_rsp
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RESP} state_e;
  state_e   st;
  ocp_req_t req_q;

  assign cmd_ready = (st == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      req_q <= REQ_IDLE;
      done  <= 1'b0;
      rdata <= '0;
      resp  <= RESP_NULL;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (cmd_valid && cmd != CMD_IDLE) begin
          req_q.mcmd       <= cmd;
          req_q.maddr      <= addr;
          req_q.mdata      <= is_write(cmd) ? data : '0;
          req_q.mdatavalid <= is_write(cmd);
          st               <= S_REQ;
        end
        S_REQ: if (ocp_rsp.scmdaccept) begin
          req_q <= REQ_IDLE;
          if (needs_resp(req_q.mcmd)) st <= S_RESP;
          else begin
            st   <= S_IDLE;
            done <= 1'b1;
            resp <= RESP_NULL;
          end
        end
        S_RESP: if (ocp_rsp.sresp != RESP_NULL) begin
          st    <= S_IDLE;
          done  <= 1'b1;
          resp  <= ocp_rsp.sresp;
          rdata <= ocp_rsp.sdata;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ocp_req             = req_q;
    ocp_req.mrespaccept = (st == S_RESP);
  end

endmodule
