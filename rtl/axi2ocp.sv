// axi2ocp: AXI-to-OCP converter (bridge from an AXI master to an OCP slave interface).
//
// The AXI side is an AXI slave with its five channels; the OCP side is an OCP master port that
// can be wired straight to an OCP slave, a clock bridge or the arbiter. As the document says, the
// converter maps the AXI master's commands onto OCP and returns the OCP slave's responses to the
// AXI master in AXI form. How it maps them is this design's choice:
//   * an AXI write burst of LEN+1 beats becomes LEN+1 OCP Write-non-posts at addresses
//     AWADDR, AWADDR+1, ... (word addresses, incrementing burst); each beat is taken from the W
//     channel only after the previous beat's OCP response, and BRESP is SLVERR if any beat failed;
//   * an AXI read burst becomes LEN+1 OCP Reads at incrementing addresses; each SData/SResp is
//     returned as one R beat, RLAST on the last;
//   * SResp DVA maps to OKAY, FAIL and ERR map to SLVERR.
// Writes and reads are captured independently (AWREADY, WREADY and ARREADY are high while the
// channel's holding register is empty). OCP is single-threaded, so beats are issued on OCP one at
// a time; when a write beat and a read beat both wait, the kind not issued last goes first.
//
// Timing: AXI handshakes are registered (one cycle each); an OCP command is driven from the
// cycle after its beat was captured, held until SCmdAccept, and the response is taken with
// MRespAccept in the cycle SResp arrives. BVALID/RVALID follow one cycle later and stay until
// BREADY/RREADY.
module axi2ocp
  import ocp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AXI slave side
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [3:0]        awlen,
  input  logic              awvalid,
  output logic              awready,
  input  logic [DATA_W-1:0] wdata,
  input  logic              wvalid,
  input  logic              wlast,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [3:0]        arlen,
  input  logic              arvalid,
  output logic              arready,
  output logic [DATA_W-1:0] rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  output logic              rvalid,
  input  logic              rready,
  // OCP master side
  output ocp_req_t          ocp_req,
  input  ocp_rsp_t          ocp_rsp
);
  typedef enum logic [1:0] {WA_ADDR, WA_DATA, WA_PEND, WA_BRESP} wstate_e;
  typedef enum logic [1:0] {RA_ADDR, RA_PEND, RA_RDATA}          rstate_e;
  typedef enum logic [1:0] {O_IDLE, O_REQ, O_RESP}               ostate_e;

  wstate_e           wst;
  rstate_e           rst;
  ostate_e           ost;
  logic [ADDR_W-1:0] waddr_q, raddr_q;
  logic [3:0]        wlen_q, rlen_q, wbeat, rbeat;
  logic [DATA_W-1:0] wdata_q;
  logic              werr;          // some beat of the current write burst failed
  logic              cur_is_rd;     // the OCP transaction in flight is a read
  logic              last_rd;       // the last OCP transaction issued was a read
  logic              pick_rd;
  logic              w_final, r_final;

  assign awready = (wst == WA_ADDR);
  assign wready  = (wst == WA_DATA);
  assign bvalid  = (wst == WA_BRESP);
  assign arready = (rst == RA_ADDR);
  assign rvalid  = (rst == RA_RDATA);
  assign rlast   = rvalid && r_final;
  assign w_final = (wbeat == wlen_q);
  assign r_final = (rbeat == rlen_q);

  // Which waiting beat goes on OCP next.
  assign pick_rd = (rst == RA_PEND) && ((wst != WA_PEND) || !last_rd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst       <= WA_ADDR;
      rst       <= RA_ADDR;
      ost       <= O_IDLE;
      waddr_q   <= '0;
      raddr_q   <= '0;
      wlen_q    <= '0;
      rlen_q    <= '0;
      wbeat     <= '0;
      rbeat     <= '0;
      wdata_q   <= '0;
      werr      <= 1'b0;
      bresp     <= AXI_OKAY;
      rresp     <= AXI_OKAY;
      rdata     <= '0;
      cur_is_rd <= 1'b0;
      last_rd   <= 1'b0;
    end else begin
      // AXI write channels
      unique case (wst)
        WA_ADDR: if (awvalid) begin
          waddr_q <= awaddr;
          wlen_q  <= awlen;
          wbeat   <= '0;
          werr    <= 1'b0;
          wst     <= WA_DATA;
        end
        WA_DATA:  if (wvalid) begin wdata_q <= wdata; wst <= WA_PEND; end
        WA_PEND:  ;                                    // left by the OCP FSM
        WA_BRESP: if (bready) wst <= WA_ADDR;
        default:  wst <= WA_ADDR;
      endcase
      // AXI read channels
      unique case (rst)
        RA_ADDR: if (arvalid) begin
          raddr_q <= araddr;
          rlen_q  <= arlen;
          rbeat   <= '0;
          rst     <= RA_PEND;
        end
        RA_PEND:  ;
        RA_RDATA: if (rready) begin
          if (r_final) rst <= RA_ADDR;
          else begin
            rbeat <= rbeat + 1'b1;
            rst   <= RA_PEND;
          end
        end
        default: rst <= RA_ADDR;
      endcase
      // OCP side
      unique case (ost)
        O_IDLE: if (pick_rd || wst == WA_PEND) begin
          cur_is_rd <= pick_rd;
          last_rd   <= pick_rd;
          ost       <= O_REQ;
        end
        O_REQ:  if (ocp_rsp.scmdaccept) ost <= O_RESP;
        O_RESP: if (ocp_rsp.sresp != RESP_NULL) begin
          ost <= O_IDLE;
          if (cur_is_rd) begin
            rdata <= ocp_rsp.sdata;
            rresp <= (ocp_rsp.sresp == RESP_DVA) ? AXI_OKAY : AXI_SLVERR;
            rst   <= RA_RDATA;
          end else if (w_final) begin
            bresp <= (ocp_rsp.sresp == RESP_DVA && !werr) ? AXI_OKAY : AXI_SLVERR;
            wst   <= WA_BRESP;
          end else begin
            werr  <= werr || (ocp_rsp.sresp != RESP_DVA);
            wbeat <= wbeat + 1'b1;
            wst   <= WA_DATA;
          end
        end
        default: ost <= O_IDLE;
      endcase
    end
  end

  always_comb begin
    ocp_req = REQ_IDLE;
    if (ost == O_REQ) begin
      ocp_req.mcmd       = cur_is_rd ? CMD_RD : CMD_WRNP;
      ocp_req.maddr      = cur_is_rd ? raddr_q + ADDR_W'(rbeat) : waddr_q + ADDR_W'(wbeat);
      ocp_req.mdata      = cur_is_rd ? '0 : wdata_q;
      ocp_req.mdatavalid = !cur_is_rd;
    end
    ocp_req.mrespaccept = (ost == O_RESP);
  end

`ifndef SYNTHESIS
  // WLAST must mark exactly the beat that AWLEN announced as the last.
  assert property (@(posedge clk) disable iff (!rst_n) wvalid && wready |-> wlast == w_final);
`endif

endmodule
