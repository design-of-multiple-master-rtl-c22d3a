// ocp_mem_slave: the simple-memory OCP slave (slave ID 000 in the default system).
//
// A word-addressed memory of DEPTH x DATA_W bits that serves Write, Write-non-post and Read.
// The low bits of MAddr (below the slave-ID field) select the word; the memory array is
// DEPTH = 2^13 words by default, i.e. every offset the 13 address bits under the slave ID can
// reach (the document gives no size, so this depth is this design's choice).
//
// Timing: in the idle state a command is accepted in the same cycle it appears (SCmdAccept and,
// for writes, SDataAccept are combinational from MCmd). A write updates the array at that clock
// edge. A Read or a Write-non-post moves the slave to its response state in the next cycle, where
// SResp = DVA (with SData for a read) is held until MRespAccept. No new command is accepted
// while a response is pending. Every command is answered with DVA.
module ocp_mem_slave
  import ocp_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ocp_req_t ocp_req,
  output ocp_rsp_t ocp_rsp
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic              resp_pend;
  logic [DATA_W-1:0] rdata_q;
  logic              accept;
  logic [AW-1:0]     waddr;

  assign accept = !resp_pend && (ocp_req.mcmd != CMD_IDLE);
  assign waddr  = AW'(ocp_req.maddr[OFFS_W-1:0]);

  always_ff @(posedge clk) begin
    if (accept && is_write(ocp_req.mcmd)) mem[waddr] <= ocp_req.mdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_pend <= 1'b0;
      rdata_q   <= '0;
    end else if (accept) begin
      resp_pend <= needs_resp(ocp_req.mcmd);
      rdata_q   <= (ocp_req.mcmd == CMD_RD) ? mem[waddr] : '0;
    end else if (resp_pend && ocp_req.mrespaccept) begin
      resp_pend <= 1'b0;
    end
  end

  always_comb begin
    ocp_rsp             = RSP_IDLE;
    ocp_rsp.scmdaccept  = accept;
    ocp_rsp.sdataaccept = accept && is_write(ocp_req.mcmd);
    ocp_rsp.sresp       = resp_pend ? RESP_DVA : RESP_NULL;
    ocp_rsp.sdata       = resp_pend ? rdata_q : '0;
  end

endmodule
