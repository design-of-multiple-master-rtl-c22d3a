// ocp_fifo_slave: the synchronous-FIFO OCP slave (slave ID 001 in the default system).
//
// Masters write to and read from one fixed location: any offset within the slave's address
// range reaches the same FIFO (the offset bits are ignored). As the document describes, the FIFO
// is a memory with a write pointer and a read pointer that auto-increment on a write and on a
// read. DEPTH is this design's choice (the document gives none) and must be a power of two.
//
// Overflow and underflow (not covered by the document) are this design's choice: a write to a
// full FIFO is accepted but dropped, and answered with FAIL if it is a Write-non-post; a read from
// an empty FIFO is answered with FAIL and SData = 0. Successful reads and non-posted writes get DVA.
//
// Timing: same as ocp_mem_slave. The command is accepted combinationally when idle, the pointer
// moves at that edge, and the response is held from the next cycle until MRespAccept.
module ocp_fifo_slave
  import ocp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  ocp_req_t                 ocp_req,
  output ocp_rsp_t                 ocp_rsp,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PW:0]       wptr, rptr;     // one extra bit tells full from empty
  logic              resp_pend;
  ocp_resp_e         resp_q;
  logic [DATA_W-1:0] rdata_q;
  logic              accept, full, empty, do_push, do_pop;

  assign count   = wptr - rptr;
  assign full    = (count == (PW+1)'(DEPTH));
  assign empty   = (wptr == rptr);
  assign accept  = !resp_pend && (ocp_req.mcmd != CMD_IDLE);
  assign do_push = accept && is_write(ocp_req.mcmd) && !full;
  assign do_pop  = accept && (ocp_req.mcmd == CMD_RD) && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[PW-1:0]] <= ocp_req.mdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      resp_pend <= 1'b0;
      resp_q    <= RESP_NULL;
      rdata_q   <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
      if (accept) begin
        resp_pend <= needs_resp(ocp_req.mcmd);
        rdata_q   <= do_pop ? mem[rptr[PW-1:0]] : '0;
        if (ocp_req.mcmd == CMD_RD) resp_q <= do_pop ? RESP_DVA : RESP_FAIL;
        else                        resp_q <= full ? RESP_FAIL : RESP_DVA;
      end else if (resp_pend && ocp_req.mrespaccept) begin
        resp_pend <= 1'b0;
      end
    end
  end

  always_comb begin
    ocp_rsp             = RSP_IDLE;
    ocp_rsp.scmdaccept  = accept;
    ocp_rsp.sdataaccept = accept && is_write(ocp_req.mcmd);
    ocp_rsp.sresp       = resp_pend ? resp_q : RESP_NULL;
    ocp_rsp.sdata       = resp_pend ? rdata_q : '0;
  end

endmodule
