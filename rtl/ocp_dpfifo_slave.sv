// ocp_dpfifo_slave: the dual-port FIFO OCP slave (slave ID 010 in the default system).
//
// One FIFO (memory plus auto-incrementing read and write pointers) with two OCP slave ports.
// In the default system port 1 is fed by the interconnect (the arbitrated masters) and port 2 by a
// fixed OCP master. In one cycle the FIFO performs at most one push and one pop, so a write on one
// port and a read on the other proceed together. When both ports write in the same cycle, or both
// read, the slave arbitrates: the port with priority is served and the other port's command is
// left unaccepted (it stays on the bus and is served in a later cycle). Priority alternates: after
// a conflict the port that lost has priority for the next conflict of the same kind. The
// simultaneous operation, the arbitration and the state names (M1_WRITE_ST, M2_READ_ST,
// M1_WRRD_ST, ...) follow the document; the alternating priority, DEPTH and the overflow and
// underflow answers are this design's choices.
//
// A pop reads the FIFO as it was before the edge, so a read that coincides with a write to an
// empty FIFO underflows. Overflow: a write to a full FIFO is accepted and dropped (FAIL for a
// Write-non-post). Underflow: FAIL with SData = 0.
//
// Timing per port is the same as ocp_mem_slave: combinational accept when the port has no pending
// response, response held from the next cycle until MRespAccept. `state` is the registered
// operation of the previous cycle; `state_next` the one being performed now.
module ocp_dpfifo_slave
  import ocp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  ocp_req_t                 req1,
  output ocp_rsp_t                 rsp1,
  input  ocp_req_t                 req2,
  output ocp_rsp_t                 rsp2,
  output dpf_state_e               state,
  output dpf_state_e               state_next,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PW:0]       wptr, rptr;
  logic              full, empty;
  logic              wprio2, rprio2;              // port 2 wins the next write / read conflict
  logic              pend1, pend2;
  ocp_resp_e         resp1_q, resp2_q;
  logic [DATA_W-1:0] rdata1_q, rdata2_q;

  logic w1, w2, r1, r2;                           // commands presented on a free port
  logic gw1, gw2, gr1, gr2;                       // granted this cycle
  logic acc1, acc2, push, pop;
  logic [DATA_W-1:0] wdata, popdata;

  assign count   = wptr - rptr;
  assign full    = (count == (PW+1)'(DEPTH));
  assign empty   = (wptr == rptr);
  assign popdata = mem[rptr[PW-1:0]];

  always_comb begin
    w1  = !pend1 && is_write(req1.mcmd);
    w2  = !pend2 && is_write(req2.mcmd);
    r1  = !pend1 && (req1.mcmd == CMD_RD);
    r2  = !pend2 && (req2.mcmd == CMD_RD);
    gw1 = w1 && (!w2 || !wprio2);
    gw2 = w2 && (!w1 ||  wprio2);
    gr1 = r1 && (!r2 || !rprio2);
    gr2 = r2 && (!r1 ||  rprio2);
    acc1  = gw1 || gr1;
    acc2  = gw2 || gr2;
    push  = (gw1 || gw2) && !full;
    pop   = (gr1 || gr2) && !empty;
    wdata = gw1 ? req1.mdata : req2.mdata;
    unique case ({gw1, gw2, gr1, gr2})
      4'b1000: state_next = M1_WRITE_ST;
      4'b0100: state_next = M2_WRITE_ST;
      4'b0010: state_next = M1_READ_ST;
      4'b0001: state_next = M2_READ_ST;
      4'b1001: state_next = M1_WRRD_ST;
      4'b0110: state_next = M2_WRRD_ST;
      default: state_next = DPF_IDLE_ST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr[PW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      wprio2   <= 1'b0;
      rprio2   <= 1'b0;
      pend1    <= 1'b0;
      pend2    <= 1'b0;
      resp1_q  <= RESP_NULL;
      resp2_q  <= RESP_NULL;
      rdata1_q <= '0;
      rdata2_q <= '0;
      state    <= DPF_IDLE_ST;
    end else begin
      state <= state_next;
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
      if (w1 && w2) wprio2 <= gw1;
      if (r1 && r2) rprio2 <= gr1;
      // port 1 response
      if (acc1) begin
        pend1    <= needs_resp(req1.mcmd);
        resp1_q  <= gr1 ? (empty ? RESP_FAIL : RESP_DVA) : (full ? RESP_FAIL : RESP_DVA);
        rdata1_q <= (gr1 && !empty) ? popdata : '0;
      end else if (pend1 && req1.mrespaccept) begin
        pend1 <= 1'b0;
      end
      // port 2 response
      if (acc2) begin
        pend2    <= needs_resp(req2.mcmd);
        resp2_q  <= gr2 ? (empty ? RESP_FAIL : RESP_DVA) : (full ? RESP_FAIL : RESP_DVA);
        rdata2_q <= (gr2 && !empty) ? popdata : '0;
      end else if (pend2 && req2.mrespaccept) begin
        pend2 <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp1             = RSP_IDLE;
    rsp1.scmdaccept  = acc1;
    rsp1.sdataaccept = gw1;
    rsp1.sresp       = pend1 ? resp1_q : RESP_NULL;
    rsp1.sdata       = pend1 ? rdata1_q : '0;
    rsp2             = RSP_IDLE;
    rsp2.scmdaccept  = acc2;
    rsp2.sdataaccept = gw2;
    rsp2.sresp       = pend2 ? resp2_q : RESP_NULL;
    rsp2.sdata       = pend2 ? rdata2_q : '0;
  end

`ifndef SYNTHESIS
  // At most one push and one pop per cycle, each granted to one port only.
  assert property (@(posedge clk) disable iff (!rst_n) !(gw1 && gw2) && !(gr1 && gr2));
`endif

endmodule
