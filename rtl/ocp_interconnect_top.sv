// ocp_interconnect_top: multi-master OCP interconnect with AXI and OCP masters.
//
// N_AXI AXI masters (each behind an AXI-to-OCP converter) and N_OCP OCP masters share three OCP
// slaves. Every arbitrated master runs on its own clock clk_m[i] and reaches the interconnect
// clock clk_ic through an OCP clock bridge. There the ring-counter arbiter picks one master at a
// time and the address decoder sends its request to the slave named by the top three MAddr
// bits. Each slave sits behind another clock bridge on its own clock clk_s[k]:
//   slave 0, SID 000: simple memory      (ocp_mem_slave,    clk_s[0])
//   slave 1, SID 001: synchronous FIFO   (ocp_fifo_slave,   clk_s[1])
//   slave 2, SID 010: dual-port FIFO     (ocp_dpfifo_slave, clk_s[2]); its second port belongs
//                     to one more OCP master that is fixed to it and runs on clk_s[2].
// This is the document's system of five masters (2 AXI, 3 OCP) and three slaves. Master index i
// in the arbiter is: AXI masters first (0 .. N_AXI-1), then the OCP masters.
//
// The masters are driven from outside through their user command ports (axi_wr_*/axi_rd_* and
// ocp_*; the AXI ports stream burst data beat by beat, see axi_master), and report
// completion with one-cycle done pulses in their own clock domains. rst_n resets everything
// asynchronously and must be released while no clock edge is near, or
// be synchronized per domain outside. grant (clk_ic), the FIFO fill levels and the dual-port FIFO's
// operation (clk_s[1], clk_s[2]) are brought out for observation.
module ocp_interconnect_top
  import ocp_pkg::*;
#(
  parameter int unsigned N_AXI        = 2,
  parameter int unsigned N_OCP        = 2,
  parameter int unsigned MEM_DEPTH    = 8192,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned DPFIFO_DEPTH = 16,
  localparam int unsigned NM          = N_AXI + N_OCP
) (
  input  logic              rst_n,
  input  logic [NM-1:0]     clk_m,
  input  logic              clk_ic,
  input  logic [2:0]        clk_s,
  // AXI masters' user ports
  input  logic              axi_wr_start [N_AXI],
  input  logic [ADDR_W-1:0] axi_wr_addr  [N_AXI],
  input  logic [3:0]        axi_wr_len   [N_AXI],
  input  logic [DATA_W-1:0] axi_wr_data  [N_AXI],
  output logic              axi_wr_next  [N_AXI],
  output logic              axi_wr_ready [N_AXI],
  output logic              axi_wr_done  [N_AXI],
  output logic [1:0]        axi_wr_resp  [N_AXI],
  input  logic              axi_rd_start [N_AXI],
  input  logic [ADDR_W-1:0] axi_rd_addr  [N_AXI],
  input  logic [3:0]        axi_rd_len   [N_AXI],
  output logic              axi_rd_beat  [N_AXI],
  output logic              axi_rd_last  [N_AXI],
  output logic              axi_rd_ready [N_AXI],
  output logic              axi_rd_done  [N_AXI],
  output logic [DATA_W-1:0] axi_rd_data  [N_AXI],
  output logic [1:0]        axi_rd_resp  [N_AXI],
  // OCP masters' user ports; index N_OCP is the master fixed on the dual-port FIFO
  input  logic              ocp_cmd_valid [N_OCP+1],
  input  ocp_cmd_e          ocp_cmd       [N_OCP+1],
  input  logic [ADDR_W-1:0] ocp_addr      [N_OCP+1],
  input  logic [DATA_W-1:0] ocp_data      [N_OCP+1],
  output logic              ocp_cmd_ready [N_OCP+1],
  output logic              ocp_done      [N_OCP+1],
  output logic [DATA_W-1:0] ocp_rdata     [N_OCP+1],
  output ocp_resp_e         ocp_resp      [N_OCP+1],
  // observation
  output logic [NM-1:0]     grant,
  output dpf_state_e        dpf_state,
  output dpf_state_e        dpf_state_next,
  output logic [$clog2(FIFO_DEPTH):0]   fifo_count,
  output logic [$clog2(DPFIFO_DEPTH):0] dpf_count
);
  ocp_req_t mreq   [NM];    // master side of each master bridge
  ocp_rsp_t mrsp   [NM];
  ocp_req_t areq   [NM];    // interconnect side of each master bridge
  ocp_rsp_t arsp   [NM];
  ocp_req_t ic_req;         // arbiter -> decoder
  ocp_rsp_t ic_rsp;
  ocp_req_t dreq   [3];     // decoder -> slave bridges
  ocp_rsp_t drsp   [3];
  ocp_req_t sreq   [3];     // slave bridges -> slaves
  ocp_rsp_t srsp   [3];
  ocp_req_t fix_req;        // fixed OCP master -> dual-port FIFO port 2
  ocp_rsp_t fix_rsp;

  // ---------------- AXI masters and converters ----------------
  for (genvar i = 0; i < N_AXI; i++) begin : g_axi
    logic [ADDR_W-1:0] awaddr, araddr;
    logic [DATA_W-1:0] wdata, rdata;
    logic [1:0]        bresp, rresp;
    logic [3:0]        awlen, arlen;
    logic awvalid, awready, wvalid, wlast, wready, bvalid, bready;
    logic arvalid, arready, rlast, rvalid, rready;

    axi_master u_master (
      .clk(clk_m[i]), .rst_n,
      .wr_start(axi_wr_start[i]), .wr_addr(axi_wr_addr[i]), .wr_len(axi_wr_len[i]),
      .wr_data(axi_wr_data[i]), .wr_next(axi_wr_next[i]), .wr_ready(axi_wr_ready[i]), .wr_done(axi_wr_done[i]), .wr_resp(axi_wr_resp[i]),
      .rd_start(axi_rd_start[i]), .rd_addr(axi_rd_addr[i]), .rd_len(axi_rd_len[i]),
      .rd_ready(axi_rd_ready[i]), .rd_beat(axi_rd_beat[i]), .rd_last(axi_rd_last[i]),
      .rd_done(axi_rd_done[i]), .rd_data(axi_rd_data[i]), .rd_resp(axi_rd_resp[i]),
      .awaddr, .awlen, .awvalid, .awready, .wdata, .wvalid, .wlast, .wready, .bresp, .bvalid, .bready,
      .araddr, .arlen, .arvalid, .arready, .rdata, .rresp, .rlast, .rvalid, .rready
    );

    axi2ocp u_conv (
      .clk(clk_m[i]), .rst_n,
      .awaddr, .awlen, .awvalid, .awready, .wdata, .wvalid, .wlast, .wready, .bresp, .bvalid, .bready,
      .araddr, .arlen, .arvalid, .arready, .rdata, .rresp, .rlast, .rvalid, .rready,
      .ocp_req(mreq[i]), .ocp_rsp(mrsp[i])
    );
  end

  // ---------------- OCP masters on the arbiter ----------------
  for (genvar j = 0; j < N_OCP; j++) begin : g_ocp
    ocp_master u_master (
      .clk(clk_m[N_AXI+j]), .rst_n,
      .cmd_valid(ocp_cmd_valid[j]), .cmd(ocp_cmd[j]), .addr(ocp_addr[j]), .data(ocp_data[j]),
      .cmd_ready(ocp_cmd_ready[j]), .done(ocp_done[j]), .rdata(ocp_rdata[j]), .resp(ocp_resp[j]),
      .ocp_req(mreq[N_AXI+j]), .ocp_rsp(mrsp[N_AXI+j])
    );
  end

  // ---------------- master-side clock bridges ----------------
  for (genvar i = 0; i < NM; i++) begin : g_mbridge
    ocp_clock_bridge u_bridge (
      .rst_n,
      .m_clk(clk_m[i]), .m_req(mreq[i]), .m_rsp(mrsp[i]),
      .s_clk(clk_ic),   .s_req(areq[i]), .s_rsp(arsp[i])
    );
  end

  // ---------------- arbiter and address decoder ----------------
  ocp_arbiter #(.NM(NM)) u_arbiter (
    .clk(clk_ic), .rst_n,
    .m_req(areq), .m_rsp(arsp), .s_req(ic_req), .s_rsp(ic_rsp), .grant
  );

  ocp_addr_decoder #(.NS(3), .SLAVE_IDS('{3'b000, 3'b001, 3'b010})) u_decoder (
    .clk(clk_ic), .rst_n,
    .m_req(ic_req), .m_rsp(ic_rsp), .s_req(dreq), .s_rsp(drsp)
  );

  // ---------------- slave-side clock bridges ----------------
  for (genvar k = 0; k < 3; k++) begin : g_sbridge
    ocp_clock_bridge u_bridge (
      .rst_n,
      .m_clk(clk_ic),   .m_req(dreq[k]), .m_rsp(drsp[k]),
      .s_clk(clk_s[k]), .s_req(sreq[k]), .s_rsp(srsp[k])
    );
  end

  // ---------------- slaves ----------------
  ocp_mem_slave #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk(clk_s[0]), .rst_n, .ocp_req(sreq[0]), .ocp_rsp(srsp[0])
  );

  ocp_fifo_slave #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk_s[1]), .rst_n, .ocp_req(sreq[1]), .ocp_rsp(srsp[1]), .count(fifo_count)
  );

  ocp_dpfifo_slave #(.DEPTH(DPFIFO_DEPTH)) u_dpfifo (
    .clk(clk_s[2]), .rst_n,
    .req1(sreq[2]), .rsp1(srsp[2]), .req2(fix_req), .rsp2(fix_rsp),
    .state(dpf_state), .state_next(dpf_state_next), .count(dpf_count)
  );

  // ---------------- OCP master fixed on the dual-port FIFO ----------------
  ocp_master u_fixed_master (
    .clk(clk_s[2]), .rst_n,
    .cmd_valid(ocp_cmd_valid[N_OCP]), .cmd(ocp_cmd[N_OCP]), .addr(ocp_addr[N_OCP]),
    .data(ocp_data[N_OCP]), .cmd_ready(ocp_cmd_ready[N_OCP]), .done(ocp_done[N_OCP]),
    .rdata(ocp_rdata[N_OCP]), .resp(ocp_resp[N_OCP]),
    .ocp_req(fix_req), .ocp_rsp(fix_rsp)
  );

endmodule
