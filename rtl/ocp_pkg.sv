// ocp_pkg: types and constants shared by every block of the OCP/AXI interconnect.
//
// The interconnect moves OCP transactions. A request bundle (ocp_req_t) travels from a master
// towards a slave and carries MCmd, MAddr, MData, MDataValid and the master's MRespAccept.
// A response bundle (ocp_rsp_t) travels back and carries SCmdAccept, SDataAccept, SResp and SData.
// The MCmd codes (000 Idle, 001 Write, 010 Read, 101 Write non-post) and the field widths
// (16-bit address and data, 3-bit MCmd, 2-bit SResp, slave ID in the top 3 address bits) follow
// the document. The SResp codes are the usual OCP ones (NULL, DVA, FAIL, ERR) and are this
// design's choice, as is the handshake rule:
//   * a master holds MCmd/MAddr/MData until a cycle in which SCmdAccept is high;
//   * a Read or a Write-non-post then receives exactly one response, SResp != NULL, which the
//     slave holds until a cycle in which MRespAccept is high; a posted Write receives none.
// Widths are set here, so changing ADDR_W, DATA_W or SID_W reconfigures the whole design.
package ocp_pkg;

  parameter int unsigned ADDR_W = 16;
  parameter int unsigned DATA_W = 16;
  parameter int unsigned SID_W  = 3;          // slave ID bits at the top of MAddr
  parameter int unsigned OFFS_W = ADDR_W - SID_W;

  typedef enum logic [2:0] {
    CMD_IDLE  = 3'b000,
    CMD_WR    = 3'b001,
    CMD_RD    = 3'b010,
    CMD_WRNP  = 3'b101
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    RESP_NULL = 2'b00,
    RESP_DVA  = 2'b01,
    RESP_FAIL = 2'b10,
    RESP_ERR  = 2'b11
  } ocp_resp_e;

  typedef struct packed {
    ocp_cmd_e            mcmd;
    logic [ADDR_W-1:0]   maddr;
    logic [DATA_W-1:0]   mdata;
    logic                mdatavalid;
    logic                mrespaccept;
  } ocp_req_t;

  typedef struct packed {
    logic                scmdaccept;
    logic                sdataaccept;
    ocp_resp_e           sresp;
    logic [DATA_W-1:0]   sdata;
  } ocp_rsp_t;

  localparam ocp_req_t REQ_IDLE = '{mcmd: CMD_IDLE, maddr: '0, mdata: '0, mdatavalid: 1'b0,
                                    mrespaccept: 1'b0};
  localparam ocp_rsp_t RSP_IDLE = '{scmdaccept: 1'b0, sdataaccept: 1'b0, sresp: RESP_NULL,
                                    sdata: '0};

  // A command that is followed by a response (Read and Write-non-post).
  function automatic logic needs_resp(ocp_cmd_e c);
    return (c == CMD_RD) || (c == CMD_WRNP);
  endfunction

  // A command that carries write data.
  function automatic logic is_write(ocp_cmd_e c);
    return (c == CMD_WR) || (c == CMD_WRNP);
  endfunction

  // Operation chosen by the dual-port FIFO slave in a cycle (state names as in the document's
  // waveform of the dual-port FIFO: WRRD = one port writes while the other reads).
  typedef enum logic [2:0] {
    DPF_IDLE_ST  = 3'd0,
    M1_WRITE_ST  = 3'd1,
    M2_WRITE_ST  = 3'd2,
    M1_READ_ST   = 3'd3,
    M2_READ_ST   = 3'd4,
    M1_WRRD_ST   = 3'd5,   // port 1 writes, port 2 reads
    M2_WRRD_ST   = 3'd6    // port 2 writes, port 1 reads
  } dpf_state_e;

  // AXI response codes (OKAY, SLVERR) used by the AXI side.
  localparam logic [1:0] AXI_OKAY   = 2'b00;
  localparam logic [1:0] AXI_SLVERR = 2'b10;

endpackage
