// axi_master: AXI master with independent write and read state machines.
//
// The document describes the AXI master as an FSM with two sub-FSMs, one for writes and one for
// reads, that run independently because AXI has separate read and write channels. Each operation
// starts with the address and its valid on the address channel. The master waits for the slave's
// response (the address handshake) before it sends the write data or collects the read data.
// A write then waits on the write response channel. AXI is burst-based: each command carries a
// length, and LEN+1 data beats follow (AXI 1.0 / AXI3 style 4-bit AxLEN, up to 16 beats).
//
//   write: W_IDLE --wr_start--> W_ADDR (AWVALID) --AWREADY--> W_DATA (WVALID, WLAST on the last
//          beat) --WREADY x LEN+1--> W_RESP (BREADY) --BVALID--> W_IDLE, wr_done with BRESP
//   read:  R_IDLE --rd_start--> R_ADDR (ARVALID) --ARREADY--> R_DATA (RREADY)
//          --RVALID x LEN+1--> R_IDLE; rd_beat for every beat, rd_done with the last one
//
// User side (this design's choice): wr_data is the current write beat; it must hold each beat
// until wr_next pulses (the beat was taken by WREADY) and then show the next one. Read beats come
// out one cycle after they arrive, with rd_beat, rd_data, rd_resp and rd_last. Bursts are of the
// incrementing kind; IDs, sizes, burst types and strobes are not modelled.
module axi_master
  import ocp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // user write port
  input  logic              wr_start,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [3:0]        wr_len,      // beats - 1
  input  logic [DATA_W-1:0] wr_data,     // current beat
  output logic              wr_next,     // current beat taken
  output logic              wr_ready,
  output logic              wr_done,
  output logic [1:0]        wr_resp,
  // user read port
  input  logic              rd_start,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [3:0]        rd_len,
  output logic              rd_ready,
  output logic              rd_beat,
  output logic              rd_last,
  output logic              rd_done,
  output logic [DATA_W-1:0] rd_data,
  output logic [1:0]        rd_resp,
  // AXI write address / data / response channels
  output logic [ADDR_W-1:0] awaddr,
  output logic [3:0]        awlen,
  output logic              awvalid,
  input  logic              awready,
  output logic [DATA_W-1:0] wdata,
  output logic              wvalid,
  output logic              wlast,
  input  logic              wready,
  input  logic [1:0]        bresp,
  input  logic              bvalid,
  output logic              bready,
  // AXI read address / data channels
  output logic [ADDR_W-1:0] araddr,
  output logic [3:0]        arlen,
  output logic              arvalid,
  input  logic              arready,
  input  logic [DATA_W-1:0] rdata,
  input  logic [1:0]        rresp,
  input  logic              rlast,
  input  logic              rvalid,
  output logic              rready
);
  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA}         rstate_e;

  wstate_e    wst;
  rstate_e    rst;
  logic [3:0] wbeat;

  // ---------------- write sub-FSM ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst     <= W_IDLE;
      awaddr  <= '0;
      awlen   <= '0;
      wbeat   <= '0;
      wr_done <= 1'b0;
      wr_resp <= AXI_OKAY;
    end else begin
      wr_done <= 1'b0;
      unique case (wst)
        W_IDLE: if (wr_start) begin
          awaddr <= wr_addr;
          awlen  <= wr_len;
          wbeat  <= '0;
          wst    <= W_ADDR;
        end
        W_ADDR: if (awready) wst <= W_DATA;
        W_DATA: if (wready) begin
          wbeat <= wbeat + 1'b1;
          if (wlast) wst <= W_RESP;
        end
        W_RESP: if (bvalid) begin
          wr_done <= 1'b1;
          wr_resp <= bresp;
          wst     <= W_IDLE;
        end
        default: wst <= W_IDLE;
      endcase
    end
  end

  assign wr_ready = (wst == W_IDLE);
  assign awvalid  = (wst == W_ADDR);
  assign wvalid   = (wst == W_DATA);
  assign wdata    = wr_data;
  assign wlast    = (wst == W_DATA) && (wbeat == awlen);
  assign wr_next  = wvalid && wready;
  assign bready   = (wst == W_RESP);

  // ---------------- read sub-FSM ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst     <= R_IDLE;
      araddr  <= '0;
      arlen   <= '0;
      rd_beat <= 1'b0;
      rd_last <= 1'b0;
      rd_done <= 1'b0;
      rd_data <= '0;
      rd_resp <= AXI_OKAY;
    end else begin
      rd_beat <= 1'b0;
      rd_last <= 1'b0;
      rd_done <= 1'b0;
      unique case (rst)
        R_IDLE: if (rd_start) begin
          araddr <= rd_addr;
          arlen  <= rd_len;
          rst    <= R_ADDR;
        end
        R_ADDR: if (arready) rst <= R_DATA;
        R_DATA: if (rvalid) begin
          rd_beat <= 1'b1;
          rd_data <= rdata;
          rd_resp <= rresp;
          if (rlast) begin
            rd_last <= 1'b1;
            rd_done <= 1'b1;
            rst     <= R_IDLE;
          end
        end
        default: rst <= R_IDLE;
      endcase
    end
  end

  assign rd_ready = (rst == R_IDLE);
  assign arvalid  = (rst == R_ADDR);
  assign rready   = (rst == R_DATA);

`ifndef SYNTHESIS
  // AXI rule: a valid stays high, with stable payload, until its ready.
  assert property (@(posedge clk) disable iff (!rst_n)
                   awvalid && !awready |=> awvalid && $stable(awaddr));
  assert property (@(posedge clk) disable iff (!rst_n)
                   arvalid && !arready |=> arvalid && $stable(araddr));
  assert property (@(posedge clk) disable iff (!rst_n) wvalid && !wready |=> wvalid);
`endif

endmodule
