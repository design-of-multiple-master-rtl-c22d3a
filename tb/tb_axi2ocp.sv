// tb_axi2ocp: self-checking test of the AXI-to-OCP converter.
// An AXI master (axi_master) drives the converter while a behavioural OCP slave in the testbench
// accepts commands and responds after random delays, sometimes with FAIL or ERR. Write and read
// bursts of random length are started concurrently. Checks: every AXI write beat appears on OCP
// as one Write-non-post carrying that beat's data at AWADDR+beat; every AXI read beat as one Read
// at ARADDR+beat; the OCP command is held until SCmdAccept; only one OCP transaction is in
// flight; each R beat carries its Read's SData, with RRESP = OKAY for DVA and SLVERR otherwise,
// and RLAST on the last beat; BRESP is SLVERR exactly when some beat of the burst failed. When a
// write beat and a read beat wait together, the kind not issued last must go first; the number
// of such contended issues must be non-zero.
module tb_axi2ocp;
  import ocp_pkg::*;
  localparam int NBURST = 60;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic              wr_start, wr_next, wr_ready, wr_done;
  logic              rd_start, rd_ready, rd_beat, rd_last, rd_done;
  logic [ADDR_W-1:0] wr_addr, rd_addr, awaddr, araddr;
  logic [3:0]        wr_len, rd_len, awlen, arlen;
  logic [DATA_W-1:0] wr_data, rd_data, wdata, rdata;
  logic [1:0]        wr_resp, rd_resp, bresp, rresp;
  logic awvalid, awready, wvalid, wlast, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  ocp_req_t req;
  ocp_rsp_t rsp;

  axi_master u_m (.*);
  axi2ocp dut (.clk, .rst_n, .awaddr, .awlen, .awvalid, .awready, .wdata, .wvalid, .wlast,
               .wready, .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready, .rdata,
               .rresp, .rlast, .rvalid, .rready, .ocp_req(req), .ocp_rsp(rsp));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // -------- behavioural OCP slave --------
  ocp_cmd_e cur_cmd;
  int n_ocp_wr = 0, n_ocp_rd = 0;
  initial begin
    int d;
    ocp_req_t held;
    rsp = RSP_IDLE;
    forever begin
      @(negedge clk);
      if (req.mcmd != CMD_IDLE) begin
        held = req;
        check(req.mcmd == CMD_WRNP || req.mcmd == CMD_RD, "only Write-non-post and Read used");
        d = $urandom_range(0, 3);
        repeat (d) begin @(negedge clk); check(req == held, "OCP command held until accept"); end
        rsp.scmdaccept = 1; rsp.sdataaccept = is_write(req.mcmd);
        cur_cmd = req.mcmd;
        if (req.mcmd == CMD_RD) n_ocp_rd++; else n_ocp_wr++;
        @(negedge clk); rsp = RSP_IDLE;
        check(req.mcmd == CMD_IDLE, "one OCP transaction in flight");
        repeat ($urandom_range(0, 3)) @(negedge clk);
        d = $urandom_range(0, 9);
        rsp.sresp = (d == 0) ? RESP_FAIL : (d == 1) ? RESP_ERR : RESP_DVA;
        rsp.sdata = (cur_cmd == CMD_RD) ? DATA_W'($urandom) : '0;
        #1 check(req.mrespaccept, "MRespAccept when the response is there");
        @(negedge clk); rsp = RSP_IDLE;
      end
    end
  end

  // -------- scoreboard --------
  logic [ADDR_W+DATA_W-1:0] w_exp [$];     // {address, data} of each write beat, in order
  logic [ADDR_W-1:0]        r_exp [$];     // address of each read beat
  bit                       r_last_exp [$];
  logic [DATA_W-1:0]        r_dat [$];
  logic [1:0]               r_rsp [$];
  logic [ADDR_W-1:0]        w_base;
  int                       w_k = 0;
  bit                       w_fail = 0;    // some beat of the current write burst failed
  int n_wbeats = 0, n_rbeats = 0;
  always @(posedge clk) if (rst_n) begin
    if (awvalid && awready) begin w_base = awaddr; w_k = 0; end
    if (wvalid && wready) begin
      w_exp.push_back({w_base + ADDR_W'(w_k), wdata}); w_k++; n_wbeats++;
    end
    if (arvalid && arready)
      for (int k = 0; k <= int'(arlen); k++) begin
        r_exp.push_back(araddr + ADDR_W'(k)); r_last_exp.push_back(k == int'(arlen));
        n_rbeats++;
      end
    if (req.mcmd != CMD_IDLE && rsp.scmdaccept) begin
      if (req.mcmd == CMD_WRNP) begin
        check(w_exp.size() > 0 && {req.maddr, req.mdata} == w_exp[0], "write beat mapped");
        if (w_exp.size() > 0) void'(w_exp.pop_front());
      end else begin
        check(r_exp.size() > 0 && req.maddr == r_exp[0], "read beat address mapped");
        if (r_exp.size() > 0) void'(r_exp.pop_front());
      end
    end
    if (rsp.sresp != RESP_NULL && req.mrespaccept) begin
      if (cur_cmd == CMD_RD) begin
        r_dat.push_back(rsp.sdata);
        r_rsp.push_back(rsp.sresp == RESP_DVA ? 2'b00 : 2'b10);
      end else if (rsp.sresp != RESP_DVA) w_fail = 1;
    end
    if (rvalid && rready) begin
      check(r_dat.size() > 0 && rdata == r_dat[0] && rresp == r_rsp[0], "RDATA/RRESP mapped");
      check(r_last_exp.size() > 0 && rlast == r_last_exp[0], "RLAST on the last beat");
      if (r_dat.size() > 0) begin void'(r_dat.pop_front()); void'(r_rsp.pop_front()); end
      if (r_last_exp.size() > 0) void'(r_last_exp.pop_front());
    end
    if (bvalid && bready) begin
      check(bresp == (w_fail ? 2'b10 : 2'b00), "BRESP is SLVERR exactly when a beat failed");
      w_fail = 0;
    end
  end

  // contended issue order
  int n_contend = 0;
  bit tb_last_rd = 0, both_wait_q = 0, r_pend = 0, w_pend = 0;
  // r_pend/w_pend: a read / write beat is captured and not yet issued, as seen in the current
  // cycle (updated after use at each edge, from the handshakes at that edge)
  always @(posedge clk) if (rst_n) begin
    if (both_wait_q && req.mcmd != CMD_IDLE) begin
      n_contend++;
      check((req.mcmd == CMD_RD) == !tb_last_rd, "the kind not served last goes first");
    end
    if (req.mcmd != CMD_IDLE && rsp.scmdaccept) tb_last_rd = (req.mcmd == CMD_RD);
    both_wait_q = 0;
    if (req.mcmd == CMD_IDLE && !req.mrespaccept && r_pend && w_pend) both_wait_q = 1;
    if (wvalid && wready) w_pend = 1;
    if (arvalid && arready) r_pend = 1;
    if (rvalid && rready && !rlast) r_pend = 1;
    if (req.mcmd == CMD_WRNP && rsp.scmdaccept) w_pend = 0;
    if (req.mcmd == CMD_RD && rsp.scmdaccept) r_pend = 0;
  end

  // -------- user side --------
  logic [DATA_W-1:0] wbase;
  int wi;
  always @(posedge clk) if (wr_next) begin wi <= wi + 1; wr_data <= wbase + DATA_W'(wi + 1); end

  bit wfin = 0, rfin = 0;
  initial begin
    wr_start = 0; wr_addr = '0; wr_len = '0; wr_data = '0; wi = 0; wbase = '0;
    wait (rst_n);
    for (int n = 0; n < NBURST; n++) begin
      @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      wbase = DATA_W'($urandom); wi = 0; wr_data = wbase;
      wr_start = 1; wr_addr = ADDR_W'($urandom); wr_len = 4'($urandom_range(0, 5));
      @(negedge clk); wr_start = 0;
      while (!wr_done) @(negedge clk);
    end
    wfin = 1;
  end

  initial begin
    rd_start = 0; rd_addr = '0; rd_len = '0;
    wait (rst_n);
    for (int n = 0; n < NBURST; n++) begin
      @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      rd_start = 1; rd_addr = ADDR_W'($urandom); rd_len = 4'($urandom_range(0, 5));
      @(negedge clk); rd_start = 0;
      while (!rd_done) @(negedge clk);
    end
    rfin = 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (wfin && rfin);
    repeat (5) @(negedge clk);
    check(n_ocp_wr == n_wbeats && n_ocp_rd == n_rbeats, "one OCP command per AXI beat");
    check(w_exp.size() == 0 && r_exp.size() == 0 && r_dat.size() == 0, "nothing left over");
    check(n_contend > 0, "read and write contended for OCP");
    $display("write beats=%0d read beats=%0d contended=%0d", n_wbeats, n_rbeats, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
