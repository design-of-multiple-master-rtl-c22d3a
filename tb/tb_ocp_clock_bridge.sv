// tb_ocp_clock_bridge: self-checking test of the OCP clock bridge.
// Two bridges are tested side by side, each with an OCP master (ocp_master) on a 10 ns clock and
// a memory slave (ocp_mem_slave) on its own clock: 23 ns (slower slave) and 7 ns (faster slave).
// Random Writes, Write-non-posts and Reads are sent through each. A monitor on the slave side
// checks that every command arrives exactly once and unchanged, in order. Read data is compared
// with a memory model. Every transaction must complete within a bounded number of master cycles.
module tb_ocp_clock_bridge;
  import ocp_pkg::*;
  localparam int NB = 2;
  localparam int DEPTH = 64;
  logic rst_n = 0;
  logic mclk = 0;
  logic sclk [NB];
  int checks = 0, failures = 0;
  bit finished [NB];

  always #5 mclk = ~mclk;
  initial begin sclk[0] = 0; forever #11.5 sclk[0] = ~sclk[0]; end
  initial begin sclk[1] = 0; forever #3.5  sclk[1] = ~sclk[1]; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  for (genvar b = 0; b < NB; b++) begin : g_b
    ocp_req_t mreq, sreq;
    ocp_rsp_t mrsp, srsp;
    logic              cv, crdy, cdone;
    ocp_cmd_e          cc;
    logic [ADDR_W-1:0] ca;
    logic [DATA_W-1:0] cd, crdata;
    ocp_resp_e         cresp;
    ocp_req_t          sent [$];
    logic [DATA_W-1:0] model [DEPTH];

    ocp_master u_m (.clk(mclk), .rst_n, .cmd_valid(cv), .cmd(cc), .addr(ca), .data(cd),
                    .cmd_ready(crdy), .done(cdone), .rdata(crdata), .resp(cresp),
                    .ocp_req(mreq), .ocp_rsp(mrsp));
    ocp_clock_bridge dut (.rst_n, .m_clk(mclk), .m_req(mreq), .m_rsp(mrsp),
                          .s_clk(sclk[b]), .s_req(sreq), .s_rsp(srsp));
    ocp_mem_slave #(.DEPTH(DEPTH)) u_s (.clk(sclk[b]), .rst_n, .ocp_req(sreq), .ocp_rsp(srsp));

    // slave-side monitor: each accepted command must be the next one sent
    always @(posedge sclk[b]) if (rst_n && sreq.mcmd != CMD_IDLE && srsp.scmdaccept) begin
      ocp_req_t e;
      check(sent.size() > 0, "no command appears that was not sent");
      if (sent.size() > 0) begin
        e = sent.pop_front();
        check(sreq.mcmd == e.mcmd && sreq.maddr == e.maddr &&
              (!is_write(e.mcmd) || sreq.mdata == e.mdata), "command crosses unchanged");
      end
    end

    initial begin
      int k, wait_cyc;
      ocp_req_t r;
      for (int i = 0; i < DEPTH; i++) model[i] = '0;
      cv = 0; cc = CMD_IDLE; ca = '0; cd = '0;
      wait (rst_n);
      // start from a known memory
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge mclk); while (!crdy) @(negedge mclk);
        cv = 1; cc = CMD_WR; ca = ADDR_W'(i); cd = '0;
        r = REQ_IDLE; r.mcmd = CMD_WR; r.maddr = ca; r.mdata = cd; sent.push_back(r);
        @(negedge mclk); cv = 0;
      end
      for (int n = 0; n < 150; n++) begin
        @(negedge mclk); while (!crdy) @(negedge mclk);
        k = $urandom_range(0, 2);
        cc = (k == 0) ? CMD_WR : (k == 1) ? CMD_WRNP : CMD_RD;
        ca = ADDR_W'($urandom_range(0, DEPTH-1)); cd = DATA_W'($urandom);
        cv = 1;
        r = REQ_IDLE; r.mcmd = cc; r.maddr = ca; r.mdata = cd; sent.push_back(r);
        @(negedge mclk); cv = 0;
        wait_cyc = 0;
        while (!cdone && wait_cyc < 60) begin @(negedge mclk); wait_cyc++; end
        check(cdone, "transaction completes through the bridge");
        check(wait_cyc < 30, $sformatf("bounded bridge latency (%0d cycles)", wait_cyc));
        if (r.mcmd == CMD_RD) check(cresp == RESP_DVA && crdata == model[r.maddr[5:0]],
                                   "read data through the bridge");
        if (r.mcmd == CMD_WRNP) check(cresp == RESP_DVA, "non-posted write response");
        if (is_write(r.mcmd)) model[r.maddr[5:0]] = r.mdata;
      end
      repeat (10) @(negedge mclk);
      check(sent.size() == 0, "every command reached the slave");
      finished[b] = 1;
    end
  end

  initial begin
    finished = '{0, 0};
    #23 rst_n = 1;
    wait (finished[0] && finished[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge mclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
