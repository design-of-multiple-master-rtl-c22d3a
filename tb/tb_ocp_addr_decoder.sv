// tb_ocp_addr_decoder: self-checking test of the slave-ID address decoder.
// An OCP master (ocp_master) drives the decoder, which has three memory slaves (ocp_mem_slave)
// with IDs 000, 001 and 010. Random commands go to all eight slave-ID values. Monitors on the
// slave ports check that a command reaches only the slave whose ID matches the top three MAddr
// bits, with those bits cleared. Read data is compared with a per-slave memory model. Commands
// to an unused ID must be accepted by the decoder and, for Reads and Write-non-posts, answered
// with ERR without reaching any slave.
module tb_ocp_addr_decoder;
  import ocp_pkg::*;
  localparam int NS = 3;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  ocp_req_t mreq;
  ocp_rsp_t mrsp;
  ocp_req_t sreq [NS];
  ocp_rsp_t srsp [NS];
  int checks = 0, failures = 0;

  logic              cv, crdy, cdone;
  ocp_cmd_e          cc;
  logic [ADDR_W-1:0] ca;
  logic [DATA_W-1:0] cd, crdata;
  ocp_resp_e         cresp;

  ocp_master u_m (.clk, .rst_n, .cmd_valid(cv), .cmd(cc), .addr(ca), .data(cd),
                  .cmd_ready(crdy), .done(cdone), .rdata(crdata), .resp(cresp),
                  .ocp_req(mreq), .ocp_rsp(mrsp));
  ocp_addr_decoder #(.NS(NS), .SLAVE_IDS('{3'b000, 3'b001, 3'b010})) dut (
    .clk, .rst_n, .m_req(mreq), .m_rsp(mrsp), .s_req(sreq), .s_rsp(srsp));
  for (genvar s = 0; s < NS; s++) begin : g_s
    ocp_mem_slave #(.DEPTH(DEPTH)) u_s (.clk, .rst_n, .ocp_req(sreq[s]), .ocp_rsp(srsp[s]));
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [DATA_W-1:0] model [NS][DEPTH];
  int hits [NS];
  int n_miss = 0;

  always @(posedge clk) if (rst_n) begin
    automatic int sid = int'(mreq.maddr[ADDR_W-1 -: SID_W]);
    for (int s = 0; s < NS; s++) if (sreq[s].mcmd != CMD_IDLE) begin
      check(s == sid, $sformatf("slave %0d gets only SID %0d commands (got SID %0d)", s, s, sid));
      check(sreq[s].maddr[ADDR_W-1 -: SID_W] == '0 &&
            sreq[s].maddr[OFFS_W-1:0] == mreq.maddr[OFFS_W-1:0], "offset passed, SID cleared");
    end
  end

  initial begin
    int k, sid, wc;
    logic [3:0] off;
    ocp_cmd_e c;
    cv = 0; cc = CMD_IDLE; ca = '0; cd = '0;
    hits = '{default: 0};
    repeat (3) @(negedge clk);
    for (int s = 0; s < NS; s++) for (int i = 0; i < DEPTH; i++) begin
      model[s][i] = '0;
    end
    for (int i = 0; i < DEPTH; i++) begin
      g_s[0].u_s.mem[i] = '0; g_s[1].u_s.mem[i] = '0; g_s[2].u_s.mem[i] = '0;
    end
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      k   = $urandom_range(0, 2);
      c   = (k == 0) ? CMD_WR : (k == 1) ? CMD_WRNP : CMD_RD;
      sid = ($urandom_range(0, 4) == 0) ? $urandom_range(3, 7) : $urandom_range(0, 2);
      off = 4'($urandom);
      cv = 1; cc = c; ca = {3'(sid), 9'd0, off}; cd = DATA_W'($urandom);
      @(negedge clk); cv = 0;
      wc = 0;
      while (!cdone && wc < 20) begin @(negedge clk); wc++; end
      check(cdone, "command completes");
      if (sid < NS) begin
        hits[sid]++;
        if (c == CMD_RD) check(cresp == RESP_DVA && crdata == model[sid][off],
                               $sformatf("read from slave %0d", sid));
        if (c == CMD_WRNP) check(cresp == RESP_DVA, "write non-post DVA");
        if (is_write(c)) model[sid][off] = cd;
      end else begin
        n_miss++;
        if (needs_resp(c)) check(cresp == RESP_ERR, "unused slave ID answered with ERR");
      end
    end
    for (int s = 0; s < NS; s++) check(hits[s] > 0, "every slave addressed");
    check(n_miss > 0, "unused slave ID exercised");
    $display("hits=%0d/%0d/%0d misses=%0d", hits[0], hits[1], hits[2], n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
