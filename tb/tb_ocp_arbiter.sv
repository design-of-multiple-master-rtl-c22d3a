// tb_ocp_arbiter: self-checking test of the ring-counter arbiter.
// Four OCP masters (ocp_master) share one memory slave (ocp_mem_slave) through the arbiter. A
// reference model of the ring counter runs next to it: the grant starts at master 0, is one-hot,
// moves to the next master exactly when the granted master shows MCmd = Idle and owes no
// response, and otherwise stays. Only the granted master's request may reach the slave, and only
// it sees the responses. Read data is checked against a memory model updated in accept order,
// and every master must finish all its commands. Counts of token moves over idle masters and of
// cycles held by a busy master must both be non-zero.
module tb_ocp_arbiter;
  import ocp_pkg::*;
  localparam int NM = 4;
  localparam int DEPTH = 64;
  localparam int NOPS = 80;
  logic clk = 0, rst_n = 0;
  ocp_req_t mreq [NM];
  ocp_rsp_t mrsp [NM];
  ocp_req_t sreq;
  ocp_rsp_t srsp;
  logic [NM-1:0] grant;
  int checks = 0, failures = 0;

  logic              cv [NM], crdy [NM], cdone [NM];
  ocp_cmd_e          cc [NM];
  logic [ADDR_W-1:0] ca [NM];
  logic [DATA_W-1:0] cd [NM], crdata [NM];
  ocp_resp_e         cresp [NM];
  bit                fin [NM];

  ocp_arbiter #(.NM(NM)) dut (.clk, .rst_n, .m_req(mreq), .m_rsp(mrsp), .s_req(sreq),
                              .s_rsp(srsp), .grant);
  ocp_mem_slave #(.DEPTH(DEPTH)) u_s (.clk, .rst_n, .ocp_req(sreq), .ocp_rsp(srsp));

  for (genvar m = 0; m < NM; m++) begin : g_m
    ocp_master u_m (.clk, .rst_n, .cmd_valid(cv[m]), .cmd(cc[m]), .addr(ca[m]), .data(cd[m]),
                    .cmd_ready(crdy[m]), .done(cdone[m]), .rdata(crdata[m]), .resp(cresp[m]),
                    .ocp_req(mreq[m]), .ocp_rsp(mrsp[m]));
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- reference ring counter and scoreboard ----------------
  int               ref_g = 0;
  bit               ref_out = 0;
  logic [DATA_W-1:0] model [DEPTH];
  logic [DATA_W-1:0] exp_rd [NM];
  int n_pass_idle = 0, n_hold_busy = 0;

  always @(posedge clk) if (rst_n) begin
    check(grant == NM'(1) << ref_g, $sformatf("grant %b, model says master %0d", grant, ref_g));
    for (int m = 0; m < NM; m++)
      if (m != ref_g) check(mrsp[m] == RSP_IDLE, "ungranted master sees no response");
    check(sreq == mreq[ref_g], "granted request reaches the slave");
    if (sreq.mcmd != CMD_IDLE && srsp.scmdaccept) begin
      if (sreq.mcmd == CMD_RD) exp_rd[ref_g] = model[sreq.maddr[5:0]];
      if (is_write(sreq.mcmd)) model[sreq.maddr[5:0]] = sreq.mdata;
    end
    if (sreq.mcmd == CMD_IDLE && !ref_out) begin
      n_pass_idle++;
      ref_g = (ref_g + 1) % NM;
    end else begin
      n_hold_busy++;
      if (sreq.mcmd != CMD_IDLE && srsp.scmdaccept && needs_resp(sreq.mcmd)) ref_out = 1;
      else if (srsp.sresp != RESP_NULL && sreq.mrespaccept) ref_out = 0;
    end
  end

  for (genvar m = 0; m < NM; m++) begin : g_stim
    initial begin
      int k;
      logic is_rd;
      cv[m] = 0; cc[m] = CMD_IDLE; ca[m] = '0; cd[m] = '0;
      wait (rst_n);
      for (int n = 0; n < NOPS; n++) begin
        @(negedge clk);
        repeat ($urandom_range(0, 6)) @(negedge clk);     // idle gaps let the token move on
        k = $urandom_range(0, 2);
        cc[m] = (k == 0) ? CMD_WR : (k == 1) ? CMD_WRNP : CMD_RD;
        is_rd = (k == 2);
        ca[m] = ADDR_W'($urandom_range(0, DEPTH-1)); cd[m] = DATA_W'($urandom);
        cv[m] = 1;
        @(negedge clk); cv[m] = 0;
        while (!cdone[m]) @(negedge clk);
        if (is_rd) check(crdata[m] == exp_rd[m] && cresp[m] == RESP_DVA,
                         $sformatf("master %0d read data", m));
      end
      fin[m] = 1;
    end
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    fin = '{default: 0};
    // clear the memory through the back door of the testbench: write zeros first
    repeat (3) @(negedge clk);
    for (int i = 0; i < DEPTH; i++) u_s.mem[i] = '0;
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    check(n_pass_idle > 0, "token passed over an idle master");
    check(n_hold_busy > 0, "grant held by a busy master");
    $display("token_moves=%0d held_cycles=%0d", n_pass_idle, n_hold_busy);
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
