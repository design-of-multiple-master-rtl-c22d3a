// tb_ocp_master: self-checking test of the OCP master FSM.
// A behavioural OCP slave in the testbench accepts commands after a random delay and answers
// Reads and Write-non-posts after another random delay. The testbench checks that MCmd, MAddr and
// MData appear together in the cycle after the user command and are held unchanged until
// SCmdAccept, that MDataValid marks writes, that a posted Write completes right after its accept,
// and that done/rdata/resp report the slave's response one cycle after it is taken.
module tb_ocp_master;
  import ocp_pkg::*;
  logic clk = 0, rst_n = 0;
  ocp_req_t req;
  ocp_rsp_t rsp;
  logic              cmd_valid, cmd_ready, done;
  ocp_cmd_e          cmd;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] data, rdata;
  ocp_resp_e         resp;
  int checks = 0, failures = 0;

  ocp_master dut (.clk, .rst_n, .cmd_valid, .cmd, .addr, .data, .cmd_ready, .done, .rdata, .resp,
                  .ocp_req(req), .ocp_rsp(rsp));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    ocp_cmd_e c; logic [ADDR_W-1:0] a; logic [DATA_W-1:0] d, sd; ocp_resp_e sr;
    int acc_dly, rsp_dly, k, n_wr = 0, n_rd = 0, n_wrnp = 0;
    rsp = RSP_IDLE; cmd_valid = 0; cmd = CMD_IDLE; addr = '0; data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      k = $urandom_range(0, 2);
      c = (k == 0) ? CMD_WR : (k == 1) ? CMD_WRNP : CMD_RD;
      a = ADDR_W'($urandom); d = DATA_W'($urandom);
      @(negedge clk);
      check(cmd_ready, "ready when idle");
      check(req.mcmd == CMD_IDLE, "bus idle between commands");
      cmd_valid = 1; cmd = c; addr = a; data = d;
      @(negedge clk);
      cmd_valid = 0; cmd = CMD_IDLE; addr = '0; data = '0;
      acc_dly = $urandom_range(0, 3);
      for (int i = 0; i <= acc_dly; i++) begin
        check(req.mcmd == c && req.maddr == a, "command and address presented and held");
        check(req.mdatavalid == is_write(c), "MDataValid marks write data");
        if (is_write(c)) check(req.mdata == d, "write data presented with the command");
        check(!cmd_ready, "busy while a command is out");
        if (i == acc_dly) begin rsp.scmdaccept = 1; rsp.sdataaccept = is_write(c); end
        @(negedge clk);
        rsp.scmdaccept = 0; rsp.sdataaccept = 0;
      end
      check(req.mcmd == CMD_IDLE, "command removed after SCmdAccept");
      if (!needs_resp(c)) begin
        check(done && resp == RESP_NULL, "posted write completes after accept");
        n_wr++;
      end else begin
        rsp_dly = $urandom_range(0, 3);
        repeat (rsp_dly) begin
          check(!done, "no done before the response");
          @(negedge clk);
        end
        sr = ($urandom_range(0, 3) == 0) ? RESP_ERR : RESP_DVA;
        sd = DATA_W'($urandom);
        rsp.sresp = sr; rsp.sdata = sd;
        #1;
        check(req.mrespaccept, "MRespAccept in the cycle the response appears");
        @(negedge clk);
        rsp.sresp = RESP_NULL; rsp.sdata = '0;
        check(done && resp == sr && rdata == sd, "done reports SResp and SData");
        if (c == CMD_RD) n_rd++; else n_wrnp++;
      end
    end
    check(n_wr > 0 && n_rd > 0 && n_wrnp > 0, "all three commands issued");
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
