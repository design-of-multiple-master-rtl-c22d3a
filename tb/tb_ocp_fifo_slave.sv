// tb_ocp_fifo_slave: self-checking test of the synchronous-FIFO OCP slave.
// Random Write, Write-non-post and Read commands at random offsets are checked against a queue
// model: first-in first-out order, FAIL on a read from an empty FIFO and on a non-posted write
// to a full one, the fill level, and the one-cycle response latency. The sequence is biased in
// phases so that the FIFO both fills up (overflow) and drains (underflow).
module tb_ocp_fifo_slave;
  import ocp_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  ocp_req_t req;
  ocp_rsp_t rsp;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  int n_over = 0, n_under = 0;
  logic [DATA_W-1:0] q [$];

  ocp_fifo_slave #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .ocp_req(req), .ocp_rsp(rsp), .count);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(ocp_cmd_e c, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d,
                    output ocp_resp_e r, output logic [DATA_W-1:0] rd, output int lat);
    @(negedge clk);
    req.mcmd = c; req.maddr = a; req.mdata = d; req.mdatavalid = is_write(c);
    #1;
    check(rsp.scmdaccept == 1'b1, "command accepted in the cycle it appears");
    @(negedge clk);
    req = REQ_IDLE;
    r = RESP_NULL; rd = '0; lat = 0;
    if (needs_resp(c)) begin
      lat = 1;
      while (rsp.sresp == RESP_NULL && lat < 20) begin @(negedge clk); lat++; end
      r = rsp.sresp; rd = rsp.sdata;
      req.mrespaccept = 1'b1;
      @(negedge clk);
      req.mrespaccept = 1'b0;
    end
  endtask

  initial begin
    ocp_resp_e r; logic [DATA_W-1:0] rd, d; int lat, wr_bias;
    ocp_cmd_e c;
    req = REQ_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      wr_bias = ((n / 60) % 2 == 0) ? 80 : 20;     // alternate filling and draining phases
      d = DATA_W'($urandom);
      if ($urandom_range(0, 99) < wr_bias) c = ($urandom_range(0, 1) == 0) ? CMD_WR : CMD_WRNP;
      else c = CMD_RD;
      op(c, {3'b001, 13'($urandom)}, d, r, rd, lat);
      if (c == CMD_RD) begin
        check(lat == 1, "read response one cycle after accept");
        if (q.size() == 0) begin
          n_under++;
          check(r == RESP_FAIL, "underflow answered with FAIL");
        end else begin
          logic [DATA_W-1:0] e;
          e = q.pop_front();
          check(r == RESP_DVA && rd == e, $sformatf("FIFO order: got %h want %h", rd, e));
        end
      end else begin
        if (q.size() == DEPTH) begin
          n_over++;
          if (c == CMD_WRNP) check(r == RESP_FAIL, "overflow answered with FAIL");
        end else begin
          q.push_back(d);
          if (c == CMD_WRNP) check(r == RESP_DVA && lat == 1, "non-posted write DVA after one cycle");
        end
      end
      check(int'(count) == q.size(), "fill level");
    end
    check(n_over > 0, "overflow exercised");
    check(n_under > 0, "underflow exercised");
    $display("overflows=%0d underflows=%0d", n_over, n_under);
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
