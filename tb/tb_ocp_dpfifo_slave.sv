// tb_ocp_dpfifo_slave: self-checking test of the dual-port FIFO OCP slave.
// Two OCP masters (ocp_master) issue random commands on the two ports at the same time. A
// monitor watches the accept handshakes at every rising edge and keeps a queue model: the pop
// of a cycle sees the FIFO before that cycle's push. Each response is compared with the value
// the model predicted for that port. The monitor also checks the arbitration rules: never two
// pushes or two pops in a cycle, a conflict grants one port and leaves the other waiting, the
// priority alternates between conflicts, and a write and a read on different ports go together.
// It counts write conflicts, read conflicts, write-with-read cycles (WRRD states), overflows and
// underflows, and fails if any of them never happened.
module tb_ocp_dpfifo_slave;
  import ocp_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  ocp_req_t req [2];
  ocp_rsp_t rsp [2];
  dpf_state_e state, state_next;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;

  logic              cv [2];
  ocp_cmd_e          cc [2];
  logic [ADDR_W-1:0] ca [2];
  logic [DATA_W-1:0] cd [2];
  logic              crdy [2], cdone [2];
  logic [DATA_W-1:0] crdata [2];
  ocp_resp_e         cresp [2];

  ocp_dpfifo_slave #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .req1(req[0]), .rsp1(rsp[0]), .req2(req[1]), .rsp2(rsp[1]),
    .state, .state_next, .count
  );

  for (genvar p = 0; p < 2; p++) begin : g_m
    ocp_master u_m (
      .clk, .rst_n, .cmd_valid(cv[p]), .cmd(cc[p]), .addr(ca[p]), .data(cd[p]),
      .cmd_ready(crdy[p]), .done(cdone[p]), .rdata(crdata[p]), .resp(cresp[p]),
      .ocp_req(req[p]), .ocp_rsp(rsp[p])
    );
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- scoreboard ----------------
  logic [DATA_W-1:0] model [$];
  ocp_resp_e         exp_resp [2];
  logic [DATA_W-1:0] exp_data [2];
  int n_wconf = 0, n_rconf = 0, n_wrrd = 0, n_over = 0, n_under = 0, n_resp = 0;
  int last_wwin = -1, last_rwin = -1;

  always @(posedge clk) if (rst_n) begin
    automatic bit w [2], r [2], aw [2], ar [2];
    automatic bit was_empty = (model.size() == 0);
    automatic bit was_full  = (model.size() == DEPTH);
    for (int p = 0; p < 2; p++) begin
      w[p]  = is_write(req[p].mcmd);
      r[p]  = (req[p].mcmd == CMD_RD);
      aw[p] = w[p] && rsp[p].scmdaccept;
      ar[p] = r[p] && rsp[p].scmdaccept;
    end
    check(!(aw[0] && aw[1]) && !(ar[0] && ar[1]), "one push and one pop per cycle");
    if (w[0] && w[1]) begin
      n_wconf++;
      check(aw[0] != aw[1], "write conflict grants exactly one port");
      if (last_wwin >= 0) check(aw[last_wwin] == 1'b0, "write priority alternates");
      last_wwin = aw[0] ? 0 : 1;
    end
    if (r[0] && r[1]) begin
      n_rconf++;
      check(ar[0] != ar[1], "read conflict grants exactly one port");
      if (last_rwin >= 0) check(ar[last_rwin] == 1'b0, "read priority alternates");
      last_rwin = ar[0] ? 0 : 1;
    end
    for (int p = 0; p < 2; p++)
      if (w[p] && r[1-p]) begin
        n_wrrd++;
        check(aw[p] && ar[1-p], "write on one port and read on the other proceed together");
        check(state_next == (p == 0 ? M1_WRRD_ST : M2_WRRD_ST), "WRRD state");
      end
    // reads see the FIFO before this edge's push
    for (int p = 0; p < 2; p++) if (ar[p]) begin
      if (was_empty) begin
        n_under++; exp_resp[p] = RESP_FAIL; exp_data[p] = '0;
      end else begin
        exp_resp[p] = RESP_DVA; exp_data[p] = model.pop_front();
      end
    end
    for (int p = 0; p < 2; p++) if (aw[p]) begin
      if (was_full) begin
        n_over++; exp_resp[p] = RESP_FAIL;
      end else begin
        model.push_back(req[p].mdata); exp_resp[p] = RESP_DVA;
      end
      exp_data[p] = '0;                 // a write's response carries no data
    end
    // responses
    for (int p = 0; p < 2; p++)
      if (rsp[p].sresp != RESP_NULL && req[p].mrespaccept) begin
        n_resp++;
        check(rsp[p].sresp == exp_resp[p], $sformatf("port %0d response code", p+1));
        check(rsp[p].sdata == exp_data[p],
              $sformatf("port %0d read data %h want %h", p+1, rsp[p].sdata, exp_data[p]));
      end
  end

  // ---------------- stimulus ----------------
  for (genvar p = 0; p < 2; p++) begin : g_stim
    initial begin
      int k;
      cv[p] = 0; cc[p] = CMD_IDLE; ca[p] = '0; cd[p] = '0;
      wait (rst_n);
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        while (!crdy[p]) @(negedge clk);
        k = $urandom_range(0, 99);
        cv[p] = 1;
        cc[p] = (k < 25) ? CMD_WR : (k < 50) ? CMD_WRNP : CMD_RD;
        if ((n / 50) % 2 == 1 && k < 50) cc[p] = CMD_RD;   // draining phases
        ca[p] = {3'b010, 13'd0};
        cd[p] = DATA_W'($urandom);
        @(negedge clk);
        cv[p] = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
      done_port[p] = 1'b1;
    end
  end
  logic done_port [2] = '{1'b0, 1'b0};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_port[0] && done_port[1]);
    repeat (10) @(negedge clk);
    check(n_wconf > 0, "write conflict happened");
    check(n_rconf > 0, "read conflict happened");
    check(n_wrrd > 0, "simultaneous write and read happened");
    check(n_over > 0, "overflow happened");
    check(n_under > 0, "underflow happened");
    check(n_resp > 0, "responses seen");
    $display("write_conflicts=%0d read_conflicts=%0d wrrd=%0d overflows=%0d underflows=%0d",
             n_wconf, n_rconf, n_wrrd, n_over, n_under);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
