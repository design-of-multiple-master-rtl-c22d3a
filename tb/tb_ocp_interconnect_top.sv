// tb_ocp_interconnect_top: end-to-end test of the whole interconnect at its default size.
// Five masters (two AXI, three OCP) and three slaves run on eight different clocks. The test
// runs in phases separated by barriers:
//   0  error paths: a read from the empty FIFO (underflow), a read and a non-posted write to an
//      unused slave ID, both through AXI and OCP masters;
//   1  all four arbitrated masters at once write, then read back, words of their own region of
//      the memory slave (the AXI masters as 8-beat bursts); the AXI masters also overlap a read
//      with a write;
//   2-4 every master pushes into the FIFO slave until it is full, one more write overflows, then
//      all masters pop it empty; the values read must be exactly the values written;
//   5  the fixed OCP master and the arbitrated masters write to and read from the dual-port FIFO
//      at the same time; every value read must have been written, none twice.
// Every mechanism is counted (grant moves and holds, AXI bursts split into OCP transactions, Writes, Write-non-
// posts and Reads, clock-bridge crossings to each slave, decoder misses, FIFO overflow and
// underflow, dual-port write and read conflicts, write-with-read cycles); one that never
// happened is a failure.
module tb_ocp_interconnect_top;
  import ocp_pkg::*;
  localparam int N_AXI = 2, N_OCP = 2, NM = 4;
  localparam int FIFO_DEPTH = 16;

  logic rst_n = 0;
  logic [NM-1:0] clk_m = '0;
  logic clk_ic = 0;
  logic [2:0] clk_s = '0;
  int checks = 0, failures = 0;

  logic              axi_wr_start [N_AXI], axi_wr_ready [N_AXI], axi_wr_done [N_AXI];
  logic              axi_wr_next [N_AXI], axi_rd_beat [N_AXI], axi_rd_last [N_AXI];
  logic [3:0]        axi_wr_len [N_AXI], axi_rd_len [N_AXI];
  logic [ADDR_W-1:0] axi_wr_addr [N_AXI], axi_rd_addr [N_AXI];
  logic [DATA_W-1:0] axi_wr_data [N_AXI], axi_rd_data [N_AXI];
  logic [1:0]        axi_wr_resp [N_AXI], axi_rd_resp [N_AXI];
  logic              axi_rd_start [N_AXI], axi_rd_ready [N_AXI], axi_rd_done [N_AXI];
  logic              ocp_cmd_valid [N_OCP+1], ocp_cmd_ready [N_OCP+1], ocp_done [N_OCP+1];
  ocp_cmd_e          ocp_cmd [N_OCP+1];
  logic [ADDR_W-1:0] ocp_addr [N_OCP+1];
  logic [DATA_W-1:0] ocp_data [N_OCP+1], ocp_rdata [N_OCP+1];
  ocp_resp_e         ocp_resp [N_OCP+1];
  logic [NM-1:0]     grant;
  dpf_state_e        dpf_state, dpf_state_next;
  logic [4:0]        fifo_count, dpf_count;

  ocp_interconnect_top dut (.*);

  // eight clocks, all different
  always #5  clk_m[0] = ~clk_m[0];
  always #6  clk_m[1] = ~clk_m[1];
  always #7  clk_m[2] = ~clk_m[2];
  always #8  clk_m[3] = ~clk_m[3];
  always #4  clk_ic   = ~clk_ic;
  always #4.5 clk_s[0] = ~clk_s[0];
  always #5.5 clk_s[1] = ~clk_s[1];
  always #6.5 clk_s[2] = ~clk_s[2];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- phase control ----------------
  int phase = -1;
  bit pdone [NM+1];
  localparam logic [SID_W-1:0] SID_MEM = 3'b000, SID_FIFO = 3'b001, SID_DPF = 3'b010;
  function automatic logic [ADDR_W-1:0] A(logic [SID_W-1:0] sid, int off);
    return {sid, OFFS_W'(off)};
  endfunction

  // values moved through the FIFOs
  logic [DATA_W-1:0] fifo_written [$], fifo_read [$], dpf_written [$], dpf_read [$];
  int n_overflow_seen = 0, n_underflow_seen = 0, n_miss_seen = 0;
  int n_axi_wr_bursts = 0, n_axi_rd_bursts = 0;

  // ---------------- AXI master programs ----------------
  for (genvar i = 0; i < N_AXI; i++) begin : g_axi
    // burst write of the values in `data` at incrementing addresses from a
    logic [DATA_W-1:0] wq [$];
    always @(posedge clk_m[i]) if (axi_wr_next[i]) begin
      void'(wq.pop_front());
      axi_wr_data[i] <= (wq.size() > 0) ? wq[0] : '0;
    end
    task automatic wrb(logic [ADDR_W-1:0] a, logic [DATA_W-1:0] data [$], output logic [1:0] r);
      @(negedge clk_m[i]);
      while (!axi_wr_ready[i]) @(negedge clk_m[i]);
      wq = data; axi_wr_data[i] = wq[0];
      axi_wr_start[i] = 1; axi_wr_addr[i] = a; axi_wr_len[i] = 4'(data.size() - 1);
      @(negedge clk_m[i]); axi_wr_start[i] = 0;
      while (!axi_wr_done[i]) @(negedge clk_m[i]);
      r = axi_wr_resp[i];
      n_axi_wr_bursts += (data.size() > 1);
    endtask
    task automatic wr(logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d, output logic [1:0] r);
      logic [DATA_W-1:0] one [$];
      one.push_back(d);
      wrb(a, one, r);
    endtask
    // burst read of n words; r is SLVERR if any beat failed
    task automatic rdb(logic [ADDR_W-1:0] a, int n, output logic [DATA_W-1:0] d [$],
                       output logic [1:0] r);
      @(negedge clk_m[i]);
      while (!axi_rd_ready[i]) @(negedge clk_m[i]);
      axi_rd_start[i] = 1; axi_rd_addr[i] = a; axi_rd_len[i] = 4'(n - 1);
      @(negedge clk_m[i]); axi_rd_start[i] = 0;
      d = {}; r = AXI_OKAY;
      forever begin
        if (axi_rd_beat[i]) begin
          d.push_back(axi_rd_data[i]);
          if (axi_rd_resp[i] != AXI_OKAY) r = axi_rd_resp[i];
          check(axi_rd_last[i] == (d.size() == n), "rd_last on the last beat only");
        end
        if (axi_rd_done[i]) break;
        @(negedge clk_m[i]);
      end
      check(d.size() == n, "every read beat arrives");
      n_axi_rd_bursts += (n > 1);
    endtask
    task automatic rd(logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] d, output logic [1:0] r);
      logic [DATA_W-1:0] q [$];
      rdb(a, 1, q, r);
      d = q[0];
    endtask

    initial begin
      logic [1:0] r; logic [DATA_W-1:0] d;
      axi_wr_start[i] = 0; axi_wr_addr[i] = '0; axi_wr_data[i] = '0; axi_wr_len[i] = '0;
      axi_rd_start[i] = 0; axi_rd_addr[i] = '0; axi_rd_len[i] = '0;
      // phase 0
      wait (phase == 0);
      if (i == 0) begin
        rd(A(SID_FIFO, 0), d, r);
        check(r == AXI_SLVERR, "AXI read of the empty FIFO gives SLVERR");
        n_underflow_seen++;
        wr(A(3'b110, 5), 16'h1234, r);
        check(r == AXI_SLVERR, "AXI write to an unused slave ID gives SLVERR");
        n_miss_seen++;
      end
      pdone[i] = 1; wait (phase == 1);
      // phase 1: own region of the memory, base 256*(master index), as 8-beat bursts
      begin
        logic [DATA_W-1:0] v [$], q [$];
        for (int k = 0; k < 8; k++) v.push_back(DATA_W'(16'hA000 + 16'h100*i + k));
        wrb(A(SID_MEM, 256*i), v, r);
        check(r == AXI_OKAY, "AXI burst write OKAY");
        rdb(A(SID_MEM, 256*i), 8, q, r);
        check(r == AXI_OKAY, "AXI burst read OKAY");
        foreach (q[k]) check(q[k] == v[k], $sformatf("AXI master %0d reads back word %0d (%h)", i, k, q[k]));
      end
      // overlapped read and write on the independent AXI channels
      fork
        wr(A(SID_MEM, 256*i + 20), DATA_W'(16'hBEE0 + i), r);
        begin
          logic [1:0] r2; logic [DATA_W-1:0] d2;
          rd(A(SID_MEM, 256*i + 3), d2, r2);
          check(d2 == DATA_W'(16'hA000 + 16'h100*i + 3), "overlapped AXI read");
        end
      join
      rd(A(SID_MEM, 256*i + 20), d, r);
      check(d == DATA_W'(16'hBEE0 + i), "overlapped AXI write landed");
      pdone[i] = 1; wait (phase == 2);
      // phase 2a: fill the FIFO with one 4-beat burst
      begin
        logic [DATA_W-1:0] v [$];
        for (int k = 0; k < 4; k++) v.push_back(DATA_W'(16'hF000 + 16'h10*i + k));
        wrb(A(SID_FIFO, 0), v, r);
        check(r == AXI_OKAY, "FIFO burst write OKAY");
        foreach (v[k]) fifo_written.push_back(v[k]);
      end
      pdone[i] = 1; wait (phase == 3);
      // phase 2b: overflow by master 0
      if (i == 0) begin
        wr(A(SID_FIFO, 0), 16'hDEAD, r);
        check(r == AXI_SLVERR, "write to the full FIFO gives SLVERR");
        n_overflow_seen++;
      end
      pdone[i] = 1; wait (phase == 4);
      // phase 2c: drain
      for (int k = 0; k < 4; k++) begin
        rd(A(SID_FIFO, 0), d, r);
        check(r == AXI_OKAY, "FIFO read OKAY");
        fifo_read.push_back(d);
      end
      pdone[i] = 1; wait (phase == 5);
      // phase 3: dual-port FIFO traffic
      for (int k = 0; k < 12; k++) begin
        d = DATA_W'(16'hD000 + 16'h100*i + k);
        wr(A(SID_DPF, 0), d, r);
        if (r == AXI_OKAY) dpf_written.push_back(d);
        rd(A(SID_DPF, 0), d, r);
        if (r == AXI_OKAY) dpf_read.push_back(d);
      end
      pdone[i] = 1;
    end
  end

  // ---------------- OCP master programs (index N_OCP is the fixed one) ----------------
  for (genvar j = 0; j <= N_OCP; j++) begin : g_ocp
    localparam int M = N_AXI + j;          // arbiter index of an arbitrated OCP master
    wire clk = (j < N_OCP) ? clk_m[M < NM ? M : 0] : clk_s[2];

    task automatic op(ocp_cmd_e c, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] dat,
                      output logic [DATA_W-1:0] q, output ocp_resp_e r);
      @(negedge clk);
      while (!ocp_cmd_ready[j]) @(negedge clk);
      ocp_cmd_valid[j] = 1; ocp_cmd[j] = c; ocp_addr[j] = a; ocp_data[j] = dat;
      @(negedge clk); ocp_cmd_valid[j] = 0;
      while (!ocp_done[j]) @(negedge clk);
      q = ocp_rdata[j]; r = ocp_resp[j];
    endtask

    initial begin
      logic [DATA_W-1:0] q, d; ocp_resp_e r;
      ocp_cmd_valid[j] = 0; ocp_cmd[j] = CMD_IDLE; ocp_addr[j] = '0; ocp_data[j] = '0;
      wait (phase == 0);
      if (j == 0) begin
        op(CMD_RD, A(3'b111, 1), 0, q, r);
        check(r == RESP_ERR, "OCP read of an unused slave ID gives ERR");
        op(CMD_WRNP, A(3'b101, 1), 16'h55, q, r);
        check(r == RESP_ERR, "OCP non-posted write to an unused slave ID gives ERR");
        n_miss_seen += 2;
      end
      if (j == N_OCP) begin
        op(CMD_RD, 0, 0, q, r);
        check(r == RESP_FAIL, "fixed master: read of the empty dual-port FIFO fails");
      end
      pdone[j < N_OCP ? M : NM] = 1; wait (phase == 1);
      if (j < N_OCP) begin
        for (int k = 0; k < 8; k++)
          op((k % 2) ? CMD_WRNP : CMD_WR, A(SID_MEM, 256*M + k),
             DATA_W'(16'hA000 + 16'h100*M + k), q, r);
        for (int k = 0; k < 8; k++) begin
          op(CMD_RD, A(SID_MEM, 256*M + k), 0, q, r);
          check(r == RESP_DVA && q == DATA_W'(16'hA000 + 16'h100*M + k),
                $sformatf("OCP master %0d reads back word %0d (%h)", M, k, q));
        end
      end
      pdone[j < N_OCP ? M : NM] = 1; wait (phase == 2);
      if (j < N_OCP) for (int k = 0; k < 4; k++) begin
        d = DATA_W'(16'hF000 + 16'h10*M + k);
        op(CMD_WRNP, A(SID_FIFO, 0), d, q, r);
        check(r == RESP_DVA, "FIFO non-posted write DVA");
        fifo_written.push_back(d);
      end
      pdone[j < N_OCP ? M : NM] = 1; wait (phase == 3);
      pdone[j < N_OCP ? M : NM] = 1; wait (phase == 4);
      if (j < N_OCP) for (int k = 0; k < 4; k++) begin
        op(CMD_RD, A(SID_FIFO, 0), 0, q, r);
        check(r == RESP_DVA, "FIFO read DVA");
        fifo_read.push_back(q);
      end
      pdone[j < N_OCP ? M : NM] = 1; wait (phase == 5);
      for (int k = 0; k < ((j == N_OCP) ? 80 : 12); k++) begin
        d = DATA_W'(16'hD000 + 16'h100*(j < N_OCP ? M : 7) + k);
        op((k % 2) ? CMD_WRNP : CMD_WR, A(SID_DPF, 0), d, q, r);
        if (r != RESP_FAIL) dpf_written.push_back(d);
        op(CMD_RD, A(SID_DPF, 0), 0, q, r);
        if (r == RESP_DVA) dpf_read.push_back(q);
        if (j == N_OCP) begin
          // extra reads with random gaps raise the chance of meeting a port-1 read
          repeat ($urandom_range(0, 3)) @(negedge clk);
          op(CMD_RD, A(SID_DPF, 0), 0, q, r);
          if (r == RESP_DVA) dpf_read.push_back(q);
        end
      end
      pdone[j < N_OCP ? M : NM] = 1;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_grant_move = 0, n_grant_hold = 0, n_wr = 0, n_wrnp = 0, n_rd = 0;
  int n_cross [3] = '{0, 0, 0};
  int n_dp_wconf = 0, n_dp_rconf = 0, n_dp_wrrd = 0;
  logic [NM-1:0] grant_q;
  always @(posedge clk_ic) if (rst_n) begin
    check($onehot(grant), "grant one-hot");
    if (grant != grant_q) n_grant_move++;
    else if (dut.ic_req.mcmd != CMD_IDLE) n_grant_hold++;
    grant_q <= grant;
    if (dut.ic_req.mcmd != CMD_IDLE && dut.ic_rsp.scmdaccept) begin
      if (dut.ic_req.mcmd == CMD_WR)   n_wr++;
      if (dut.ic_req.mcmd == CMD_WRNP) n_wrnp++;
      if (dut.ic_req.mcmd == CMD_RD)   n_rd++;
    end
  end
  for (genvar k = 0; k < 3; k++) begin : g_cnt
    always @(posedge clk_s[k]) if (rst_n && dut.sreq[k].mcmd != CMD_IDLE && dut.srsp[k].scmdaccept)
      n_cross[k]++;
  end
  always @(posedge clk_s[2]) if (rst_n) begin
    if (dut.u_dpfifo.w1 && dut.u_dpfifo.w2) n_dp_wconf++;
    if (dut.u_dpfifo.r1 && dut.u_dpfifo.r2) n_dp_rconf++;
    if (dpf_state_next inside {M1_WRRD_ST, M2_WRRD_ST}) n_dp_wrrd++;
  end

  function automatic bit same_set(logic [DATA_W-1:0] a [$], logic [DATA_W-1:0] b [$]);
    if (a.size() != b.size()) return 0;
    a.sort(); b.sort();
    foreach (a[k]) if (a[k] != b[k]) return 0;
    return 1;
  endfunction

  int t_start;
  initial begin
    grant_q = '0;
    #37 rst_n = 1;
    t_start = $time;
    for (int p = 0; p <= 5; p++) begin
      foreach (pdone[k]) pdone[k] = 0;
      phase = p;
      if (p == 5) break;
      wait (pdone[0] && pdone[1] && pdone[2] && pdone[3] && pdone[4]);
      #100;
      if (p == 2) check(fifo_count == 5'(FIFO_DEPTH), "FIFO full after phase 2a");
    end
    wait (pdone[0] && pdone[1] && pdone[2] && pdone[3] && pdone[4]);
    #500;
    check(same_set(fifo_written, fifo_read), "FIFO returns exactly the values written");
    check(fifo_count == 0, "FIFO empty at the end");
    // dual-port FIFO: every read value written once, read at most once, rest still inside
    begin
      logic [DATA_W-1:0] rs [$];
      int found;
      rs = dpf_read;
      rs.sort();
      for (int k = 1; k < rs.size(); k++) check(rs[k] != rs[k-1], "no value read twice");
      foreach (rs[k]) begin
        found = 0;
        foreach (dpf_written[w]) if (dpf_written[w] == rs[k]) found = 1;
        check(found == 1, "every value read was written");
      end
      check(int'(dpf_count) == dpf_written.size() - dpf_read.size(),
            "dual-port FIFO keeps the rest");
    end
    check(n_axi_wr_bursts > 0 && n_axi_rd_bursts > 0, "AXI bursts split into OCP transactions");
    check(n_grant_move > 0, "grant moved");
    check(n_grant_hold > 0, "grant held by a busy master");
    check(n_wr > 0 && n_wrnp > 0 && n_rd > 0, "Write, Write-non-post and Read all used");
    check(n_cross[0] > 0 && n_cross[1] > 0 && n_cross[2] > 0, "bridges crossed to every slave");
    check(n_miss_seen > 0, "decoder miss");
    check(n_overflow_seen > 0 && n_underflow_seen > 0, "FIFO overflow and underflow");
    check(n_dp_wconf > 0, "dual-port FIFO write conflict");
    check(n_dp_rconf > 0, "dual-port FIFO read conflict");
    check(n_dp_wrrd > 0, "dual-port FIFO simultaneous write and read");
    $display("grant moves=%0d holds=%0d WR=%0d WRNP=%0d RD=%0d crossings=%0d/%0d/%0d",
             n_grant_move, n_grant_hold, n_wr, n_wrnp, n_rd, n_cross[0], n_cross[1], n_cross[2]);
    $display("dpfifo wconf=%0d rconf=%0d wrrd=%0d written=%0d read=%0d; time %0t",
             n_dp_wconf, n_dp_rconf, n_dp_wrrd, dpf_written.size(), dpf_read.size(),
             $time - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk_ic);
    failures++;
    $display("watchdog expired at phase %0d", phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
