// tb_axi_master: self-checking test of the AXI master.
// A behavioural AXI slave in the testbench (a small memory) raises each READY after a random
// delay and returns every read beat and the write response after further random delays. Write
// and read bursts of random length (1 to 16 beats) are started concurrently from two processes.
// Checks: each VALID stays high until its READY; write data is not offered before the
// write-address handshake; WLAST marks exactly the last beat; AWLEN/ARLEN are the requested
// lengths; the slave receives the requested data at incrementing addresses; every read beat is
// reported with its data and RRESP, rd_last/rd_done on the last one; BRESP is reported. The cycle
// count of every burst must match the handshake delays the slave chose.
module tb_axi_master;
  import ocp_pkg::*;
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

  axi_master dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [DATA_W-1:0] mem [64];
  bit w_done_all = 0, r_done_all = 0;

  // -------- behavioural slave, write side --------
  int w_delay_sum;            // sum of all READY/response delays of the current write burst
  logic [1:0] b_sent;
  initial begin
    int d; logic [ADDR_W-1:0] a; logic [3:0] len;
    awready = 0; wready = 0; bvalid = 0; bresp = 2'b00;
    forever begin
      @(negedge clk);
      if (awvalid) begin
        check(!wvalid, "no write data before the address handshake");
        d = $urandom_range(0, 3); w_delay_sum = d;
        repeat (d) begin @(negedge clk); check(awvalid, "AWVALID held until AWREADY"); end
        awready = 1; a = awaddr; len = awlen;
        @(negedge clk); awready = 0;
        for (int k = 0; k <= int'(len); k++) begin
          d = $urandom_range(0, 2); w_delay_sum += d;
          repeat (d) begin @(negedge clk); check(wvalid, "WVALID held until WREADY"); end
          check(wvalid && (wlast == (k == int'(len))), "WLAST on the last beat only");
          wready = 1; mem[6'(a + ADDR_W'(k))] = wdata;
          @(negedge clk); wready = 0;
        end
        d = $urandom_range(0, 3); w_delay_sum += d;
        repeat (d) @(negedge clk);
        bvalid = 1; bresp = ($urandom_range(0, 3) == 0) ? 2'b10 : 2'b00; b_sent = bresp;
        #1 check(bready, "BREADY while waiting for the response");
        @(negedge clk); bvalid = 0;
      end
    end
  end

  // -------- behavioural slave, read side --------
  int r_delay_sum;
  initial begin
    int d; logic [ADDR_W-1:0] a; logic [3:0] len;
    arready = 0; rvalid = 0; rdata = '0; rresp = 2'b00; rlast = 0;
    forever begin
      @(negedge clk);
      if (arvalid) begin
        d = $urandom_range(0, 3); r_delay_sum = d;
        repeat (d) begin @(negedge clk); check(arvalid, "ARVALID held until ARREADY"); end
        arready = 1; a = araddr; len = arlen;
        @(negedge clk); arready = 0;
        for (int k = 0; k <= int'(len); k++) begin
          d = $urandom_range(0, 2); r_delay_sum += d;
          repeat (d) @(negedge clk);
          rvalid = 1; rlast = (k == int'(len)); rdata = mem[6'(32 + a + ADDR_W'(k))];
          rresp = ($urandom_range(0, 7) == 0) ? 2'b10 : 2'b00;
          #1 check(rready, "RREADY while waiting for read data");
          @(negedge clk); rvalid = 0; rlast = 0;
        end
      end
    end
  end

  // -------- user write side: streams base+beat as data --------
  logic [DATA_W-1:0] wbase;
  int                wi;
  always @(posedge clk) if (wr_next) begin
    wi <= wi + 1;
    wr_data <= wbase + DATA_W'(wi + 1);
  end

  initial begin
    int cyc, n;
    logic [ADDR_W-1:0] a;
    wr_start = 0; wr_addr = '0; wr_len = '0; wr_data = '0; wi = 0; wbase = '0;
    wait (rst_n);
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      check(wr_ready, "write FSM idle");
      n = ($urandom_range(0, 4) == 0) ? 16 : $urandom_range(1, 6);
      a = ADDR_W'($urandom_range(0, 32 - n));          // writes use words 0..31
      wbase = DATA_W'($urandom); wi = 0; wr_data = wbase;
      wr_start = 1; wr_addr = a; wr_len = 4'(n - 1);
      @(negedge clk); wr_start = 0;
      check(awlen == 4'(n - 1), "AWLEN carries the burst length");
      cyc = 1;
      while (!wr_done) begin @(negedge clk); cyc++; end
      for (int k = 0; k < n; k++)
        check(mem[6'(a + ADDR_W'(k))] == wbase + DATA_W'(k), "burst data at incrementing addresses");
      check(wr_resp == b_sent, "BRESP reported");
      check(cyc == w_delay_sum + n + 3,
            $sformatf("write of %0d beats takes %0d cycles, expected %0d", n, cyc, w_delay_sum + n + 3));
    end
    w_done_all = 1;
  end

  initial begin
    int cyc, n, k;
    logic [ADDR_W-1:0] a;
    rd_start = 0; rd_addr = '0; rd_len = '0;
    wait (rst_n);
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      check(rd_ready, "read FSM idle");
      n = ($urandom_range(0, 4) == 0) ? 16 : $urandom_range(1, 6);
      a = ADDR_W'($urandom_range(0, 32 - n));          // reads use words 32..63
      rd_start = 1; rd_addr = a; rd_len = 4'(n - 1);
      @(negedge clk); rd_start = 0;
      check(arlen == 4'(n - 1), "ARLEN carries the burst length");
      cyc = 1; k = 0;
      while (!rd_done) begin
        @(negedge clk); cyc++;
        if (rd_beat) begin
          check(rd_data == mem[6'(32 + a + ADDR_W'(k))], "read beat data");
          check(rd_last == (k == n - 1), "rd_last on the last beat");
          k++;
        end
      end
      check(k == n, "every read beat reported");
      check(cyc == r_delay_sum + n + 2,
            $sformatf("read of %0d beats takes %0d cycles, expected %0d", n, cyc, r_delay_sum + n + 2));
    end
    r_done_all = 1;
  end

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = DATA_W'(16'h1000 * i + 16'h5a);
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (w_done_all && r_done_all);
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
