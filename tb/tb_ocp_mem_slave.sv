// tb_ocp_mem_slave: self-checking test of the simple-memory OCP slave.
// Drives OCP commands directly (set up at the falling edge, sampled at the rising edge), keeps a
// reference model of the memory, and checks read data, SResp, the same-cycle SCmdAccept and the
// one-cycle response latency. A short memory (DEPTH 256) keeps the run quick.
module tb_ocp_mem_slave;
  import ocp_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0;
  ocp_req_t req;
  ocp_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [DATA_W-1:0] model [DEPTH];
  logic              valid [DEPTH];

  ocp_mem_slave #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .ocp_req(req), .ocp_rsp(rsp));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One OCP transaction; returns the response and the cycles from command to response.
  task automatic op(ocp_cmd_e c, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d,
                    output ocp_resp_e r, output logic [DATA_W-1:0] q, output int lat);
    @(negedge clk);
    req.mcmd = c; req.maddr = a; req.mdata = d; req.mdatavalid = is_write(c);
    #1;
    lat = 0;
    check(rsp.scmdaccept == 1'b1, "command accepted in the cycle it appears");
    check(rsp.sdataaccept == is_write(c), "SDataAccept only with write data");
    @(negedge clk);
    req = REQ_IDLE;
    r = RESP_NULL; q = '0;
    if (needs_resp(c)) begin
      lat = 1;
      while (rsp.sresp == RESP_NULL && lat < 20) begin @(negedge clk); lat++; end
      r = rsp.sresp; q = rsp.sdata;
      // hold the response one extra cycle to see that it stays until MRespAccept
      @(negedge clk);
      check(rsp.sresp == r && rsp.sdata == q, "response held until MRespAccept");
      req.mrespaccept = 1'b1;
      @(negedge clk);
      req.mrespaccept = 1'b0;
      check(rsp.sresp == RESP_NULL, "response dropped after MRespAccept");
    end
  endtask

  initial begin
    ocp_resp_e r; logic [DATA_W-1:0] q; int lat;
    logic [ADDR_W-1:0] a; logic [DATA_W-1:0] d;
    req = REQ_IDLE;
    for (int i = 0; i < DEPTH; i++) valid[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      a = ADDR_W'($urandom_range(0, DEPTH-1));
      a[ADDR_W-1 -: SID_W] = 3'($urandom);       // the slave ignores the SID bits
      d = DATA_W'($urandom);
      case ($urandom_range(0, 2))
        0: begin
          op(CMD_WR, a, d, r, q, lat);
          model[a[7:0]] = d; valid[a[7:0]] = 1'b1;
        end
        1: begin
          op(CMD_WRNP, a, d, r, q, lat);
          model[a[7:0]] = d; valid[a[7:0]] = 1'b1;
          check(r == RESP_DVA, "write non-post answered with DVA");
          check(lat == 1, "write non-post response one cycle after accept");
        end
        default: begin
          op(CMD_RD, a, 0, r, q, lat);
          check(r == RESP_DVA, "read answered with DVA");
          check(lat == 1, "read response one cycle after accept");
          if (valid[a[7:0]]) check(q == model[a[7:0]], $sformatf("read data at %h", a));
        end
      endcase
    end
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
