// ipp_controller_tb: drives the controller with every command, plays the PUF's `done`, and
// checks the strobes it issues (puf_start, par_clear, the sel sequence with par_en, aw_load),
// the reply kinds (including DENIED before a measurement and after the fuse is blown) and
// the reply latencies: 1 cycle for READ_RESPONSE and LOAD_AW, len+1 cycles for PARITY.
module ipp_controller_tb;
  import ipp_pkg::*;
  localparam int unsigned N = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, fuse_blown = 1'b0;
  cmd_op_e cmd_op = CMD_GENERATE;
  logic [$clog2(N+1)-1:0] cmd_len = '0;
  logic puf_start, puf_done = 1'b0;
  logic [$clog2(N)-1:0] sel;
  logic par_clear, par_en, aw_load, resp_loaded, rsp_valid;
  rsp_kind_e rsp_kind;
  int checks = 0, failures = 0;

  ipp_controller #(.N_IDX(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Issue one command; report the reply, its latency and what the controller strobed.
  int n_start, n_clear, n_load, n_en, sel_ok;
  task automatic issue(input cmd_op_e op, input int len, input int done_after,
                       output rsp_kind_e kind, output int lat);
    @(negedge clk);
    cmd_op = op; cmd_len = len[$clog2(N+1)-1:0]; cmd_valid = 1'b1;
    #1;
    check(cmd_ready == 1'b1, "ready in idle");
    n_start = int'(puf_start); n_clear = int'(par_clear); n_load = int'(aw_load);
    n_en = 0; sel_ok = 1;
    @(negedge clk);
    cmd_valid = 1'b0;
    #1;
    lat = 1;  // clock edges from acceptance to the edge that sees rsp_valid
    while (!rsp_valid) begin
      check(!cmd_ready, "busy while executing");
      if (par_en) begin
        if (int'(sel) != n_en) sel_ok = 0;
        n_en++;
      end
      if (puf_start || par_clear || aw_load) n_start += 100;  // strobes only at acceptance
      puf_done = (op == CMD_GENERATE) && (lat == done_after);
      @(negedge clk);
      puf_done = 1'b0;
      #1;
      lat++;
      if (lat > 1000) break;
    end
    kind = rsp_kind;
  endtask

  rsp_kind_e kind;
  int lat;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // before any measurement
    issue(CMD_READ_RESPONSE, 0, 0, kind, lat);  check(kind == RSP_DENIED, "read before measure");
    issue(CMD_PARITY, 5, 0, kind, lat);         check(kind == RSP_DENIED, "parity before measure");
    check(n_en == 0, "no parity steps when denied");
    issue(CMD_LOAD_AW, 0, 0, kind, lat);        check(kind == RSP_DENIED && n_load == 0, "load before measure");
    // measurement
    issue(CMD_GENERATE, 0, 37, kind, lat);
    check(kind == RSP_ACK && n_start == 1, "generate");
    check(lat == 38, $sformatf("generate latency %0d", lat));  // one cycle after done
    check(resp_loaded, "response loaded");
    // enrolment readout
    issue(CMD_READ_RESPONSE, 0, 0, kind, lat);
    check(kind == RSP_RESPONSE && lat == 1, "read response");
    // parity frames of several lengths
    for (int L = 0; L <= N; L += (L < 4 ? 1 : 31)) begin
      issue(CMD_PARITY, L, 0, kind, lat);
      check(kind == RSP_PARITY, "parity kind");
      check(n_clear == 1, "parity clear at acceptance");
      check(n_en == L && sel_ok == 1, $sformatf("len %0d: %0d steps, sel ok %0d", L, n_en, sel_ok));
      check(lat == (L == 0 ? 1 : L + 1), $sformatf("len %0d latency %0d", L, lat));
    end
    issue(CMD_PARITY, N, 0, kind, lat);
    check(n_en == N && lat == N + 1, "full frame");
    // activation word
    issue(CMD_LOAD_AW, 0, 0, kind, lat);
    check(kind == RSP_ACK && n_load == 1 && lat == 1, "load aw");
    // fuse
    fuse_blown = 1'b1;
    issue(CMD_READ_RESPONSE, 0, 0, kind, lat);  check(kind == RSP_DENIED, "read after fuse");
    issue(CMD_PARITY, 3, 0, kind, lat);         check(kind == RSP_PARITY, "parity after fuse");
    // a new measurement invalidates the response until done
    issue(CMD_GENERATE, 0, 5, kind, lat);       check(kind == RSP_ACK && lat == 6, "second generate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
