// ipp_clone_tb: the anti-copy property. Two devices carry the same protected core but
// different PUFs (device A with the default identity, device B with another one). Both are
// measured; the server produces [AW]_rA for device A. Fed to A, it unlocks both cores; fed
// to B (an illegal copy replaying A's activation), it must leave B's cores broken, because B
// decrypts it with its own response. The server's reconciliation is shown in ipp_top_tb;
// here the server's key for A is taken as A's response register, read hierarchically.
module ipp_clone_tb;
  import ipp_pkg::*;
  localparam int unsigned W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] cmd_valid = '0, cmd_ready, rsp_valid, rsp_parity, resp_loaded;
  cmd_op_e cmd_op = CMD_GENERATE;
  logic [AW_BITS-1:0] cmd_data = '0;
  rsp_kind_e rsp_kind [2];
  logic [RESP_BITS-1:0] rsp_data [2];
  logic [W-1:0] a = '0, b = '0, m_sum [2], l_sum [2];
  logic [1:0] m_cout, l_cout;
  int checks = 0, failures = 0;

  ipp_top dev_a (
    .clk, .rst_n, .cmd_valid(cmd_valid[0]), .cmd_ready(cmd_ready[0]), .cmd_op, .cmd_len('0),
    .cmd_indexes('0), .cmd_data, .rsp_valid(rsp_valid[0]), .rsp_kind(rsp_kind[0]),
    .rsp_parity(rsp_parity[0]), .rsp_data(rsp_data[0]), .resp_loaded(resp_loaded[0]),
    .fuse_blown(1'b1), .m_a(a), .m_b(b), .m_sum(m_sum[0]), .m_cout(m_cout[0]),
    .l_a(a), .l_b(b), .l_sum(l_sum[0]), .l_cout(l_cout[0]));

  ipp_top #(.DEVICE_ID(32'hC10E_0002)) dev_b (
    .clk, .rst_n, .cmd_valid(cmd_valid[1]), .cmd_ready(cmd_ready[1]), .cmd_op, .cmd_len('0),
    .cmd_indexes('0), .cmd_data, .rsp_valid(rsp_valid[1]), .rsp_kind(rsp_kind[1]),
    .rsp_parity(rsp_parity[1]), .rsp_data(rsp_data[1]), .resp_loaded(resp_loaded[1]),
    .fuse_blown(1'b1), .m_a(a), .m_b(b), .m_sum(m_sum[1]), .m_cout(m_cout[1]),
    .l_a(a), .l_b(b), .l_sum(l_sum[1]), .l_cout(l_cout[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(input int d, input cmd_op_e op);
    @(negedge clk);
    cmd_op = op; cmd_valid[d] = 1'b1;
    @(negedge clk);
    cmd_valid[d] = 1'b0;
    while (!rsp_valid[d]) @(negedge clk);
  endtask

  task automatic count_wrong(input int d, output int wrong);
    wrong = 0;
    for (int t = 0; t < 200; t++) begin
      a = $urandom; b = $urandom;
      #1;
      if ({m_cout[d], m_sum[d]} != {1'b0, a} + {1'b0, b}) wrong++;
      if ({l_cout[d], l_sum[d]} != {1'b0, a} + {1'b0, b}) wrong++;
    end
  endtask

  int wrong;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    issue(0, CMD_GENERATE);
    issue(1, CMD_GENERATE);
    check(resp_loaded == 2'b11, "both devices measured");
    check($countones(dev_a.response ^ dev_b.response) > 30, "devices have unrelated responses");
    cmd_data = DEFAULT_AW ^ dev_a.response;
    issue(0, CMD_LOAD_AW);
    check(rsp_kind[0] == RSP_ACK, "device A accepts its AW");
    issue(1, CMD_LOAD_AW);
    check(rsp_kind[1] == RSP_ACK, "device B accepts the replayed AW");
    count_wrong(0, wrong);
    check(wrong == 0, $sformatf("device A unlocked (%0d wrong)", wrong));
    count_wrong(1, wrong);
    check(wrong > 300, $sformatf("device B stays locked (%0d of 400 wrong)", wrong));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
