// ip_protection_module_tb: feeds the module a known response, then checks the enrolment
// readout and its denial by the fuse, the parity of random CASCADE index frames of random
// length against a parity counted in the testbench (and the len+1 cycle reply latency), and
// that LOAD_AW stores ciphertext ^ response as the activation word.
module ip_protection_module_tb;
  import ipp_pkg::*;
  localparam int unsigned N = 128, IW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, fuse_blown = 1'b0;
  cmd_op_e cmd_op = CMD_GENERATE;
  logic [IW:0] cmd_len = '0;
  logic [N-1:0][IW-1:0] cmd_indexes = '0;
  logic [N-1:0] cmd_data = '0;
  logic rsp_valid, rsp_parity, puf_start, puf_done = 1'b0;
  rsp_kind_e rsp_kind;
  logic [N-1:0] rsp_data, response, aw, last_data;
  logic resp_loaded;
  int checks = 0, failures = 0;

  ip_protection_module #(.RESP_BITS(N), .N_IDX(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(input cmd_op_e op, input int len, output rsp_kind_e kind,
                       output logic par, output int lat);
    @(negedge clk);
    cmd_op = op; cmd_len = len[IW:0]; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    lat = 1;
    while (!rsp_valid && lat < 1000) begin
      puf_done = (op == CMD_GENERATE) && (lat == 10);
      @(negedge clk);
      puf_done = 1'b0;
      lat++;
    end
    kind = rsp_kind; par = rsp_parity; last_data = rsp_data;
  endtask

  rsp_kind_e kind;
  logic par, expected;
  logic [N-1:0] word;
  int lat, len;

  initial begin
    for (int w = 0; w < N / 32; w++) response[w*32 +: 32] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(aw == '0, "AW cleared by reset");
    issue(CMD_GENERATE, 0, kind, par, lat);
    check(kind == RSP_ACK, "generate acknowledged");
    issue(CMD_READ_RESPONSE, 0, kind, par, lat);
    check(kind == RSP_RESPONSE && last_data == response, "enrolment readout");
    for (int t = 0; t < 300; t++) begin
      len = (t < 2) ? N : $urandom_range(N, 1);
      expected = 1'b0;
      for (int i = 0; i < N; i++) begin
        cmd_indexes[i] = IW'($urandom_range(N - 1));
        if (i < len) expected ^= response[cmd_indexes[i]];
      end
      issue(CMD_PARITY, len, kind, par, lat);
      check(kind == RSP_PARITY && par == expected, $sformatf("parity of %0d bits", len));
      check(lat == len + 1, $sformatf("parity latency %0d for %0d", lat, len));
      check(last_data == '0, "no response leak in parity reply");
    end
    for (int t = 0; t < 20; t++) begin
      for (int w = 0; w < N / 32; w++) word[w*32 +: 32] = $urandom;
      cmd_data = word ^ response;
      issue(CMD_LOAD_AW, 0, kind, par, lat);
      check(kind == RSP_ACK && aw == word, "activation word decrypted and stored");
    end
    fuse_blown = 1'b1;
    issue(CMD_READ_RESPONSE, 0, kind, par, lat);
    check(kind == RSP_DENIED && last_data == '0, "readout refused after fuse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
