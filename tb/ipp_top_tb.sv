// ipp_top_tb: end-to-end enrolment and activation of one protected device, at the design's
// default sizes, with the activation server played by the testbench.
//
// Enrolment: measure the PUF, read the reference response r0, blow the fuse and check the
// readout is refused. Before activation both example cores must compute wrong sums, and an
// AW encrypted with the uncorrected r0 must not unlock them. Activation: measure the PUF
// again (fresh noise), then reconcile the server's copy of r0 with the device's response r
// by the CASCADE protocol (six passes): in each pass the server shuffles the bit positions, cuts them
// into blocks, asks the device for each block's parity and, where it differs from its own,
// bisects the block with further parity requests down to one bit, which it flips in its
// copy. After every pass all blocks of all passes so far are checked again until none
// disagrees (the "cascade" that finds errors a corrected bit has unmasked). The corrected
// copy must equal the device's response; the AW encrypted with it must then unlock both
// cores. Every mechanism (measurement, readout, denial, parity request, mismatch, bisection,
// correction, AW load, locked and unlocked operation) is counted and
// must occur at least once.
module ipp_top_tb;
  import ipp_pkg::*;
  localparam int unsigned N = RESP_BITS, W = 32;
  localparam int unsigned PASSES = 6, FIRST_BLOCK = 8;  // block sizes 8, 16, 16, 32, 32, 64

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, fuse_blown = 1'b0;
  cmd_op_e cmd_op = CMD_GENERATE;
  logic [LEN_W-1:0] cmd_len = '0;
  logic [N-1:0][IDX_W-1:0] cmd_indexes = '0;
  logic [AW_BITS-1:0] cmd_data = '0;
  logic rsp_valid, rsp_parity;
  rsp_kind_e rsp_kind;
  logic [N-1:0] rsp_data;
  logic [W-1:0] m_a = '0, m_b = '0, m_sum, l_a = '0, l_b = '0, l_sum;
  logic m_cout, l_cout;
  logic resp_loaded;
  int checks = 0, failures = 0;

  ipp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- link: one command, wait for its reply ----
  rsp_kind_e    r_kind;
  logic         r_par;
  logic [N-1:0] r_data;
  int           r_lat;
  task automatic issue(input cmd_op_e op, input int len);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_op = op; cmd_len = LEN_W'(len); cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    r_lat = 1;
    while (!rsp_valid && r_lat < 100000) begin @(negedge clk); r_lat++; end
    r_kind = rsp_kind; r_par = rsp_parity; r_data = rsp_data;
  endtask

  // ---- mechanism counters ----
  int n_generate, n_readout, n_denied, n_parity_req, n_mismatch, n_bisect, n_corrected,
      n_recheck_corrected, n_aw_load, n_locked_wrong, n_unlocked_ok, n_bad_key_refused,
      n_latency_ok;

  // Parity request for the positions pos[lo..hi-1]; checks the len+1 latency.
  task automatic device_parity(input int pos[$], input int lo, input int hi, output logic p);
    for (int i = 0; i < hi - lo; i++) cmd_indexes[i] = IDX_W'(pos[lo + i]);
    issue(CMD_PARITY, hi - lo);
    n_parity_req++;
    check(r_kind == RSP_PARITY, "parity reply");
    if (r_lat == hi - lo + 1) n_latency_ok++;
    else check(0, $sformatf("parity latency %0d for %0d bits", r_lat, hi - lo));
    p = r_par;
  endtask

  logic [N-1:0] srv;  // server's working copy of the response

  function automatic logic srv_parity(int pos[$], int lo, int hi);
    logic p = 1'b0;
    for (int i = lo; i < hi; i++) p ^= srv[pos[i]];
    return p;
  endfunction

  // Bisect a block whose parities disagree down to one bit and flip it in the server copy.
  task automatic bisect(input int pos[$], input int lo, input int hi);
    logic p;
    int mid;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      device_parity(pos, lo, mid, p);
      n_bisect++;
      if (p != srv_parity(pos, lo, mid)) hi = mid;
      else lo = mid;
    end
    srv[pos[lo]] = ~srv[pos[lo]];
    n_corrected++;
  endtask

  int perm [PASSES][$];
  int block [PASSES];

  // Check every block of passes 0..last; bisect those that disagree. Returns corrections.
  task automatic scan(input int last, output int fixed);
    logic p;
    fixed = 0;
    for (int q = 0; q <= last; q++)
      for (int lo = 0; lo < N; lo += block[q]) begin
        int hi;
        hi = (lo + block[q] > N) ? N : lo + block[q];
        device_parity(perm[q], lo, hi, p);
        if (p != srv_parity(perm[q], lo, hi)) begin
          n_mismatch++;
          bisect(perm[q], lo, hi);
          fixed++;
        end
      end
  endtask

  task automatic cascade();
    int fixed, j, tmp;
    for (int q = 0; q < PASSES; q++) begin
      block[q] = FIRST_BLOCK << ((q + 1) / 2);
      perm[q] = {};
      for (int i = 0; i < N; i++) perm[q].push_back(i);
      if (q > 0)
        for (int i = N - 1; i > 0; i--) begin  // Fisher-Yates shuffle
          j = $urandom_range(i);
          tmp = perm[q][i]; perm[q][i] = perm[q][j]; perm[q][j] = tmp;
        end
      scan(q, fixed);
      while (fixed != 0) begin  // cascade: earlier blocks may now disagree
        scan(q, fixed);
        n_recheck_corrected += fixed;
      end
    end
  endtask

  // Apply random operands to both cores; count wrong sums.
  task automatic run_cores(input int n, output int wrong);
    wrong = 0;
    for (int t = 0; t < n; t++) begin
      m_a = $urandom; m_b = $urandom; l_a = $urandom; l_b = $urandom;
      #1;
      if ({m_cout, m_sum} != {1'b0, m_a} + {1'b0, m_b}) wrong++;
      if ({l_cout, l_sum} != {1'b0, l_a} + {1'b0, l_b}) wrong++;
    end
  endtask

  logic [N-1:0] r0;
  int wrong, errors, attempt;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- enrolment ----
    issue(CMD_GENERATE, 0);
    n_generate++;
    check(r_kind == RSP_ACK, "enrolment measurement");
    check(r_lat > N, "measurement takes one PUF bit per bit time");
    issue(CMD_READ_RESPONSE, 0);
    check(r_kind == RSP_RESPONSE, "enrolment readout");
    n_readout++;
    r0 = r_data;
    fuse_blown = 1'b1;
    issue(CMD_READ_RESPONSE, 0);
    check(r_kind == RSP_DENIED && r_data == '0, "readout refused after the fuse");
    if (r_kind == RSP_DENIED) n_denied++;

    // ---- locked before activation ----
    run_cores(50, wrong);
    check(wrong > 0, "cores unusable before activation");
    if (wrong > 0) n_locked_wrong++;

    // ---- activation ----
    attempt = 0;
    do begin
      issue(CMD_GENERATE, 0);
      n_generate++;
      errors = $countones(dut.response ^ r0);  // observation only
      attempt++;
    end while (errors == 0 && attempt < 20);
    $display("activation measurement: %0d bits differ from enrolment", errors);
    check(errors > 0, "noisy re-measurement");

    // an AW encrypted with the uncorrected reference must not unlock the cores
    cmd_data = DEFAULT_AW ^ r0;
    issue(CMD_LOAD_AW, 0);
    n_aw_load++;
    run_cores(50, wrong);
    check(wrong > 0, "uncorrected key refused");
    if (wrong > 0) n_bad_key_refused++;

    srv = r0;
    cascade();
    $display("CASCADE: %0d parity requests, %0d corrections (%0d in re-checks)",
             n_parity_req, n_corrected, n_recheck_corrected);
    check(srv == dut.response, "server copy reconciled with the device response");

    cmd_data = DEFAULT_AW ^ srv;
    issue(CMD_LOAD_AW, 0);
    n_aw_load++;
    check(r_kind == RSP_ACK && r_lat == 1, "AW load acknowledged");
    run_cores(500, wrong);
    check(wrong == 0, $sformatf("cores work after activation (%0d wrong)", wrong));
    if (wrong == 0) n_unlocked_ok++;

    // ---- every mechanism happened ----
    check(n_generate >= 2, "PUF measurements");
    check(n_readout > 0, "enrolment readout");
    check(n_denied > 0, "fuse denial");
    check(n_parity_req > 0, "parity requests");
    check(n_latency_ok == n_parity_req, "parity latency");
    check(n_mismatch > 0, "block mismatches");
    check(n_bisect > 0, "bisection steps");
    check(n_corrected > 0, "corrected bits");
    check(n_aw_load >= 2, "AW loads");
    check(n_locked_wrong > 0 && n_bad_key_refused > 0 && n_unlocked_ok > 0, "lock states");
    $display("mechanisms: generate=%0d readout=%0d denied=%0d parity=%0d mismatch=%0d bisect=%0d corrected=%0d recheck=%0d aw_load=%0d",
             n_generate, n_readout, n_denied, n_parity_req, n_mismatch, n_bisect, n_corrected,
             n_recheck_corrected, n_aw_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
