// tb_prbg_nist: statistical workload on the full-size design, following the evaluation setup of
// the original work: m = 128 sequences of n = 2^20 bits, significance 0.01. Both generators are
// seeded and warmed up; then 128 consecutive sequences are taken from the logistic output
// (64 bits per clock) and from the composed FDNR output (192 bits per clock). Four tests of
// NIST SP800-22 (frequency, block frequency, cumulative sums, runs) are computed by nist_stats,
// each judged both on the proportion of passing sequences and on the uniformity of its P-values.
//
// As a control the raw FDNR X stream (the state register, without post-processing) is tested
// as well; its sign and integer bits are biased and it must fail the frequency test.
module tb_prbg_nist;
  localparam int unsigned LP    = prbg_pkg::LOG_P_ARITH_DEFAULT;
  localparam int unsigned LM    = prbg_pkg::LOG_PIPE_DEPTH_DEFAULT;
  localparam int unsigned OP    = prbg_pkg::OSC_P_ARITH_DEFAULT;
  localparam int unsigned OFB   = OP - prbg_pkg::OSC_INT_BITS_DEFAULT;
  localparam int unsigned OM    = prbg_pkg::OSC_PIPE_DEPTH;
  localparam int unsigned N_SEQ = 1 << 20;
  localparam int          M_SEQ = 128;
  localparam int          WARMUP = 2000;

  logic            clk = 1'b0;
  logic            rst;
  logic            log_init_select;
  logic [LP-1:0]   log_init_x, log_out_q;
  logic            osc_init_sel;
  logic [OP-1:0]   osc_init_x, osc_init_y, osc_init_z, osc_out_qx, osc_out_qy, osc_out_qz;
  logic [3*OP-1:0] osc_out_qxyz;
  logic            measure = 1'b0;
  int checks = 0, failures = 0;
  logic log_done, osc_done, raw_done;
  int   log_seq, osc_seq, raw_seq;
  int   log_pass [4], osc_pass [4], raw_pass [4];
  int   log_ok [4], osc_ok [4], raw_ok [4];

  prbg_top dut (.*);

  nist_stats #(.W(LP), .N_BITS(N_SEQ), .M_SEQ(M_SEQ), .NAME("logistic")) u_log_stats (
    .clk, .en(measure), .word(log_out_q), .done(log_done), .sequences(log_seq), .pass(log_pass), .ok(log_ok));
  nist_stats #(.W(3*OP), .N_BITS(N_SEQ), .M_SEQ(M_SEQ), .NAME("FDNR composed")) u_osc_stats (
    .clk, .en(measure), .word(osc_out_qxyz), .done(osc_done), .sequences(osc_seq), .pass(osc_pass), .ok(osc_ok));
  nist_stats #(.W(OP), .N_BITS(N_SEQ), .M_SEQ(M_SEQ), .NAME("raw FDNR X (control)")) u_raw_stats (
    .clk, .en(measure), .word(dut.u_osc.x_q), .done(raw_done), .sequences(raw_seq), .pass(raw_pass), .ok(raw_ok));

  always #5 clk = ~clk;

  initial begin
    repeat (M_SEQ * (N_SEQ / LP) + 10 * WARMUP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real osc_seed [4][3] = '{'{0.10, 0.00, 0.00}, '{0.50, -0.25, 0.10}, '{-1.00, 0.50, -0.30}, '{0.20, 1.20, 0.40}};
    rst = 1'b1; log_init_select = 1'b0; log_init_x = '0;
    osc_init_sel = 1'b0; osc_init_x = '0; osc_init_y = '0; osc_init_z = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < int'(LM); k++) begin
      log_init_select = 1'b1; log_init_x = {$urandom, $urandom};
      osc_init_sel = (k < int'(OM));
      osc_init_x = prbg_ref_pkg::to_fix(osc_seed[k % 4][0], OP, OFB);
      osc_init_y = prbg_ref_pkg::to_fix(osc_seed[k % 4][1], OP, OFB);
      osc_init_z = prbg_ref_pkg::to_fix(osc_seed[k % 4][2], OP, OFB);
      @(posedge clk); #1;
    end
    log_init_select = 1'b0; osc_init_sel = 1'b0;
    repeat (WARMUP) @(posedge clk);
    #1 measure = 1'b1;
    wait (log_done && osc_done && raw_done);
    @(posedge clk); #1 measure = 1'b0;
    for (int t = 0; t < 4; t++) begin
      checks += 2;
      if (!log_ok[t]) failures++;
      if (!osc_ok[t]) failures++;
    end
    checks++;
    if (raw_ok[0]) begin
      failures++;
      $display("the raw stream unexpectedly passes the frequency test: the control shows nothing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
