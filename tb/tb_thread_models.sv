// tb_thread_models: the dual-thread (HP + 1 LP) and quadruple-thread (HP + 3 LP)
// configurations, each run under the collision bit vector policy and under HPAL,
// on the same synthetic request stream, every response checked against the
// reference model.
//  - dual, hybrid defaults: the monitor keeps the collision bit vector;
//  - dual, HPAL_MIN_LP = 1: HPAL;
//  - quad, HPAL_MIN_LP = 4: collision bit vector only;
//  - quad, hybrid defaults: the monitor selects HPAL.
// HPAL protects every HP line, so on each thread model it must give the HP thread
// at least as many hits, and the LP threads at most as many, as the collision bit
// vector. The hit counts are printed.
module tb_thread_models;
  logic clk = 0, rst_n = 0;
  logic done [4];
  int chk [4], fl [4], rl [4], hpr [4], hph [4], lpr [4], lph [4];
  int checks = 0, failures = 0;

  mt_harness #(.N_LP(1))                   d_cbv  (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .n_relock(rl[0]),
                                                   .n_hp_req(hpr[0]), .n_hp_hits(hph[0]), .n_lp_req(lpr[0]), .n_lp_hits(lph[0]));
  mt_harness #(.N_LP(1), .HPAL_MIN_LP(1))  d_hpal (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .n_relock(rl[1]),
                                                   .n_hp_req(hpr[1]), .n_hp_hits(hph[1]), .n_lp_req(lpr[1]), .n_lp_hits(lph[1]));
  mt_harness #(.N_LP(3), .HPAL_MIN_LP(4))  q_cbv  (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .n_relock(rl[2]),
                                                   .n_hp_req(hpr[2]), .n_hp_hits(hph[2]), .n_lp_req(lpr[2]), .n_lp_hits(lph[2]));
  mt_harness #(.N_LP(3))                   q_hpal (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .n_relock(rl[3]),
                                                   .n_hp_req(hpr[3]), .n_hp_hits(hph[3]), .n_lp_req(lpr[3]), .n_lp_hits(lph[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    for (int m = 0; m < 4; m += 2) begin
      checks += 2;
      if (hph[m + 1] < hph[m]) begin
        failures++;
        $display("FAIL %s: HPAL gave the HP thread fewer hits", m == 0 ? "dual" : "quad");
      end
      if (lph[m + 1] > lph[m]) begin
        failures++;
        $display("FAIL %s: HPAL gave the LP threads more hits", m == 0 ? "dual" : "quad");
      end
    end
    checks++;
    if (rl[0] == 0 || rl[2] == 0) begin failures++; $display("FAIL no relocks in collision mode"); end
    $display("dual-thread: collision bit vector HP %0d/%0d LP %0d/%0d, HPAL HP %0d/%0d LP %0d/%0d",
             hph[0], hpr[0], lph[0], lpr[0], hph[1], hpr[1], lph[1], lpr[1]);
    $display("quad-thread: collision bit vector HP %0d/%0d LP %0d/%0d, HPAL HP %0d/%0d LP %0d/%0d",
             hph[2], hpr[2], lph[2], lpr[2], hph[3], hpr[3], lph[3], lpr[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
