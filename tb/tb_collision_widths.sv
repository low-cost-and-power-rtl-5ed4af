// tb_collision_widths: runs the same dual-thread request stream (HP thread plus one
// LP thread, collision mode) through four caches whose per-set collision entries
// keep 1, 4, 8 and all 21 tag bits: the collision bit vector, two narrowed collision
// tags and the full collision tag. Each is checked against the reference model.
// A narrower entry matches more often (false positives), so it must lock at least
// as many returning HP lines as the next wider one on this stream; the lock and HP
// hit counts are printed for comparison.
module tb_collision_widths;
  logic clk = 0, rst_n = 0;
  logic done [4];
  int chk [4], fl [4], rl [4], hpr [4], hph [4], lpr [4], lph [4];
  int checks = 0, failures = 0;

  mt_harness #(.CT_W(1))  h1  (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .n_relock(rl[0]),
                               .n_hp_req(hpr[0]), .n_hp_hits(hph[0]), .n_lp_req(lpr[0]), .n_lp_hits(lph[0]));
  mt_harness #(.CT_W(4))  h4  (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .n_relock(rl[1]),
                               .n_hp_req(hpr[1]), .n_hp_hits(hph[1]), .n_lp_req(lpr[1]), .n_lp_hits(lph[1]));
  mt_harness #(.CT_W(8))  h8  (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .n_relock(rl[2]),
                               .n_hp_req(hpr[2]), .n_hp_hits(hph[2]), .n_lp_req(lpr[2]), .n_lp_hits(lph[2]));
  mt_harness #(.CT_W(21)) h21 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .n_relock(rl[3]),
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
      checks++;
      if (rl[i] == 0) begin
        failures++;
        $display("FAIL entry %0d: no returning HP line was locked", i);
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (rl[i] < rl[i+1]) begin
        failures++;
        $display("FAIL narrower entry %0d locked fewer lines than the next wider one", i);
      end
    end
    $display("collision entry 1/4/8/21 bits: locks %0d %0d %0d %0d, HP hits %0d %0d %0d %0d of %0d, LP hits %0d %0d %0d %0d of %0d",
             rl[0], rl[1], rl[2], rl[3], hph[0], hph[1], hph[2], hph[3], hpr[0],
             lph[0], lph[1], lph[2], lph[3], lpr[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
