// tb_collision_detect: exhaustive test of collision_detect for the collision bit
// vector (CT_W = 1) and a random test of a 4-bit collision tag, against the
// allocation rules of both modes computed in the testbench.
module tb_collision_detect;
  import cc_pkg::*;
  int checks = 0, failures = 0;

  // CT_W = 1
  cc_mode_e m1; logic hp1, vv1, vh1; logic [0:0] ft1, ct1, vt1;
  logic act1, lpe1, we1, sl1, nl1, nh1; logic [0:0] wd1;
  collision_detect #(.CT_W(1)) dut1 (
    .mode_i(m1), .req_hp_i(hp1), .fill_tag_i(ft1), .ct_rdata_i(ct1), .victim_valid_i(vv1),
    .victim_hp_i(vh1), .victim_tag_i(vt1), .ct_active_o(act1), .lp_evicts_hp_o(lpe1),
    .ct_we_o(we1), .ct_wdata_o(wd1), .set_lock_o(sl1), .new_lock_o(nl1), .new_hp_o(nh1));

  // CT_W = 4
  cc_mode_e m4; logic hp4, vv4, vh4; logic [3:0] ft4, ct4, vt4;
  logic act4, lpe4, we4, sl4, nl4, nh4; logic [3:0] wd4;
  collision_detect #(.CT_W(4)) dut4 (
    .mode_i(m4), .req_hp_i(hp4), .fill_tag_i(ft4), .ct_rdata_i(ct4), .victim_valid_i(vv4),
    .victim_hp_i(vh4), .victim_tag_i(vt4), .ct_active_o(act4), .lp_evicts_hp_o(lpe4),
    .ct_we_o(we4), .ct_wdata_o(wd4), .set_lock_o(sl4), .new_lock_o(nl4), .new_hp_o(nh4));

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bits(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    // exhaustive, 1-bit entry
    for (int i = 0; i < 128; i++) begin
      bit hpal, capture, match;
      {m1, hp1, vv1, vh1, ft1, ct1, vt1} = 7'(i);
      #1;
      hpal    = (m1 == MODE_HPAL);
      capture = !hpal && !hp1 && vv1 && vh1;
      match   = !hpal && hp1 && (ft1 == ct1);
      expect_bits("cbv active/lpe/we", {act1, lpe1, we1}, {!hpal, !hp1 && vv1 && vh1, capture});
      if (capture) expect_bits("cbv wdata", 8'(wd1), 8'(vt1));
      expect_bits("cbv lock/hp", {sl1, nl1, nh1}, {match, hpal ? hp1 : match, hp1});
    end
    // random, 4-bit collision tag
    for (int i = 0; i < 4000; i++) begin
      bit hpal, capture, match;
      m4 = cc_mode_e'($urandom_range(0, 1)); hp4 = 1'($urandom); vv4 = 1'($urandom);
      vh4 = 1'($urandom); ct4 = 4'($urandom); vt4 = 4'($urandom);
      ft4 = ($urandom_range(0, 3) == 0) ? ct4 : 4'($urandom);
      #1;
      hpal    = (m4 == MODE_HPAL);
      capture = !hpal && !hp4 && vv4 && vh4;
      match   = !hpal && hp4 && (ft4 == ct4);
      expect_bits("ct4 active/lpe/we", {act4, lpe4, we4}, {!hpal, !hp4 && vv4 && vh4, capture});
      if (capture) expect_bits("ct4 wdata", 8'(wd4), 8'(vt4));
      expect_bits("ct4 lock/hp", {sl4, nl4, nh4}, {match, hpal ? hp4 : match, hp4});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
