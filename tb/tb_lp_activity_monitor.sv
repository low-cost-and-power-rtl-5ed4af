// tb_lp_activity_monitor: exhaustive test of lp_activity_monitor (4 threads,
// switch to HPAL from 2 active LP threads). Every thread-activity pattern and HP
// thread id is applied; the LP count is checked at once and the mode one clock
// later against a count made in the testbench.
module tb_lp_activity_monitor;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] thread_active_i;
  logic [1:0] hp_tid_i;
  logic [2:0] lp_count_o;
  cc_mode_e   mode_o;
  logic       cbv_enable_o;
  int checks = 0, failures = 0, n_hpal = 0, n_cbv = 0;

  lp_activity_monitor dut (.clk, .rst_n, .thread_active_i, .hp_tid_i, .lp_count_o, .mode_o, .cbv_enable_o);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    thread_active_i = '1; hp_tid_i = 0;
    @(negedge clk);
    checks++;
    if (mode_o != MODE_CBV || !cbv_enable_o) begin failures++; $display("FAIL reset mode"); end
    rst_n = 1;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 64; i++) begin
        int lp;
        lp = 0;
        {thread_active_i, hp_tid_i} = 6'(r == 0 ? i : $urandom);
        for (int t = 0; t < 4; t++) if (thread_active_i[t] && t != int'(hp_tid_i)) lp++;
        #1;
        checks++;
        if (int'(lp_count_o) != lp) begin failures++; $display("FAIL count %0d exp %0d", lp_count_o, lp); end
        @(negedge clk);
        checks++;
        if (mode_o != ((lp >= 2) ? MODE_HPAL : MODE_CBV) || cbv_enable_o != (lp < 2)) begin
          failures++;
          $display("FAIL active %b hp %0d: mode %0d", thread_active_i, hp_tid_i, mode_o);
        end
        if (mode_o == MODE_HPAL) n_hpal++; else n_cbv++;
      end
    checks++;
    if (n_hpal == 0 || n_cbv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
