// tb_replacement_unit: self-checking test of replacement_unit (4 ways, 64 sets).
// Random valid/lock patterns are applied to random sets; the expected victim comes
// from a per-set pointer model kept in the testbench: lowest invalid way, else the
// first unlocked way at or after the pointer, else the pointer's way (forced).
// Allocations advance the model's pointer to the way after the victim.
module tb_replacement_unit;
  localparam int W = 4, S = 64;
  logic clk = 0, rst_n = 0;
  logic [5:0] set_i;
  logic [W-1:0] valid_i, lock_i;
  logic update_i;
  logic [1:0] victim_o;
  logic forced_o;
  int ptr [S];
  int checks = 0, failures = 0, n_forced = 0, n_skip = 0;

  replacement_unit dut (.clk, .rst_n, .set_i, .valid_i, .lock_i, .update_i, .victim_o, .forced_o);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ptr[s]) ptr[s] = 0;
    set_i = 0; valid_i = 0; lock_i = 0; update_i = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      int exp_v; bit exp_f;
      set_i = 6'($urandom_range(0, 7));   // few sets so pointers move a lot
      valid_i = ($urandom_range(0, 4) == 0) ? W'($urandom) : '1;
      lock_i  = W'($urandom) | (($urandom_range(0, 3) == 0) ? '1 : '0);
      update_i = 1'($urandom);
      exp_v = -1; exp_f = 0;
      for (int w = W - 1; w >= 0; w--) if (!valid_i[w]) exp_v = w;
      if (exp_v < 0) begin
        for (int k = W - 1; k >= 0; k--) if (!lock_i[(ptr[set_i] + k) % W]) exp_v = (ptr[set_i] + k) % W;
        if (exp_v >= 0 && exp_v != ptr[set_i]) n_skip++;
      end
      if (exp_v < 0) begin exp_v = ptr[set_i]; exp_f = 1; n_forced++; end
      #1;
      checks++;
      if (int'(victim_o) != exp_v || forced_o != exp_f) begin
        failures++;
        $display("FAIL set %0d valid %b lock %b ptr %0d: victim %0d forced %b, expected %0d %b",
                 set_i, valid_i, lock_i, ptr[set_i], victim_o, forced_o, exp_v, exp_f);
      end
      if (update_i) ptr[set_i] = (exp_v + 1) % W;
      @(negedge clk);
    end
    checks++;
    if (n_forced == 0 || n_skip == 0) begin
      failures++;
      $display("FAIL coverage: forced %0d skips %0d", n_forced, n_skip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
