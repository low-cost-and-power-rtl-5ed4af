// tb_mt_dcache_top: end-to-end test of mt_dcache_top at its default parameters
// (4 threads, 4-way 8 KB cache, 1-bit collision entries, 60-cycle memory).
//
// 1. Directed: the HP thread loads line A; LP threads fill A's set and evict it (a
//    thread collision, the low tag bit of A is recorded); the HP thread reloads A,
//    which is locked; then LP misses to the same set must leave A in place.
// 2. Dual-thread phase (HP + 1 LP active): collision bit vector mode.
// 3. Quadruple-thread phase (HP + 3 LP): the monitor switches to HPAL mode.
// 4. Back to two threads with another thread as HP: collision mode again.
// Random loads/stores in phases 2-4 are checked against cc_ref_model (data, hit
// flag, latency, event pulses). Each mechanism and both mode switches are counted
// and must occur at least once.
module tb_mt_dcache_top;
  import cc_pkg::*;
  import cc_ref_pkg::*;

  localparam int LAT = 60;
  logic clk = 0, rst_n = 0;
  logic [3:0] thread_active;
  logic [1:0] hp_tid;
  logic req_valid, req_ready, req_we;
  logic [31:0] req_addr, req_wdata;
  logic [1:0] req_tid;
  logic resp_valid, resp_hit;
  logic [31:0] resp_rdata;
  logic [1:0] resp_tid;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata;
  logic [255:0] mem_resp_data;
  cc_mode_e mode;
  logic cbv_enable, ct_access;
  int n_ct_access = 0;
  logic [2:0] lp_count;
  cc_events_t evt;

  mt_dcache_top dut (
    .clk, .rst_n, .thread_active_i(thread_active), .hp_tid_i(hp_tid),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we),
    .req_addr_i(req_addr), .req_wdata_i(req_wdata), .req_tid_i(req_tid),
    .resp_valid_o(resp_valid), .resp_hit_o(resp_hit), .resp_rdata_o(resp_rdata),
    .resp_tid_o(resp_tid),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_we_o(mem_req_we),
    .mem_req_addr_o(mem_req_addr), .mem_req_wdata_o(mem_req_wdata),
    .mem_resp_valid_i(mem_resp_valid), .mem_resp_data_i(mem_resp_data),
    .mode_o(mode), .cbv_enable_o(cbv_enable), .ct_access_o(ct_access), .lp_count_o(lp_count), .evt_o(evt));

  mem_model #(.LATENCY(LAT)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .resp_valid(mem_resp_valid),
    .resp_data(mem_resp_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_lpe = 0, n_ctw = 0, n_relock = 0, n_forced = 0, n_hpal = 0, n_wt = 0;
  int n_to_hpal = 0, n_to_cbv = 0;
  int unsigned shadow [int unsigned];
  cc_ref_model model;
  cc_mode_e mode_prev;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (mode != mode_prev && mode == MODE_HPAL) n_to_hpal++;
      if (mode != mode_prev && mode == MODE_CBV)  n_to_cbv++;
    end
    mode_prev <= mode;
    // the collision bit vector is switched off in HPAL mode
    if (rst_n && ct_access) begin
      n_ct_access++;
      if (!cbv_enable && req_ready) begin
        failures++;
        $display("FAIL collision array accessed in HPAL mode");
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int unsigned expected_word(int unsigned a);
    a = a & ~32'h3;
    return shadow.exists(a) ? shadow[a] : mem_word(a);
  endfunction

  // one request; returns the model's prediction
  task automatic do_req(bit we, int unsigned addr, int tid, output ref_result_t r);
    cc_events_t seen;
    int lat;
    int unsigned wd;
    wd = $urandom;
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = wd; req_tid = 2'(tid);
    r = model.access(we, addr, tid == int'(hp_tid), mode == MODE_HPAL);
    @(negedge clk);
    req_valid = 0;
    seen = '0;
    lat = 1;
    while (!resp_valid) begin
      seen |= evt;
      @(negedge clk);
      lat++;
      if (lat > 200) break;
    end
    seen |= evt;
    check(resp_valid && resp_tid == 2'(tid), "response and thread id");
    check(resp_hit == r.hit, $sformatf("hit flag for %h: %b expected %b", addr, resp_hit, r.hit));
    if (!we) check(resp_rdata == expected_word(addr),
                   $sformatf("load %h: %h expected %h", addr, resp_rdata, expected_word(addr)));
    else shadow[addr & ~32'h3] = wd;
    check(lat == ((!we && r.hit) ? 1 : LAT + 2), $sformatf("latency %0d", lat));
    check(seen.hit == r.hit && seen.miss == !r.hit, "hit/miss event");
    check(seen.lp_evicts_hp == r.lp_evicts_hp, "lp_evicts_hp event");
    check(seen.ct_write == r.ct_write, "ct_write event");
    check(seen.relock == r.relock, "relock event");
    check(seen.forced_evict == r.forced, "forced eviction event");
    check(seen.hpal_lock == r.hpal_lock, "HPAL lock event");
    check(seen.write_through == we, "write-through event");
    n_hit += int'(seen.hit); n_miss += int'(seen.miss); n_lpe += int'(seen.lp_evicts_hp);
    n_ctw += int'(seen.ct_write); n_relock += int'(seen.relock); n_forced += int'(seen.forced_evict);
    n_hpal += int'(seen.hpal_lock); n_wt += int'(seen.write_through);
    @(negedge clk);
  endtask

  function automatic int unsigned mkaddr(int tg, int set, int word);
    return (32'(tg) << 11) | (32'(set) << 5) | (32'(word) << 2);
  endfunction

  task automatic set_threads(logic [3:0] act, logic [1:0] hp, cc_mode_e exp_mode);
    thread_active = act; hp_tid = hp;
    repeat (2) @(negedge clk);
    check(mode == exp_mode && cbv_enable == (exp_mode == MODE_CBV),
          $sformatf("mode %0d for threads %b", mode, act));
  endtask

  task automatic random_phase(int n, int nthreads, int set_lo, int set_hi);
    ref_result_t r;
    for (int i = 0; i < n; i++) begin
      int tid, tg;
      bit we;
      tid = ($urandom_range(0, 2) == 0) ? int'(hp_tid) : $urandom_range(0, nthreads - 1);
      we  = ($urandom_range(0, 9) == 0);
      tg  = (tid == int'(hp_tid)) ? $urandom_range(0, 5) : 16 * (tid + 1) + $urandom_range(0, 11);
      do_req(we, mkaddr(tg, $urandom_range(set_lo, set_hi), $urandom_range(0, 7)), tid, r);
    end
  endtask

  initial begin
    ref_result_t r;
    model = new(DC_NUM_SETS, DC_NUM_WAYS, DC_LINE_BYTES, 1);
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_tid = 0;
    thread_active = 4'b0011; hp_tid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!req_ready) @(negedge clk);
    check(mode == MODE_CBV, "collision bit vector mode with one LP thread");

    // 1. directed collision / return / lock sequence in set 9
    do_req(0, mkaddr(3, 9, 0), 0, r);                 // HP line A, tag 3
    check(!r.hit, "A misses first");
    for (int k = 0; k < 4; k++) do_req(0, mkaddr(40 + k, 9, 1), 1, r);
    check(r.lp_evicts_hp && r.ct_write, "LP fill evicts A and records it");
    do_req(0, mkaddr(3, 9, 2), 0, r);                 // A returns
    check(!r.hit && r.relock, "returning A is locked");
    for (int k = 0; k < 8; k++) do_req(0, mkaddr(50 + k, 9, 3), 1, r);
    do_req(0, mkaddr(3, 9, 4), 0, r);
    check(r.hit, "locked A survives LP misses");

    // 2. dual-thread phase
    random_phase(1500, 2, 0, 3);
    // 3. quadruple-thread phase: HPAL
    set_threads(4'b1111, 0, MODE_HPAL);
    random_phase(1500, 4, 0, 3);
    // 4. two threads again, thread 2 is HP
    set_threads(4'b0110, 2, MODE_CBV);
    random_phase(1000, 3, 2, 5);

    $display("hits %0d misses %0d lp_evicts_hp %0d ct_writes %0d relocks %0d forced %0d hpal_locks %0d stores %0d to_hpal %0d to_cbv %0d",
             n_hit, n_miss, n_lpe, n_ctw, n_relock, n_forced, n_hpal, n_wt, n_to_hpal, n_to_cbv);
    check(n_hit > 0, "some hits");
    check(n_miss > 0, "some misses");
    check(n_lpe > 0, "thread collisions");
    check(n_ctw > 0, "collision bit writes");
    check(n_relock > 0, "returning HP lines locked");
    check(n_forced > 0, "fully locked sets");
    check(n_hpal > 0, "HPAL locks");
    check(n_wt > 0, "write-through stores");
    check(n_to_hpal > 0, "switch to HPAL mode");
    check(n_ct_access > 0, "collision array accesses");
    check(n_to_cbv > 0, "switch back to collision bit vector mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
