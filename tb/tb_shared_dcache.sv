// tb_shared_dcache: self-checking test of shared_dcache at its default size
// (4 ways, 64 sets, 32-byte lines, 1-bit collision entries) with a 60-cycle memory.
//
// Random loads and stores from an HP thread (id 0) and LP threads (ids 1-3) go to
// a few sets with a small pool of tags, so that LP fills evict HP lines, evicted HP
// lines come back and sets fill with locked lines. The allocation mode alternates
// between collision and HPAL every few hundred requests. For every request the
// testbench checks the returned data against its own copy of memory, the hit flag,
// the thread id, the latency (1 cycle for a load hit, 62 for a load miss or a
// store), and the event pulses against cc_ref_model, and that the collision array
// is never accessed in HPAL mode. Each mechanism must occur.
module tb_shared_dcache;
  import cc_pkg::*;
  import cc_ref_pkg::*;

  localparam int LAT = 60;
  logic clk = 0, rst_n = 0;
  cc_mode_e mode;
  logic req_valid, req_ready, req_we, req_hp;
  logic [31:0] req_addr, req_wdata;
  logic [1:0] req_tid;
  logic resp_valid, resp_hit;
  logic [31:0] resp_rdata;
  logic [1:0] resp_tid;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata;
  logic [255:0] mem_resp_data;
  logic ct_access;
  int n_ct_access = 0;
  cc_events_t evt;

  shared_dcache dut (
    .clk, .rst_n, .mode_i(mode),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we),
    .req_addr_i(req_addr), .req_wdata_i(req_wdata), .req_hp_i(req_hp), .req_tid_i(req_tid),
    .resp_valid_o(resp_valid), .resp_hit_o(resp_hit), .resp_rdata_o(resp_rdata),
    .resp_tid_o(resp_tid),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_we_o(mem_req_we),
    .mem_req_addr_o(mem_req_addr), .mem_req_wdata_o(mem_req_wdata),
    .mem_resp_valid_i(mem_resp_valid), .mem_resp_data_i(mem_resp_data),
    .ct_access_o(ct_access), .evt_o(evt));

  mem_model #(.LATENCY(LAT)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .resp_valid(mem_resp_valid),
    .resp_data(mem_resp_data));

  always #5 clk = ~clk;

  // in HPAL mode the collision array must not be touched
  always @(posedge clk) begin
    if (rst_n && ct_access) begin
      n_ct_access++;
      if (mode == MODE_HPAL) begin
        failures++;
        $display("FAIL collision array accessed in HPAL mode");
      end
    end
  end

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_lpe = 0, n_ctw = 0, n_relock = 0, n_forced = 0, n_hpal = 0, n_wt = 0;
  int unsigned shadow [int unsigned];
  cc_ref_model model;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  task automatic do_req(bit we, int unsigned addr, int tid);
    ref_result_t r;
    cc_events_t seen;
    int lat;
    int unsigned wd;
    wd = $urandom;
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = wd;
    req_tid = 2'(tid); req_hp = (tid == 0);
    r = model.access(we, addr, tid == 0, mode == MODE_HPAL);
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
    check(resp_valid, "response");
    check(resp_tid == 2'(tid), "response thread id");
    check(resp_hit == r.hit, $sformatf("hit flag for %h: %b expected %b", addr, resp_hit, r.hit));
    if (!we) check(resp_rdata == expected_word(addr),
                   $sformatf("load %h: %h expected %h", addr, resp_rdata, expected_word(addr)));
    else shadow[addr & ~32'h3] = wd;
    check(lat == ((!we && r.hit) ? 1 : LAT + 2), $sformatf("latency %0d (hit %b we %b)", lat, r.hit, we));
    check(seen.hit == r.hit && seen.miss == !r.hit, "hit/miss event");
    check(seen.lp_evicts_hp == r.lp_evicts_hp, $sformatf("lp_evicts_hp event for %h", addr));
    check(seen.ct_write == r.ct_write, "ct_write event");
    check(seen.relock == r.relock, $sformatf("relock event for %h", addr));
    check(seen.forced_evict == r.forced, "forced eviction event");
    check(seen.hpal_lock == r.hpal_lock, "HPAL lock event");
    check(seen.write_through == we, "write-through event");
    n_hit += int'(seen.hit); n_miss += int'(seen.miss); n_lpe += int'(seen.lp_evicts_hp);
    n_ctw += int'(seen.ct_write); n_relock += int'(seen.relock); n_forced += int'(seen.forced_evict);
    n_hpal += int'(seen.hpal_lock); n_wt += int'(seen.write_through);
    @(negedge clk);
  endtask

  initial begin
    model = new(DC_NUM_SETS, DC_NUM_WAYS, DC_LINE_BYTES, 1);
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_tid = 0; req_hp = 0;
    mode = MODE_CBV;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int tid, set, tg;
      bit we;
      if (n % 400 == 399) mode = (mode == MODE_CBV) ? MODE_HPAL : MODE_CBV;
      tid = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 3);
      we  = ($urandom_range(0, 9) == 0);
      set = $urandom_range(0, 3);
      // HP and LP threads use different tag pools; HP tags are revisited often
      tg  = (tid == 0) ? $urandom_range(0, 5) : $urandom_range(16, 31);
      do_req(we, (32'(tg) << 11) | (32'(set) << 5) | (32'($urandom_range(0, 7)) << 2), tid);
    end
    $display("hits %0d misses %0d lp_evicts_hp %0d ct_writes %0d relocks %0d forced %0d hpal_locks %0d stores %0d",
             n_hit, n_miss, n_lpe, n_ctw, n_relock, n_forced, n_hpal, n_wt);
    check(n_hit > 0, "some hits");
    check(n_miss > 0, "some misses");
    check(n_lpe > 0, "LP fills evicting HP lines");
    check(n_ctw > 0, "collision entry writes");
    check(n_relock > 0, "returning HP lines locked");
    check(n_forced > 0, "fully locked sets");
    check(n_hpal > 0, "HPAL locks");
    check(n_wt > 0, "write-through stores");
    check(n_ct_access > 0, "collision array accesses in collision mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
