// mt_harness: drives one mt_dcache_top through a fixed pseudo-random request
// stream and checks every response against cc_ref_model.
//
// Thread 0 is the HP thread; threads 1..N_LP are active LP threads, so the
// activity monitor picks the mode from N_LP and HPAL_MIN_LP. One request in three
// comes from the HP thread, the rest from a random LP thread; all are loads to sets
// 0..3. The HP thread cycles over 8 tags that differ in tag bits 0, 2 and 6 (a
// 1-bit collision entry sees 2 classes of them, a 4-bit entry 4, wider entries 8);
// each LP thread has 16 tags of its own. The stream comes from a xorshift generator
// with a fixed seed, so harnesses with different parameters see the same sequence
// of thread choices and addresses. Reports check and failure counts, returning HP
// lines locked, and hits per thread class.
module mt_harness #(
  parameter int CT_W        = 1,
  parameter int HPAL_MIN_LP = 2,
  parameter int N_LP        = 1,
  parameter int N_REQ       = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_relock,
  output int   n_hp_req,
  output int   n_hp_hits,
  output int   n_lp_req,
  output int   n_lp_hits
);
  import cc_pkg::*;
  import cc_ref_pkg::*;

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
  logic [2:0] lp_count;
  cc_events_t evt;

  mt_dcache_top #(.CT_W(CT_W), .HPAL_MIN_LP(HPAL_MIN_LP)) dut (
    .clk, .rst_n, .thread_active_i(4'((1 << (N_LP + 1)) - 1)), .hp_tid_i(2'd0),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we),
    .req_addr_i(req_addr), .req_wdata_i(req_wdata), .req_tid_i(req_tid),
    .resp_valid_o(resp_valid), .resp_hit_o(resp_hit), .resp_rdata_o(resp_rdata),
    .resp_tid_o(resp_tid),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_we_o(mem_req_we),
    .mem_req_addr_o(mem_req_addr), .mem_req_wdata_o(mem_req_wdata),
    .mem_resp_valid_i(mem_resp_valid), .mem_resp_data_i(mem_resp_data),
    .mode_o(mode), .cbv_enable_o(cbv_enable), .ct_access_o(ct_access), .lp_count_o(lp_count),
    .evt_o(evt));

  mem_model u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .resp_valid(mem_resp_valid),
    .resp_data(mem_resp_data));

  int unsigned rng = 32'h1234_5678;
  function automatic int unsigned next_rand();
    rng ^= rng << 13; rng ^= rng >> 17; rng ^= rng << 5;
    return rng;
  endfunction

  cc_ref_model model;

  initial begin
    done = 0; checks = 0; failures = 0; n_relock = 0;
    n_hp_req = 0; n_hp_hits = 0; n_lp_req = 0; n_lp_hits = 0;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_tid = 0;
    model = new(DC_NUM_SETS, DC_NUM_WAYS, DC_LINE_BYTES, CT_W);
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < N_REQ; n++) begin
      ref_result_t r;
      cc_events_t seen;
      int tid, tg, i;
      int unsigned addr;
      tid = (next_rand() % 3 == 0) ? 0 : 1 + int'(next_rand() % N_LP);
      i   = int'(next_rand() % 16);
      if (tid == 0) tg = (i & 1) | (((i >> 1) & 1) << 2) | (((i >> 2) & 1) << 6);
      else          tg = 256 + 32 * tid + i;
      addr = (32'(tg) << 11) | ((next_rand() % 4) << 5) | ((next_rand() % 8) << 2);
      while (!req_ready) @(negedge clk);
      checks++;
      if (mode != ((N_LP >= HPAL_MIN_LP) ? MODE_HPAL : MODE_CBV)) failures++;
      req_valid = 1; req_we = 0; req_addr = addr; req_tid = 2'(tid);
      r = model.access(0, addr, tid == 0, mode == MODE_HPAL);
      @(negedge clk);
      req_valid = 0;
      seen = '0;
      while (!resp_valid) begin seen |= evt; @(negedge clk); end
      seen |= evt;
      checks += 3;
      if (resp_hit != r.hit) failures++;
      if (resp_rdata != mem_word(addr)) failures++;
      if (seen.relock != r.relock || seen.ct_write != r.ct_write || seen.forced_evict != r.forced ||
          seen.hpal_lock != r.hpal_lock || seen.lp_evicts_hp != r.lp_evicts_hp)
        failures++;
      n_relock += int'(seen.relock);
      if (tid == 0) begin n_hp_req++; n_hp_hits += int'(resp_hit); end
      else          begin n_lp_req++; n_lp_hits += int'(resp_hit); end
      @(negedge clk);
    end
    done = 1;
  end
endmodule
