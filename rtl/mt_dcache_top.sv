// mt_dcache_top: shared L1 data cache of a real-time multithreaded core with the
// dual-mode hybrid thread collision scheme.
//
// One hardware thread is the HP (real-time) thread, named by hp_tid_i; the others
// are LP threads. The LP thread activity monitor counts the active LP threads and
// picks the allocation policy: collision bit vector mode while few LP threads run,
// HPAL ("HP always locked") mode when more become active. The cache marks each
// request HP or LP by comparing its thread id with hp_tid_i and allocates lines
// under the policy in force.
//
// Interface and timing: the core-side request/response and the next-level memory
// port are those of shared_dcache (1-cycle load hit, one request in flight, memory
// handshake with a line-wide read response). thread_active_i / hp_tid_i come from
// the core; a change of thread activity switches the mode one clock later. mode_o,
// cbv_enable_o (collision and HP bit vectors enabled), ct_access_o (collision
// array enabled this cycle; never in HPAL mode) and evt_o (one-cycle pulses per
// mechanism) are for observation. The processor core and the next memory level
// are outside this module.
//
// Defaults are the evaluated configuration: 4 threads, 4-way 8 KB cache with
// 32-byte lines, 1-bit collision entry per set. Setting CT_W to the tag width (21)
// gives the full collision tag scheme; HPAL_MIN_LP above NUM_THREADS-1 disables the
// switch to HPAL.
module mt_dcache_top
  import cc_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned NUM_WAYS    = cc_pkg::DC_NUM_WAYS,
  parameter int unsigned NUM_SETS    = cc_pkg::DC_NUM_SETS,
  parameter int unsigned LINE_BYTES  = cc_pkg::DC_LINE_BYTES,
  parameter int unsigned CT_W        = 1,
  parameter int unsigned HPAL_MIN_LP = 2,
  localparam int unsigned TID_W  = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned CNT_W  = $clog2(NUM_THREADS + 1),
  localparam int unsigned LINE_W = LINE_BYTES * 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // thread state from the core
  input  logic [NUM_THREADS-1:0] thread_active_i,
  input  logic [TID_W-1:0]       hp_tid_i,
  // core load/store port
  input  logic                   req_valid_i,
  output logic                   req_ready_o,
  input  logic                   req_we_i,
  input  logic [ADDR_W-1:0]      req_addr_i,
  input  logic [WORD_W-1:0]      req_wdata_i,
  input  logic [TID_W-1:0]       req_tid_i,
  output logic                   resp_valid_o,
  output logic                   resp_hit_o,
  output logic [WORD_W-1:0]      resp_rdata_o,
  output logic [TID_W-1:0]       resp_tid_o,
  // next memory level
  output logic                   mem_req_valid_o,
  input  logic                   mem_req_ready_i,
  output logic                   mem_req_we_o,
  output logic [ADDR_W-1:0]      mem_req_addr_o,
  output logic [WORD_W-1:0]      mem_req_wdata_o,
  input  logic                   mem_resp_valid_i,
  input  logic [LINE_W-1:0]      mem_resp_data_i,
  // observation
  output cc_mode_e               mode_o,
  output logic                   cbv_enable_o,
  output logic                   ct_access_o,
  output logic [CNT_W-1:0]       lp_count_o,
  output cc_events_t             evt_o
);

  lp_activity_monitor #(.NUM_THREADS(NUM_THREADS), .HPAL_MIN_LP(HPAL_MIN_LP)) u_monitor (
    .clk, .rst_n, .thread_active_i, .hp_tid_i,
    .lp_count_o, .mode_o, .cbv_enable_o);

  shared_dcache #(
    .NUM_THREADS(NUM_THREADS), .NUM_WAYS(NUM_WAYS), .NUM_SETS(NUM_SETS),
    .LINE_BYTES(LINE_BYTES), .CT_W(CT_W)
  ) u_dcache (
    .clk, .rst_n, .mode_i(mode_o),
    .req_valid_i, .req_ready_o, .req_we_i, .req_addr_i, .req_wdata_i,
    .req_hp_i(req_tid_i == hp_tid_i), .req_tid_i,
    .resp_valid_o, .resp_hit_o, .resp_rdata_o, .resp_tid_o,
    .mem_req_valid_o, .mem_req_ready_i, .mem_req_we_o, .mem_req_addr_o, .mem_req_wdata_o,
    .mem_resp_valid_i, .mem_resp_data_i,
    .ct_access_o, .evt_o);

endmodule
