// shared_dcache: set-associative data cache shared by the hardware threads of a
// multithreaded core, with thread-priority-aware line allocation.
//
// Each line carries, besides its tag and valid bit, a lock bit and an HP bit (set
// when the HP, real-time thread allocated it). Each set has one collision entry of
// CT_W bits: the collision bit vector when CT_W = 1 (default), the full collision tag
// when CT_W is the tag width. On a load miss the controller reads the set's tags,
// lock/HP bits and collision entry in one lookup cycle, lets replacement_unit pick a
// victim (locked lines are skipped unless the whole set is locked) and lets
// collision_detect decide, for the mode in force, the new line's lock and HP bits and
// whether the victim's tag bits are captured. That decision is made while the line
// is fetched, so it adds no cycles. The line is written when it arrives. In HPAL
// mode the collision array is not accessed at all (its enable stays low), which is
// where the hybrid scheme saves the collision vector's power.
//
// Interface and timing:
//  - Request: req_valid_i/req_ready_o handshake, one request in flight. req_hp_i is
//    the requesting thread's priority (1 = HP), req_tid_i is returned with the
//    response. mode_i selects collision (MODE_CBV) or HPAL allocation; it is
//    sampled when the request is accepted.
//  - Response: resp_valid_o pulses for one cycle. A load hit answers in the cycle
//    after acceptance (1-cycle hit). A load miss answers in the cycle the line
//    arrives from memory. A store answers when memory acknowledges it.
//  - Memory: mem_req_valid_o/mem_req_ready_i handshake; a read asks for the line
//    at the line-aligned address, a write carries one word; mem_resp_valid_i
//    returns the line for a read (mem_resp_data_i) or acknowledges a write.
//  - After reset the controller spends NUM_SETS cycles clearing the arrays, with
//    req_ready_o low.
//
// The lock/HP/collision allocation rules follow the described scheme. Own choices:
// write-through stores without allocation on a store miss (the write policy is not
// given), one request in flight, and a valid bit kept with each tag.
module shared_dcache
  import cc_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned NUM_WAYS    = cc_pkg::DC_NUM_WAYS,
  parameter int unsigned NUM_SETS    = cc_pkg::DC_NUM_SETS,
  parameter int unsigned LINE_BYTES  = cc_pkg::DC_LINE_BYTES,
  parameter int unsigned CT_W        = 1,
  localparam int unsigned TID_W  = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned WAY_W  = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1,
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W  = $clog2(NUM_SETS),
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned LINE_W = LINE_BYTES * 8,
  localparam int unsigned WPL    = LINE_BYTES / (WORD_W / 8),
  localparam int unsigned WSEL_W = (WPL > 1) ? $clog2(WPL) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cc_mode_e           mode_i,
  // core side
  input  logic               req_valid_i,
  output logic               req_ready_o,
  input  logic               req_we_i,
  input  logic [ADDR_W-1:0]  req_addr_i,
  input  logic [WORD_W-1:0]  req_wdata_i,
  input  logic               req_hp_i,
  input  logic [TID_W-1:0]   req_tid_i,
  output logic               resp_valid_o,
  output logic               resp_hit_o,
  output logic [WORD_W-1:0]  resp_rdata_o,
  output logic [TID_W-1:0]   resp_tid_o,
  // next memory level
  output logic               mem_req_valid_o,
  input  logic               mem_req_ready_i,
  output logic               mem_req_we_o,
  output logic [ADDR_W-1:0]  mem_req_addr_o,
  output logic [WORD_W-1:0]  mem_req_wdata_o,
  input  logic               mem_resp_valid_i,
  input  logic [LINE_W-1:0]  mem_resp_data_i,
  // observation
  output logic               ct_access_o,    // collision array enabled this cycle
  output cc_events_t         evt_o
);

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_MEM_RD, S_MEM_WAIT, S_WT_REQ, S_WT_WAIT
  } state_e;

  state_e state_q, state_d;

  // latched request
  logic              q_we, q_hp;
  logic [ADDR_W-1:0] q_addr;
  logic [WORD_W-1:0] q_wdata;
  logic [TID_W-1:0]  q_tid;
  cc_mode_e          q_mode;
  logic [IDX_W-1:0]  init_idx_q;

  // allocation decision, kept from the lookup cycle to the line fill
  logic [WAY_W-1:0]  vict_q;
  logic              new_lock_q, new_hp_q, ct_we_q, set_lock_q, lp_evicts_hp_q, forced_q;
  logic [CT_W-1:0]   ct_wdata_q;
  logic              hit_q;

  wire [TAG_W-1:0]  q_tag  = q_addr[ADDR_W-1 -: TAG_W];
  wire [IDX_W-1:0]  q_idx  = q_addr[OFF_W +: IDX_W];
  wire [WSEL_W-1:0] q_wsel = WSEL_W'(q_addr[OFF_W-1:2]);

  // array ports
  logic              arr_en, ct_en;
  logic [IDX_W-1:0]  arr_addr;
  logic [NUM_WAYS-1:0] tag_we, lh_we, data_we;
  logic [TAG_W:0]    tag_wdata;
  logic [1:0]        lh_wdata;
  logic [LINE_W-1:0] data_wdata, data_wmask;
  logic              ct_we;
  logic [CT_W-1:0]   ct_wdata;

  logic [TAG_W:0]    tag_rdata  [NUM_WAYS];
  logic [1:0]        lh_rdata   [NUM_WAYS];
  logic [LINE_W-1:0] data_rdata [NUM_WAYS];
  logic [CT_W-1:0]   ct_rdata;

  for (genvar w = 0; w < NUM_WAYS; w++) begin : g_way
    // {valid, tag}
    sp_sram #(.DEPTH(NUM_SETS), .WIDTH(TAG_W + 1)) u_tag (
      .clk, .en(arr_en), .we(tag_we[w]), .addr(arr_addr),
      .wmask({(TAG_W + 1){1'b1}}), .wdata(tag_wdata), .rdata(tag_rdata[w]));
    // {hp, lock}
    sp_sram #(.DEPTH(NUM_SETS), .WIDTH(2)) u_lockhp (
      .clk, .en(arr_en), .we(lh_we[w]), .addr(arr_addr),
      .wmask(2'b11), .wdata(lh_wdata), .rdata(lh_rdata[w]));
    sp_sram #(.DEPTH(NUM_SETS), .WIDTH(LINE_W)) u_data (
      .clk, .en(arr_en), .we(data_we[w]), .addr(arr_addr),
      .wmask(data_wmask), .wdata(data_wdata), .rdata(data_rdata[w]));
  end

  // per-set collision tag / collision bit vector
  sp_sram #(.DEPTH(NUM_SETS), .WIDTH(CT_W)) u_ct (
    .clk, .en(ct_en), .we(ct_we), .addr(arr_addr),
    .wmask({CT_W{1'b1}}), .wdata(ct_wdata), .rdata(ct_rdata));

  // ---------------------------------------------------------------- lookup
  logic [NUM_WAYS-1:0] way_valid, way_lock, way_hit;
  logic                hit;
  logic [WAY_W-1:0]    hit_way;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < NUM_WAYS; w++) begin
      way_valid[w] = tag_rdata[w][TAG_W];
      way_lock[w]  = lh_rdata[w][0];
      way_hit[w]   = way_valid[w] && (tag_rdata[w][TAG_W-1:0] == q_tag);
      if (way_hit[w]) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  logic [WAY_W-1:0] vict;
  logic             forced, rep_update;

  replacement_unit #(.NUM_WAYS(NUM_WAYS), .NUM_SETS(NUM_SETS)) u_rep (
    .clk, .rst_n, .set_i(q_idx), .valid_i(way_valid), .lock_i(way_lock),
    .update_i(rep_update), .victim_o(vict), .forced_o(forced));

  logic            cd_lp_evicts_hp, cd_ct_we, cd_set_lock, cd_new_lock, cd_new_hp;
  logic [CT_W-1:0] cd_ct_wdata;

  collision_detect #(.CT_W(CT_W)) u_cd (
    .mode_i(q_mode), .req_hp_i(q_hp), .fill_tag_i(q_tag[CT_W-1:0]), .ct_rdata_i(ct_rdata),
    .victim_valid_i(way_valid[vict]), .victim_hp_i(lh_rdata[vict][1]),
    .victim_tag_i(tag_rdata[vict][CT_W-1:0]),
    .ct_active_o(), .lp_evicts_hp_o(cd_lp_evicts_hp), .ct_we_o(cd_ct_we),
    .ct_wdata_o(cd_ct_wdata), .set_lock_o(cd_set_lock), .new_lock_o(cd_new_lock),
    .new_hp_o(cd_new_hp));

  // ---------------------------------------------------------------- control
  always_comb begin
    state_d     = state_q;
    req_ready_o = (state_q == S_IDLE);
    arr_en      = 1'b0;
    ct_en       = 1'b0;
    arr_addr    = q_idx;
    tag_we      = '0;
    lh_we       = '0;
    data_we     = '0;
    ct_we       = 1'b0;
    tag_wdata   = {1'b1, q_tag};
    lh_wdata    = {new_hp_q, new_lock_q};
    ct_wdata    = ct_wdata_q;
    data_wdata  = mem_resp_data_i;
    data_wmask  = '1;
    rep_update  = 1'b0;
    resp_valid_o = 1'b0;
    resp_hit_o   = 1'b0;
    resp_rdata_o = '0;
    mem_req_valid_o = 1'b0;
    mem_req_we_o    = q_we;
    mem_req_addr_o  = q_we ? q_addr : {q_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
    mem_req_wdata_o = q_wdata;
    evt_o = '0;

    unique case (state_q)
      S_INIT: begin
        arr_en    = 1'b1;
        ct_en     = 1'b1;
        arr_addr  = init_idx_q;
        tag_we    = '1;
        lh_we     = '1;
        ct_we     = 1'b1;
        tag_wdata = '0;
        lh_wdata  = '0;
        ct_wdata  = '0;
        if (init_idx_q == IDX_W'(NUM_SETS - 1)) state_d = S_IDLE;
      end
      S_IDLE: begin
        arr_addr = req_addr_i[OFF_W +: IDX_W];
        arr_en   = req_valid_i;
        ct_en    = req_valid_i && (mode_i == MODE_CBV);
        if (req_valid_i) state_d = S_LOOKUP;
      end
      S_LOOKUP: begin
        evt_o.hit  = hit;
        evt_o.miss = !hit;
        if (q_we) begin
          // write-through; update the line too when it is present
          if (hit) begin
            arr_en        = 1'b1;
            data_we[hit_way] = 1'b1;
            data_wdata    = {WPL{q_wdata}};
            data_wmask    = LINE_W'({WORD_W{1'b1}}) << (int'(q_wsel) * WORD_W);
          end
          state_d = S_WT_REQ;
        end else if (hit) begin
          resp_valid_o = 1'b1;
          resp_hit_o   = 1'b1;
          resp_rdata_o = data_rdata[hit_way][int'(q_wsel) * WORD_W +: WORD_W];
          state_d      = S_IDLE;
        end else begin
          state_d = S_MEM_RD;
        end
      end
      S_MEM_RD: begin
        mem_req_valid_o = 1'b1;
        if (mem_req_ready_i) state_d = S_MEM_WAIT;
      end
      S_MEM_WAIT: begin
        if (mem_resp_valid_i) begin
          arr_en          = 1'b1;
          ct_en           = ct_we_q;
          tag_we[vict_q]  = 1'b1;
          lh_we[vict_q]   = 1'b1;
          data_we[vict_q] = 1'b1;
          ct_we           = ct_we_q;
          rep_update      = 1'b1;
          resp_valid_o    = 1'b1;
          resp_rdata_o    = mem_resp_data_i[int'(q_wsel) * WORD_W +: WORD_W];
          evt_o.lp_evicts_hp = lp_evicts_hp_q;
          evt_o.ct_write     = ct_we_q;
          evt_o.relock       = set_lock_q;
          evt_o.forced_evict = forced_q;
          evt_o.hpal_lock    = (q_mode == MODE_HPAL) && new_lock_q;
          state_d = S_IDLE;
        end
      end
      S_WT_REQ: begin
        mem_req_valid_o = 1'b1;
        if (mem_req_ready_i) begin
          evt_o.write_through = 1'b1;
          state_d = S_WT_WAIT;
        end
      end
      S_WT_WAIT: begin
        if (mem_resp_valid_i) begin
          resp_valid_o = 1'b1;
          resp_hit_o   = hit_q;
          state_d      = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= S_INIT;
      init_idx_q     <= '0;
      q_we           <= 1'b0;
      q_hp           <= 1'b0;
      q_addr         <= '0;
      q_wdata        <= '0;
      q_tid          <= '0;
      q_mode         <= MODE_CBV;
      hit_q          <= 1'b0;
      vict_q         <= '0;
      new_lock_q     <= 1'b0;
      new_hp_q       <= 1'b0;
      ct_we_q        <= 1'b0;
      ct_wdata_q     <= '0;
      set_lock_q     <= 1'b0;
      lp_evicts_hp_q <= 1'b0;
      forced_q       <= 1'b0;
    end else begin
      state_q <= state_d;
      // memory responses only come while one is awaited
      a_resp_expected: assert (!mem_resp_valid_i || state_q == S_MEM_WAIT || state_q == S_WT_WAIT)
        else $error("shared_dcache: unexpected memory response");
      if (state_q == S_INIT) init_idx_q <= init_idx_q + 1'b1;
      if (state_q == S_IDLE && req_valid_i) begin
        q_we    <= req_we_i;
        q_hp    <= req_hp_i;
        q_addr  <= req_addr_i;
        q_wdata <= req_wdata_i;
        q_tid   <= req_tid_i;
        q_mode  <= mode_i;
      end
      if (state_q == S_LOOKUP) begin
        hit_q          <= hit;
        vict_q         <= vict;
        new_lock_q     <= cd_new_lock;
        new_hp_q       <= cd_new_hp;
        ct_we_q        <= cd_ct_we;
        ct_wdata_q     <= cd_ct_wdata;
        set_lock_q     <= cd_set_lock;
        lp_evicts_hp_q <= cd_lp_evicts_hp;
        forced_q       <= forced;
      end
    end
  end

  assign resp_tid_o  = q_tid;
  assign ct_access_o = ct_en;

endmodule
