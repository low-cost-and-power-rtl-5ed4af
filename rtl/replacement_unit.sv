// replacement_unit: lock-aware victim selection for one set of the shared cache.
//
// The underlying policy is round-robin with one pointer per set (the "other
// replacement information"). The lock bits only steer it: an invalid way is taken
// first (lowest index); otherwise the first unlocked way found from the set's
// pointer onwards; only when every way of the set is locked is the pointer's way
// taken, ignoring the locks (forced_o). The same selection serves HPAL mode and the
// collision tag / bit vector mode, since both express protection as lock bits.
//
// Interface and timing: victim_o and forced_o are combinational in set_i, valid_i
// and lock_i (the lock and valid bits read for the set this cycle). A pulse on
// update_i advances the pointer of set_i to the way after victim_o at the clock
// edge; the controller pulses it when the chosen line is allocated. Pointers reset
// to way 0.
//
// Lock-steered victim selection and the all-locked fallback follow the described
// scheme; round-robin as the underlying policy and the invalid-first rule are this
// design's choices (the scheme works with LRU or random as well).
module replacement_unit #(
  parameter int unsigned NUM_WAYS = 4,
  parameter int unsigned NUM_SETS = 64,
  localparam int unsigned WAY_W = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1,
  localparam int unsigned SET_W = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SET_W-1:0]    set_i,
  input  logic [NUM_WAYS-1:0] valid_i,
  input  logic [NUM_WAYS-1:0] lock_i,
  input  logic                update_i,
  output logic [WAY_W-1:0]    victim_o,
  output logic                forced_o
);

  logic [WAY_W-1:0] rr_ptr [NUM_SETS];
  logic [WAY_W-1:0] ptr;
  logic             found_inv, found_unl;
  logic [WAY_W-1:0] inv_way, unl_way, cand;

  assign ptr = rr_ptr[set_i];

  always_comb begin
    found_inv = 1'b0;
    inv_way   = '0;
    for (int w = NUM_WAYS - 1; w >= 0; w--) begin
      if (!valid_i[w]) begin
        found_inv = 1'b1;
        inv_way   = WAY_W'(w);
      end
    end
    found_unl = 1'b0;
    unl_way   = ptr;
    for (int k = NUM_WAYS - 1; k >= 0; k--) begin
      cand = WAY_W'((int'(ptr) + k) % NUM_WAYS);
      if (!lock_i[cand]) begin
        found_unl = 1'b1;
        unl_way   = cand;
      end
    end
    if (found_inv) begin
      victim_o = inv_way;
      forced_o = 1'b0;
    end else if (found_unl) begin
      victim_o = unl_way;
      forced_o = 1'b0;
    end else begin
      victim_o = ptr;
      forced_o = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SETS; s++) rr_ptr[s] <= '0;
    end else if (update_i) begin
      rr_ptr[set_i] <= WAY_W'((int'(victim_o) + 1) % NUM_WAYS);
    end
  end

endmodule
