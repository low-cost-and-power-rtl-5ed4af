// collision_detect: thread collision detection and lock/HP bit decision for one
// line allocation in the shared cache.
//
// In collision mode (collision tag, or collision bit vector when CT_W = 1):
//  - an LP request whose victim is a valid line with its HP bit set is a thread
//    collision; the low CT_W bits of the victim's tag are written into the set's
//    collision entry (ct_we / ct_wdata);
//  - an HP request compares the low CT_W bits of the tag it is filling with the
//    set's collision entry (the "=?" comparator); a match means a formerly evicted
//    HP line is returning, and the new line is locked (set_lock);
//  - the new line's HP bit is the request's priority; its lock bit is set_lock.
// In HPAL mode the collision entry is neither read nor written (ct_active low, so
// the collision and HP bit vectors can be gated off) and the new line's lock and HP
// bits are both the request's priority, so they always agree.
//
// Purely combinational: all inputs come from the same lookup cycle (the collision
// entry and the victim's tag and HP bit are read together with the set's tags),
// and the outputs are used when the line is written into the cache.
//
// Follows the described scheme: capture on LP-evicts-HP, compare on HP allocation,
// lock on match, HP and lock equal in HPAL mode. Own choices: a match does not
// clear the collision entry, and the collision entry has no valid bit.
module collision_detect
  import cc_pkg::*;
#(
  parameter int unsigned CT_W = 1
) (
  input  cc_mode_e            mode_i,         // policy in force
  input  logic                req_hp_i,       // 1: HP (real-time) thread request
  input  logic [CT_W-1:0]     fill_tag_i,     // low CT_W tag bits of the line being allocated
  input  logic [CT_W-1:0]     ct_rdata_i,     // collision entry of the set
  input  logic                victim_valid_i, // victim way holds a line
  input  logic                victim_hp_i,    // HP bit of the victim line
  input  logic [CT_W-1:0]     victim_tag_i,   // low CT_W tag bits of the victim line
  output logic                ct_active_o,    // collision and HP vectors in use
  output logic                lp_evicts_hp_o, // LP request evicts an HP line
  output logic                ct_we_o,        // write the set's collision entry
  output logic [CT_W-1:0]     ct_wdata_o,     // low tag bits of the evicted HP line
  output logic                set_lock_o,     // HP line returning: lock it
  output logic                new_lock_o,     // lock bit of the allocated line
  output logic                new_hp_o        // HP bit of the allocated line
);

  always_comb begin
    ct_active_o    = (mode_i == MODE_CBV);
    lp_evicts_hp_o = !req_hp_i && victim_valid_i && victim_hp_i;
    ct_wdata_o     = victim_tag_i;
    ct_we_o        = ct_active_o && lp_evicts_hp_o;
    set_lock_o     = ct_active_o && req_hp_i && (fill_tag_i == ct_rdata_i);
    new_hp_o       = req_hp_i;
    new_lock_o     = (mode_i == MODE_HPAL) ? req_hp_i : set_lock_o;
  end

endmodule
