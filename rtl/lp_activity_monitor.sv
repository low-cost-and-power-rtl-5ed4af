// lp_activity_monitor: chooses the allocation policy of the dual-mode hybrid scheme.
//
// It counts the active low-priority threads (active threads other than the one
// marked as the HP, real-time thread). While fewer than HPAL_MIN_LP of them are
// active it selects the collision bit vector mode and enables the collision and HP
// bit vectors; from HPAL_MIN_LP active LP threads upwards it disables them and
// selects HPAL mode, in which every HP line is locked as it is allocated.
//
// Interface and timing: thread_active_i has one bit per hardware thread and
// hp_tid_i names the HP thread. mode_o and cbv_enable_o are registered, so a change
// of thread activity takes effect one clock later; after reset the mode is the
// collision bit vector mode. lp_count_o is the combinational count.
//
// The switch on the number of active LP threads, and its direction, follow the
// described hybrid scheme. The threshold value is this design's choice: the scheme
// gives no number, and the default switches to HPAL with two or more LP threads,
// so a dual-thread core stays in collision bit vector mode and a four-thread core
// with three LP threads runs HPAL.
module lp_activity_monitor
  import cc_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned HPAL_MIN_LP = 2,
  localparam int unsigned TID_W = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned CNT_W = $clog2(NUM_THREADS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_THREADS-1:0] thread_active_i,
  input  logic [TID_W-1:0]       hp_tid_i,
  output logic [CNT_W-1:0]       lp_count_o,
  output cc_mode_e               mode_o,
  output logic                   cbv_enable_o
);

  always_comb begin
    lp_count_o = '0;
    for (int t = 0; t < NUM_THREADS; t++) begin
      if (thread_active_i[t] && (TID_W'(t) != hp_tid_i)) lp_count_o = lp_count_o + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_o <= MODE_CBV;
    end else begin
      mode_o <= (32'(lp_count_o) >= HPAL_MIN_LP) ? MODE_HPAL : MODE_CBV;
    end
  end

  assign cbv_enable_o = (mode_o == MODE_CBV);

endmodule
