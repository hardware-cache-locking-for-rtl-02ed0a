// clau_watchdog: per-core deadlock-avoidance timer for cache-locking RMWs.
//
// Several line locks may be held at once by speculative RMWs, and in rare
// cases they can deadlock with other cores. Because a lock is only a
// performance aid, the core simply drops all locks when no locking RMW has made
// progress for a while. The timer is enabled while at least one line is
// locked (`any_locked`), cleared whenever a store micro-op writes the L1D
// (`store_write`, the progress signal), and held at zero while nothing is
// locked. When it has counted THRESH enabled cycles without progress it
// raises `force_unlock` for one cycle and restarts from zero.
//
// Timing: `force_unlock` is a registered-count compare; it is high in the
// cycle in which the THRESH-th consecutive enabled, progress-free cycle is
// counted, i.e. THRESH cycles after locking began if nothing wrote the L1D.
// The 13-bit width and the 5000-cycle threshold follow the document; the exact
// cycle on which the pulse appears is this design's choice.
module clau_watchdog
  import clau_pkg::*;
#(
  parameter int unsigned W      = WD_W_DEF,
  parameter int unsigned THRESH = WD_THRESH_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         any_locked,    // some line is in the Locked state
  input  logic         store_write,   // a store micro-op wrote the L1D this cycle
  output logic         force_unlock,  // one-cycle pulse: release every lock
  output logic [W-1:0] count          // current timer value (observability)
);

  initial begin
    assert (THRESH >= 1 && THRESH < (1 << W))
      else $error("clau_watchdog: THRESH %0d does not fit in %0d bits", THRESH, W);
  end

  logic [W-1:0] cnt_q;
  logic         hit;

  assign hit          = any_locked && !store_write && (cnt_q == W'(THRESH - 1));
  assign force_unlock = hit;
  assign count        = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        cnt_q <= '0;
    else if (!any_locked || store_write || hit) cnt_q <= '0;
    else                               cnt_q <= cnt_q + 1'b1;
  end

endmodule
