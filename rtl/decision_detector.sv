// decision_detector: recovers the ETI decision bit from the Hogge detector.
//
// up is sampled on the falling clock edge (up_mid). At each rising edge a high
// `up` means the line changed during the cycle just ended; if up was already
// high at mid-cycle the change came with the rising edge (plain word), otherwise
// half a cycle late (encoded word). Over one receive window of WL cycles, ended
// by `last`, the detector remembers whether it saw transitions of either phase
// and then registers `decision` = 1 if the window held a late transition.
// A window without any transition carries no phase; the previous decision is then
// kept and `held` is raised for the following window. `conflict` flags a window
// with transitions of both phases, which a correctly aligned link never produces.
// decision, held and conflict are valid for WL cycles after the window's last
// cycle. The published scheme names this block and its purpose; this logic is this
// design's.
module decision_detector (
  input  logic clk,
  input  logic rst,
  input  logic up,
  input  logic last,
  output logic decision,
  output logic held,
  output logic conflict
);
  logic up_mid;
  logic seen_late, seen_early;
  logic late_now, early_now, any_late, any_early;

  always_ff @(negedge clk) begin
    if (rst) up_mid <= 1'b0;
    else     up_mid <= up;
  end

  assign late_now  = up & ~up_mid;
  assign early_now = up &  up_mid;
  assign any_late  = seen_late  | late_now;
  assign any_early = seen_early | early_now;

  always_ff @(posedge clk) begin
    if (rst) begin
      seen_late  <= 1'b0;
      seen_early <= 1'b0;
      decision   <= 1'b0;
      held       <= 1'b0;
      conflict   <= 1'b0;
    end else if (last) begin
      seen_late  <= 1'b0;
      seen_early <= 1'b0;
      held       <= ~(any_late | any_early);
      conflict   <= any_late & any_early;
      if (any_late | any_early) decision <= any_late;
    end else begin
      seen_late  <= any_late;
      seen_early <= any_early;
    end
  end
endmodule
