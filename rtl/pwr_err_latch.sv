// pwr_err_latch: the Power Status Error (PSE) bits.
//
// For each of the N monitored power sources a sticky error bit is set on the
// clock edge after the source's power-good line (already synchronised to the
// MCB clock) falls from 1 to 0, and stays set while the source recovers.
// The bits are cleared on the clock edge that ends an MCB read of PSE
// (rd_clr high). A fall seen in the same cycle as the clearing read wins, so
// no out-of-range event is lost. This follows the specification's "stays
// high until read" behaviour, which it likens to parity-error reporting.
// Detecting the falling edge rather than the low level is this design's
// choice: it keeps the power-up ramp of the supplies (status lines reset low
// in the synchronisers) from being reported as an error.
//
// Timing: err follows a falling stat by one clock; reset clears everything.
module pwr_err_latch #(
  parameter int unsigned N = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] stat,    // power-good, 1 = within range
  input  logic         rd_clr,  // PSE is being read this cycle
  output logic [N-1:0] err      // 1 = went out of range since last read
);
  logic [N-1:0] stat_q;
  logic [N-1:0] fell;

  assign fell = stat_q & ~stat;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      stat_q <= '0;
      err    <= '0;
    end else begin
      stat_q <= stat;
      err    <= (rd_clr ? '0 : err) | fell;
    end
  end

  // Only a read may clear an error bit.
  assert property (@(posedge clk) disable iff (rst) !rd_clr |=> (err & $past(err)) == $past(err))
    else $error("PSE bit lost without a read");
endmodule
