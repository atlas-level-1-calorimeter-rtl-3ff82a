// bc_counter -- bunch-crossing number from the TTC signals.
//
// The TTC system (decoded on the module by a TTCrx chip) delivers the 40.08
// MHz BC clock, the L1A and the bunch-counter reset (BCR).  This counter
// numbers the BCs of an orbit so that readout data can be tagged with the
// BC they belong to.  Counting 0..3563 (the LHC orbit) and restarting at 0
// on the clock after BCR are this design's; the specification only names the
// signals.
//
// Timing: bcid_q increments every clock; it is 0 in the cycle after BCR.
// orbit_err flags a BCR that did not arrive exactly at the end of an orbit.
module bc_counter
  import cmx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bcr,
  output logic [11:0] bcid_q,
  output logic        orbit_err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid_q    <= '0;
      orbit_err <= 1'b0;
    end else if (bcr) begin
      bcid_q    <= '0;
      orbit_err <= (bcid_q != 12'(BC_PER_ORBIT - 1));
    end else begin
      bcid_q    <= (bcid_q == 12'(BC_PER_ORBIT - 1)) ? '0 : bcid_q + 12'd1;
      orbit_err <= 1'b0;
    end
  end

endmodule
