// clk_parity_dec -- recovers the parity bit and the BC phase from the
// forwarded clock line of a 160 Mb/s backplane link.
//
// In the 160 Mb/s modes the 25th backplane line carries a clock that rises
// once per bunch crossing; the length of its high phase encodes the odd
// parity bit of that BC (short high phase = 0, long high phase = 1, as drawn
// in the specification's clock/parity figure).  An 80 MHz clock recovered
// from this line (in a clock manager outside this block) has two rising
// edges per BC.  Sampling the line at the edge in the middle of the BC gives
// the parity directly: the line is already low for parity 0 and still high
// for parity 1.  At the edge that opens a BC the line is always high.
//
// The block keeps a phase bit telling which of the two edges it is at.  If
// the line is seen low at an edge the block took for a BC start, that edge
// was in fact a mid-BC edge: the sample is used as the parity and the phase
// is corrected (self alignment, this design's choice).  With a parity that is
// always 1 the two edges cannot be told apart, but then both samples read 1
// and the decoded parity is still right.
//
// Interface (clk = recovered 80 MHz clock):
//   bc_start  high during the cycle whose rising edge opens a BC
//   parity_q  parity of the current BC, valid from the cycle after the
//             mid-BC edge until the next mid-BC edge
//   realign   one-cycle pulse when the phase was corrected
module clk_parity_dec (
  input  logic clk,
  input  logic rst_n,
  input  logic clkpar_in,
  output logic bc_start,
  output logic mid_bc,
  output logic parity_q,
  output logic realign
);

  logic phase_q;   // 0: current edge opens a BC, 1: current edge is mid-BC

  assign bc_start = (phase_q == 1'b0);
  assign mid_bc   = (phase_q == 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q  <= 1'b0;
      parity_q <= 1'b0;
      realign  <= 1'b0;
    end else begin
      realign <= 1'b0;
      if (phase_q) begin
        parity_q <= clkpar_in;
        phase_q  <= 1'b0;
      end else if (!clkpar_in) begin
        // Low at a supposed BC start: this is the mid-BC edge, parity 0.
        parity_q <= 1'b0;
        phase_q  <= 1'b0;
        realign  <= 1'b1;
      end else begin
        phase_q <= 1'b1;
      end
    end
  end

endmodule
