// bp_rx40 -- backward compatible backplane receiver for one processor module.
//
// In CMM emulation mode a processor module drives 25 backplane lines at
// 40 MHz: 24 data bits and one odd parity bit (as in the specification).
// The receiver registers the lines once per bunch crossing, checks the
// parity and keeps a saturating 16-bit count of parity errors.  The counter
// width, its clear input and the enable are this design's choices.
//
// Interface: bp_in[24] is the parity line, bp_in[23:0] the data.  data_q and
// perr_q are valid one clk cycle after the lines are sampled (latency 1 BC).
// While en is low the data output is held at zero and no errors are counted.
module bp_rx40
  import cmx_pkg::*;
(
  input  logic              clk,       // 40.08 MHz BC clock
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr_err,   // clear the error counter
  input  logic [BP_W:0]     bp_in,     // {parity, data}
  output logic [BP_W-1:0]   data_q,
  output logic              perr_q,    // parity error in this BC
  output logic [15:0]       err_cnt
);

  logic perr;
  assign perr = en && ((^bp_in) == 1'b0);   // odd parity: XOR of all 25 is 1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q  <= '0;
      perr_q  <= 1'b0;
      err_cnt <= '0;
    end else begin
      data_q <= en ? bp_in[BP_W-1:0] : '0;
      perr_q <= perr;
      if (clr_err)
        err_cnt <= '0;
      else if (perr && err_cnt != 16'hFFFF)
        err_cnt <= err_cnt + 16'd1;
    end
  end

endmodule
