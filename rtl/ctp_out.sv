// ctp_out -- output register for the two CTP connectors.
//
// The CMX drives two CTP connectors of 33 lines.  In the backward compatible
// mode they carry one word per BC at 40 MHz; the CTP input module may later
// run at 80 MHz, and the CMX must then send two words per BC.  That need is
// the specification's; the line use is this design's: bits [31:0] carry the
// data and line 32 carries odd parity over them.
//
// The block runs on an 80 MHz clock phase-aligned with the 40 MHz BC clock
// (two edges per BC); the first edge of a BC is the one where bc_start is
// high.  word_a and word_b come from the 40 MHz domain and are stable for the
// whole BC.  At the first edge word_a is registered; at the second edge the
// outputs keep word_a (mode80 = 0) or switch to word_b (mode80 = 1).
// Latency: the outputs follow word_a by one 80 MHz cycle.
module ctp_out
  import cmx_pkg::*;
(
  input  logic                          clk80,
  input  logic                          rst_n,
  input  logic                          bc_start,
  input  logic                          mode80,
  input  logic [N_CTP-1:0][CTP_W-2:0]   word_a,
  input  logic [N_CTP-1:0][CTP_W-2:0]   word_b,
  output logic [N_CTP-1:0][CTP_W-1:0]   ctp_q
);

  function automatic logic [CTP_W-1:0] with_par(input logic [CTP_W-2:0] d);
    return {~(^d), d};
  endfunction

  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) begin
      ctp_q <= '0;
    end else begin
      for (int c = 0; c < N_CTP; c++) begin
        if (bc_start)
          ctp_q[c] <= with_par(word_a[c]);
        else if (mode80)
          ctp_q[c] <= with_par(word_b[c]);
      end
    end
  end

endmodule
