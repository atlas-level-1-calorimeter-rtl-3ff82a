// glink_mux -- 24-bit to 8-bit multiplexer between the G-link encoder and
// the transceiver.
//
// The encoder delivers one 24-bit frame per 25 ns BC; the transceiver takes
// 8 bits per cycle of a 120 MHz clock and serializes them at 960 Mb/s.  This
// block sends the three bytes of each frame in turn, as in the
// specification's G-link emulation diagram.  Sending the most significant
// byte first, and the 120 MHz clock being phase-aligned with the BC clock so
// that its first edge in each BC is the one after which 'frame' has changed,
// are this design's assumptions.  A free-running modulo-3 counter, cleared
// by reset, keeps track of the byte.
//
// Timing: byte_q shows frame[23:16], [15:8], [7:0] in three consecutive
// 120 MHz cycles; the frame is taken at the edge where the counter is 0.
module glink_mux
  import cmx_pkg::*;
(
  input  logic                     clk120,
  input  logic                     rst_n,
  input  logic [GLINK_FRAME_W-1:0] frame,
  output logic [7:0]               byte_q,
  output logic [1:0]               phase_q
);

  logic [15:0] rest_q;

  always_ff @(posedge clk120 or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= '0;
      byte_q  <= '0;
      rest_q  <= '0;
    end else begin
      unique case (phase_q)
        2'd0: begin
          byte_q  <= frame[23:16];
          rest_q  <= frame[15:0];
          phase_q <= 2'd1;
        end
        2'd1: begin
          byte_q  <= rest_q[15:8];
          phase_q <= 2'd2;
        end
        default: begin
          byte_q  <= rest_q[7:0];
          phase_q <= 2'd0;
        end
      endcase
    end
  end

endmodule
