// glink_encoder -- G-link style frame encoder for the readout links.
//
// The readout to the RODs keeps the protocol of the G-link serializer chips
// used on the CMM, now built in FPGA logic in front of a transceiver: a
// 20-bit data word and a data-available flag (DAV) enter at 40 MHz and leave
// as a 24-bit frame, which a multiplexer splits into bytes for a transceiver
// running at 960 Mb/s.  Those widths and rates are the specification's.  The
// frame coding below is this design's: it follows the conditional-inversion
// idea of the G-link chips (a 4-bit control field next to the data, the
// frame inverted when that keeps the line DC balanced), but its code values
// have not been matched to the chip's, so a real G-link receiver may not
// accept it.
//   data frame  (DAV = 1): {4'b1100, D} or, inverted, {4'b0011, ~D}
//   fill frame  (DAV = 0): {4'b1010, 10'h3FF, 10'h000} (balanced, never inverted)
// A data frame is inverted when its disparity (ones minus zeros) has the
// same sign as the running disparity, so the running disparity stays within
// +/-24.  The control field always has a 1->0 or 0->1 transition in its
// middle, giving the receiver a frame marker.
//
// Timing: one register stage; frame_q follows data/dav by one clock.
module glink_encoder
  import cmx_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [GLINK_W-1:0]       data,
  input  logic                     dav,
  output logic [GLINK_FRAME_W-1:0] frame_q,
  output logic signed [7:0]        rd_q      // running disparity
);

  localparam logic [3:0] C_DATA  = 4'b1100;
  localparam logic [3:0] C_DATAN = 4'b0011;
  localparam logic [3:0] C_FILL  = 4'b1010;

  logic [GLINK_FRAME_W-1:0] plain, frame_d;
  logic signed [7:0]        disp, disp_d;
  logic                     invert;

  always_comb begin
    plain = {C_DATA, data};
    disp  = 8'sd0;
    for (int i = 0; i < GLINK_FRAME_W; i++)
      disp = plain[i] ? disp + 8'sd1 : disp - 8'sd1;
    invert = (disp != 0) && (rd_q != 0) && ((disp < 0) == (rd_q < 0));
    if (!dav) begin
      frame_d = {C_FILL, 10'h3FF, 10'h000};
      disp_d  = 8'sd0;
    end else if (invert) begin
      frame_d = {C_DATAN, ~data};
      disp_d  = -disp;
    end else begin
      frame_d = plain;
      disp_d  = disp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= {C_FILL, 10'h3FF, 10'h000};
      rd_q    <= 8'sd0;
    end else begin
      frame_q <= frame_d;
      rd_q    <= rd_q + disp_d;
    end
  end

endmodule
