// bp_rx160 -- 160 Mb/s DDR backplane receiver for one processor module.
//
// In the test, upgrade and standalone modes a processor module sends four
// 24-bit words per bunch crossing on 24 lines, one word on each edge of an
// 80 MHz forwarded clock (double data rate), so 96 bits per BC.  The 25th
// line carries the clock with the BC's odd parity bit encoded in its duty
// cycle; clk_parity_dec recovers the parity and the BC phase.  This block
// captures the data on both edges of the recovered 80 MHz clock (the FPGA's
// DDR input registers), assembles the four words and checks the parity over
// the 96 bits, as the specification describes.  That one parity bit covers
// all 96 bits of the BC, and the word order (first word in the most
// significant bits) are this design's reading.
//
// Timing, with t0 the rising clock edge that opens BC n:
//   word 0 is taken at t0, word 1 at the falling edge after it, word 2 at
//   the mid-BC rising edge, word 3 at the falling edge before BC n+1.
//   word_q/perr_q/valid_q change at the rising edge that opens BC n+1 and
//   stay stable for the whole BC (two clock cycles), so logic on the 40 MHz
//   BC clock, phase-aligned with the recovered clock (input delays set by a
//   delay scan), samples them at the start of BC n+2.
module bp_rx160
  import cmx_pkg::*;
(
  input  logic              clk80,     // recovered forwarded clock
  input  logic              rst_n,
  input  logic              clr_err,
  input  logic [BP_W-1:0]   d_in,      // DDR data lines
  input  logic              clkpar_in, // clock/parity line
  output logic [PROC_W-1:0] word_q,    // {word0, word1, word2, word3}
  output logic              perr_q,
  output logic              valid_q,   // a full BC has been assembled
  output logic [15:0]       err_cnt,
  output logic [15:0]       realign_cnt
);

  logic bc_start, mid_bc, parity, realign;

  clk_parity_dec u_dec (
    .clk       (clk80),
    .rst_n     (rst_n),
    .clkpar_in (clkpar_in),
    .bc_start  (bc_start),
    .mid_bc    (mid_bc),
    .parity_q  (parity),
    .realign   (realign)
  );

  logic [BP_W-1:0] neg_q;            // falling-edge capture register
  logic [BP_W-1:0] w0_q, w1_q, w2_q;
  logic            have_w0;
  logic [PROC_W-1:0] assembled;
  logic            perr_now;

  always_ff @(negedge clk80 or negedge rst_n) begin
    if (!rst_n) neg_q <= '0;
    else        neg_q <= d_in;
  end

  assign assembled = {w0_q, w1_q, w2_q, neg_q};
  assign perr_now  = ((^assembled) ^ parity) == 1'b0;   // odd parity over 97 bits

  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) begin
      w0_q <= '0; w1_q <= '0; w2_q <= '0;
      have_w0 <= 1'b0;
      word_q <= '0; perr_q <= 1'b0; valid_q <= 1'b0;
      err_cnt <= '0; realign_cnt <= '0;
    end else begin
      if (bc_start) begin
        w0_q    <= d_in;
        have_w0 <= 1'b1;
        word_q  <= assembled;
        valid_q <= have_w0;
        perr_q  <= have_w0 && perr_now;
        if (clr_err)
          err_cnt <= '0;
        else if (have_w0 && perr_now && err_cnt != 16'hFFFF)
          err_cnt <= err_cnt + 16'd1;
      end else if (mid_bc) begin
        w1_q <= neg_q;
        w2_q <= d_in;
      end
      if (clr_err)
        realign_cnt <= '0;
      else if (realign && realign_cnt != 16'hFFFF)
        realign_cnt <= realign_cnt + 16'd1;
    end
  end

endmodule
