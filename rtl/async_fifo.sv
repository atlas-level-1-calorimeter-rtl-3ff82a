// async_fifo -- dual-clock FIFO with Gray-coded pointers.
//
// Carries the readout words from the 40.08 MHz bunch-crossing clock to the
// 40.00 MHz clock of the readout links, which run at the original G-link
// frequency for backward compatibility.  The two clocks are unrelated, so
// each side keeps a binary pointer with one extra wrap bit, passes its Gray
// code to the other side through two flip-flops, and compares there:
//   empty  read Gray pointer equals the synchronised write Gray pointer
//   full   write Gray pointer equals the synchronised read pointer with its
//          two top bits inverted
// Both flags are pessimistic (they clear two clocks late), never wrong.
//
// Interface: 'we' writes 'wdata' unless full (a write while full is
// dropped; the writer must watch 'full').  'rdata' shows the oldest word
// whenever 'empty' is low (first-word fall-through); 're' pops it.  Each
// side has its own asynchronous active-low reset, and both must be applied
// together.  The structure is a common textbook design, not taken from the
// specification, which only names the two clock frequencies.
module async_fifo #(
  parameter int W  = 20,
  parameter int AW = 4       // depth 2**AW words
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         re,
  output logic [W-1:0] rdata,
  output logic         empty
);

  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer seen by the read side
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------------------------------------------------- write side
  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n = wbin + (AW+1)'(we && !full);

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---------------------------------------------------------- read side
  assign empty  = (rgray == wgray_r2);
  assign rbin_n = rbin + (AW+1)'(re && !empty);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
