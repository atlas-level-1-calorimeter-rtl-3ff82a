// tp_link_mapper -- places data on the optical links to the Topological
// Processor (or to other CMX modules) and replicates it.
//
// The full backplane payload of 16 modules, 16 x 96 = 1536 bits per BC
// (61.44 Gb/s), fits 12 links of 6.4 Gb/s with 8b/10b coding, 128 payload
// bits per link per BC.  With RoI reduction in the CMX, the RoI list needs
// about half the links (6 by default, 4 RoI words each).  The transmitters
// left over can carry copies of the same data to several TP slices or CMX
// modules.  These figures are the specification's; the bit placement and the
// per-transmitter source select are this design's:
//   raw:       link k carries bits [128k +: 128] of {raw[N-1], ..., raw[0]}
//   processed: link k < 6 carries {slot[4k+3], ..., slot[4k]}, links 6..11 zero
//   transmitter i sends logical link sel[i] when sel[i] < 12, else is off.
// Mode: CMM emulation uses no links; test mode sends raw data; upgrade mode
// sends raw or processed data as 'proc_en' says; standalone sends processed
// data.  The serializers (FPGA transceivers) are outside this block.
//
// Timing: one register stage (1 BC).
module tp_link_mapper
  import cmx_pkg::*;
#(
  parameter int N_PROC = 16,
  parameter int N_TX   = 66,
  parameter int N_SLOTS = N_LINK_PROC * ROIS_PER_LINK
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  cmx_mode_e                     mode,
  input  logic                          proc_en,
  input  logic [N_PROC-1:0][PROC_W-1:0] raw,
  input  logic [N_SLOTS-1:0][ROI_W-1:0] slot,
  input  logic [N_TX-1:0][3:0]          sel,
  output logic [N_TX-1:0][LINK_W-1:0]   tx_data_q,
  output logic [N_TX-1:0]               tx_en_q
);

  localparam int RAW_PAD = N_LINK_RAW * LINK_W;

  logic [RAW_PAD-1:0] raw_flat;
  logic [N_LINK_RAW-1:0][LINK_W-1:0] link;
  logic use_raw, links_on;

  assign use_raw  = (mode == MODE_TEST) || (mode == MODE_UPGRADE && !proc_en);
  assign links_on = (mode != MODE_CMM_E);

  always_comb begin
    raw_flat = '0;
    for (int p = 0; p < N_PROC; p++)
      if ((p + 1) * PROC_W <= RAW_PAD)
        raw_flat[p*PROC_W +: PROC_W] = raw[p];
    for (int k = 0; k < N_LINK_RAW; k++) begin
      link[k] = '0;
      if (use_raw)
        link[k] = raw_flat[k*LINK_W +: LINK_W];
      else
        for (int w = 0; w < ROIS_PER_LINK; w++)
          if (k * ROIS_PER_LINK + w < N_SLOTS)
            link[k][w*ROI_W +: ROI_W] = slot[k*ROIS_PER_LINK + w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TX; i++) begin
        tx_data_q[i] <= '0;
        tx_en_q[i]   <= 1'b0;
      end
    end else begin
      for (int i = 0; i < N_TX; i++) begin
        if (links_on && sel[i] < 4'(N_LINK_RAW)) begin
          tx_data_q[i] <= link[sel[i]];
          tx_en_q[i]   <= 1'b1;
        end else begin
          tx_data_q[i] <= '0;
          tx_en_q[i]   <= 1'b0;
        end
      end
    end
  end

endmodule
