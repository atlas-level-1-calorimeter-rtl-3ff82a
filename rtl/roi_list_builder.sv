// roi_list_builder -- zero suppression of RoIs for the Topological Processor.
//
// Instead of sending all backplane data to the TP, the CMX can send only
// the RoIs that passed at least one threshold, each as a 32-bit word with
// its coordinates, threshold bits, additional information and a flag bit for
// error or overflow (the specification's budget).  The crate number is not
// sent, since the receiver knows which crate a fibre comes from.  Word
// layout chosen here:
//   [31]    flag: list overflow (on the last word) or a module error
//   [30:20] coordinates {1'b0, module[3:0], loc[3:0], fine[1:0]}
//   [19:12] threshold bits
//   [11:0]  additional information: the ET (8 bits for e/tau RoIs, 12
//           bits for jet RoIs)
// The RoIs are packed in module order, then RoI order, into N_SLOTS words
// (6 links x 4 words per BC by default).  An empty slot is all zeros; a sent
// word never is, because its threshold field is non-zero.  When more RoIs
// pass than there are slots, the rest are dropped and the flag is set on the
// last word.
//
// Timing: one register stage (1 BC).
module roi_list_builder
  import cmx_pkg::*;
#(
  parameter int N_MOD   = 16,
  parameter int N_ROI   = 5,
  parameter int N_SLOTS = N_LINK_PROC * ROIS_PER_LINK
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  roi_t                    roi     [N_MOD][N_ROI],
  input  logic [N_MOD-1:0]        mod_err,
  output logic [N_SLOTS-1:0][ROI_W-1:0] slot_q,
  output logic [7:0]              count_q,     // RoIs that passed (saturating)
  output logic                    overflow_q
);

  logic [N_SLOTS-1:0][ROI_W-1:0] slot_d;
  logic [7:0] count_d;
  logic       ovf_d;

  function automatic logic [ROI_W-1:0] roi_word(input roi_t r, input int m,
                                                input logic err);
    return {err, 1'b0, 4'(m), r.loc, r.fine, r.thr, r.et};
  endfunction

  always_comb begin
    int n;
    n = 0;
    slot_d = '0;
    ovf_d  = 1'b0;
    for (int m = 0; m < N_MOD; m++) begin
      for (int r = 0; r < N_ROI; r++) begin
        if (roi[m][r].valid && roi[m][r].thr != 8'h00) begin
          if (n < N_SLOTS)
            slot_d[n] = roi_word(roi[m][r], m, mod_err[m]);
          else
            ovf_d = 1'b1;
          n = n + 1;
        end
      end
    end
    if (ovf_d)
      slot_d[N_SLOTS-1][ROI_W-1] = 1'b1;
    count_d = (n > 255) ? 8'hFF : 8'(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q     <= '0;
      count_q    <= '0;
      overflow_q <= 1'b0;
    end else begin
      slot_q     <= slot_d;
      count_q    <= count_d;
      overflow_q <= ovf_d;
    end
  end

endmodule
