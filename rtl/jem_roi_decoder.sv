// jem_roi_decoder -- unpacks the 96-bit JEM backplane word of the upgrade
// data format into up to four jet RoIs.
//
// The specification proposes one layout for the Jet/Energy Module word:
// 0.2 x 0.2 precision, eight presence bits P1..P8, a 2-bit fine position
// per RoI, four 8-bit threshold fields and up to 12 bits of jet ET per RoI.
// Its first 24-bit word is P1..P8 (8) | FP1..FP4 (4 x 2) | THR1 (8); each of
// the other three words ends in a threshold field (THR2, THR3, THR4).  The
// 4 x 12 = 48 ET bits fill the remaining upper 16 bits of words 1 to 3:
//   ET bits = {word1[23:8], word2[23:8], word3[23:8]} = {ET1, ET2, ET3, ET4}
// (this packing, most significant first, is this design's reading of the
// layout).  As in the CPM decoder, word 0 is bits [95:72], the leftmost
// field is the most significant, and RoI k belongs to the k-th set
// presence bit counted from P1; its fine position is field FPk.  Presence
// bits beyond the fourth raise 'excess'.
//
// Output RoIs use the common roi_t: loc is the presence-bit index 0..7,
// et carries all 12 bits.  Purely combinational.
module jem_roi_decoder
  import cmx_pkg::*;
(
  input  logic [PROC_W-1:0] word,
  output roi_t              roi [JEM_ROIS],
  output logic              excess
);

  logic [7:0]  pres;
  logic [47:0] et_bits;
  logic [7:0]  thr_f [JEM_ROIS];

  assign pres     = word[95:88];
  assign thr_f[0] = word[79:72];
  assign thr_f[1] = word[55:48];
  assign thr_f[2] = word[31:24];
  assign thr_f[3] = word[7:0];
  assign et_bits  = {word[71:56], word[47:32], word[23:8]};

  always_comb begin
    int k;
    k = 0;
    excess = 1'b0;
    for (int r = 0; r < JEM_ROIS; r++) begin
      roi[r]      = '0;
      roi[r].thr  = thr_f[r];
      roi[r].et   = et_bits[47 - 12*r -: 12];
      roi[r].fine = word[87 - 2*r -: 2];
    end
    // presence bit 7 is P1
    for (int p = 0; p < 8; p++) begin
      if (pres[7-p]) begin
        if (k < JEM_ROIS) begin
          roi[k].valid = 1'b1;
          roi[k].loc   = 4'(p);
        end else begin
          excess = 1'b1;
        end
        k = k + 1;
      end
    end
  end

endmodule
