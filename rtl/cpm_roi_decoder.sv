// cpm_roi_decoder -- unpacks the 96-bit CPM backplane word of the upgrade
// data formats into up to five RoIs.
//
// The specification proposes two layouts for the four 24-bit words a
// Cluster Processor Module sends per BC, both carrying 16 presence bits
// (P1L, P1R ... P8L, P8R), five 8-bit threshold fields and five cluster ET
// fields:
//   fmt = 0: 0.2 x 0.2 precision, 8-bit ET per RoI
//   fmt = 1: 0.1 x 0.1 precision, 6-bit ET + 2-bit fine position per RoI
// Word 0: P1L..P8R (16) | THR1 (8)
// Word 1: ET1 (8) | ET2 (8) | THR2 (8)
// Word 2: ET3 (8) | ET4 (8) | THR3 (8)
// Word 3: ET5 (8) | THR4 (8) | THR5 (8)
// In fmt 1 each 8-bit ET field is {ET[5:0], FP[1:0]}.  The field order is
// the specification's.  This design takes the leftmost field as the most
// significant bits, word 0 as bits [95:72], and assigns RoI k to the k-th
// set presence bit counted from P1L.  Presence bits beyond the fifth have
// no RoI data; they raise 'excess'.
//
// Purely combinational.
module cpm_roi_decoder
  import cmx_pkg::*;
(
  input  logic [PROC_W-1:0] word,
  input  logic              fmt,
  output roi_t              roi [CPM_ROIS],
  output logic              excess
);

  logic [15:0] pres;
  logic [7:0]  thr_f [CPM_ROIS];
  logic [7:0]  et_f  [CPM_ROIS];

  assign pres     = word[95:80];
  assign thr_f[0] = word[79:72];
  assign et_f[0]  = word[71:64];
  assign et_f[1]  = word[63:56];
  assign thr_f[1] = word[55:48];
  assign et_f[2]  = word[47:40];
  assign et_f[3]  = word[39:32];
  assign thr_f[2] = word[31:24];
  assign et_f[4]  = word[23:16];
  assign thr_f[3] = word[15:8];
  assign thr_f[4] = word[7:0];

  always_comb begin
    int k;
    k = 0;
    excess = 1'b0;
    for (int r = 0; r < CPM_ROIS; r++) begin
      roi[r] = '0;
      roi[r].thr  = thr_f[r];
      roi[r].et   = fmt ? {6'b0, et_f[r][7:2]} : {4'b0, et_f[r]};
      roi[r].fine = fmt ? et_f[r][1:0] : 2'b00;
    end
    // presence bit 15 is P1L (leftmost column)
    for (int p = 0; p < 16; p++) begin
      if (pres[15-p]) begin
        if (k < CPM_ROIS) begin
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
