// roi_multiplicity -- hit multiplicities of one module from its RoIs.
//
// In the upgrade formats a processor module no longer sends hit counts but
// RoIs with threshold bits.  To keep feeding the multiplicity triggers, the
// CMX counts for each threshold how many of the module's RoIs passed it.
// As the specification notes, such counts saturate at the number of RoIs per
// module (5 per CPM, 4 per JEM) rather than at 7.  The output uses the
// legacy layout, threshold t in bits [MULT_W*t +: MULT_W], so it can enter
// the same merger as the backward compatible data.
//
// Purely combinational.
module roi_multiplicity
  import cmx_pkg::*;
#(
  parameter int N_ROI = 5
) (
  input  roi_t                    roi [N_ROI],
  output logic [N_THR*MULT_W-1:0] mult
);

  always_comb begin
    for (int t = 0; t < N_THR; t++) begin
      logic [MULT_W-1:0] c;
      c = '0;
      for (int r = 0; r < N_ROI; r++)
        if (roi[r].valid && roi[r].thr[t] && c != MULT_W'(MULT_MAX))
          c = c + 1'b1;
      mult[MULT_W*t +: MULT_W] = c;
    end
  end

endmodule
