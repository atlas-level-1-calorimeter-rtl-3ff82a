// tb_roi_multiplicity -- self-checking test of the RoI-based hit counts.
// Random RoIs (some invalid) with random threshold bits; the expected count
// per threshold is the number of valid RoIs with that bit set.  Also checks
// saturation at 7 with a larger RoI count (N_ROI = 9).
module tb_roi_multiplicity;
  import cmx_pkg::*;
  roi_t roi5 [5];
  roi_t roi9 [9];
  logic [N_THR*MULT_W-1:0] m5, m9;
  int checks = 0, failures = 0, nsat = 0;

  roi_multiplicity #(.N_ROI(5)) dut5 (.roi(roi5), .mult(m5));
  roi_multiplicity #(.N_ROI(9)) dut9 (.roi(roi9), .mult(m9));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c5, c9;
    for (int n = 0; n < 2000; n++) begin
      for (int r = 0; r < 5; r++) roi5[r] = roi_t'({$urandom, $urandom});
      for (int r = 0; r < 9; r++) begin
        roi9[r] = roi_t'({$urandom, $urandom});
        if (n % 2 == 0) begin roi9[r].valid = 1'b1; roi9[r].thr = 8'hFF; end
      end
      #1;
      for (int t = 0; t < N_THR; t++) begin
        c5 = 0; c9 = 0;
        for (int r = 0; r < 5; r++) if (roi5[r].valid && roi5[r].thr[t]) c5++;
        for (int r = 0; r < 9; r++) if (roi9[r].valid && roi9[r].thr[t]) c9++;
        if (c9 > 7) begin c9 = 7; nsat++; end
        check(m5[3*t +: 3] == 3'(c5), $sformatf("5-RoI count thr %0d", t));
        check(m9[3*t +: 3] == 3'(c9), $sformatf("9-RoI count thr %0d", t));
      end
      #9;
    end
    check(nsat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
