// tb_jem_roi_decoder -- self-checking test of the JEM word decoder.
// Builds random JEM words from independently chosen RoIs (presence bits,
// fine positions, thresholds, 12-bit ET), packs them field by field into
// the 96-bit layout and checks every decoded RoI, including words with
// more than four presence bits, which must raise 'excess'.
module tb_jem_roi_decoder;
  import cmx_pkg::*;
  logic [PROC_W-1:0] word;
  roi_t roi [JEM_ROIS];
  logic excess;
  int checks = 0, failures = 0, nexc = 0;

  jem_roi_decoder dut (.word, .roi, .excess);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (word %h)", what, word);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  pres, thr [4];
    logic [1:0]  fp [4];
    logic [11:0] et [4];
    int pos [8], np;
    for (int it = 0; it < 20000; it++) begin
      pres = 8'($urandom);
      if (it % 3 == 0) pres = pres & 8'($urandom);   // fewer RoIs
      for (int r = 0; r < 4; r++) begin
        thr[r] = 8'($urandom); fp[r] = 2'($urandom); et[r] = 12'($urandom);
      end
      word = {pres, fp[0], fp[1], fp[2], fp[3], thr[0],
              et[0], et[1][11:8], thr[1],
              et[1][7:0], et[2][11:4], thr[2],
              et[2][3:0], et[3], thr[3]};
      np = 0;
      for (int p = 0; p < 8; p++) if (pres[7 - p]) begin pos[np] = p; np++; end
      #1;
      for (int r = 0; r < 4; r++) begin
        check(roi[r].valid == (r < np), "valid");
        check(roi[r].thr == thr[r] && roi[r].et == et[r] && roi[r].fine == fp[r], "fields");
        if (r < np) check(roi[r].loc == 4'(pos[r]), "location");
      end
      check(excess == (np > 4), "excess");
      if (np > 4) nexc++;
    end
    check(nexc > 0, "excess words tested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
