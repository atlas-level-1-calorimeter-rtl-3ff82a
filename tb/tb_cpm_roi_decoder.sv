// tb_cpm_roi_decoder -- self-checking test of the CPM backplane format
// decoder.  The testbench packs random RoI fields into the 96-bit word
// following the field order of the format tables (presence bits, then
// thresholds and ET fields row by row) in both formats, with 0 to 8
// presence bits set, and checks each decoded RoI and the excess flag.
module tb_cpm_roi_decoder;
  import cmx_pkg::*;
  logic [PROC_W-1:0] word;
  logic fmt;
  roi_t roi [CPM_ROIS];
  logic excess;
  int checks = 0, failures = 0, nexcess = 0;

  cpm_roi_decoder dut (.word, .fmt, .roi, .excess);

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
    logic [15:0] pres;
    logic [7:0] thr [5], et [5];
    int pos [16];
    int np, want;
    for (int n = 0; n < 3000; n++) begin
      // choose how many presence bits, then which
      want = $urandom_range(0, 8);
      pres = '0;
      while ($countones(pres) < want) pres[$urandom_range(0, 15)] = 1'b1;
      for (int r = 0; r < 5; r++) begin thr[r] = 8'($urandom); et[r] = 8'($urandom); end
      fmt  = n[0];
      word = {pres, thr[0], et[0], et[1], thr[1], et[2], et[3], thr[2], et[4], thr[3], thr[4]};
      #1;
      np = 0;
      for (int p = 0; p < 16; p++) if (pres[15 - p]) begin pos[np] = p; np++; end
      check(excess == (np > 5), "excess flag");
      if (np > 5) nexcess++;
      for (int r = 0; r < 5; r++) begin
        check(roi[r].valid == (r < np), $sformatf("valid %0d", r));
        check(roi[r].thr == thr[r], $sformatf("thr %0d", r));
        if (fmt) begin
          check(roi[r].et == {2'b0, et[r][7:2]} && roi[r].fine == et[r][1:0], "6-bit ET + fine");
        end else begin
          check(roi[r].et == et[r] && roi[r].fine == 2'b0, "8-bit ET");
        end
        if (r < np) check(roi[r].loc == 4'(pos[r]), $sformatf("loc %0d", r));
      end
      #9;
    end
    check(nexcess > 0, "excess case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
