// tb_roi_list_builder -- self-checking test of the zero-suppressed RoI list.
// Random RoIs for 16 modules at low, medium and high occupancy (the last
// overflows the 24 slots); the testbench builds the expected list of words
// field by field and checks slots, count and overflow flag one clock later.
module tb_roi_list_builder;
  import cmx_pkg::*;
  localparam int NM = 16, NR = 5, NS = 24;
  logic clk = 0, rst_n = 0;
  roi_t roi [NM][NR];
  logic [NM-1:0] mod_err;
  logic [NS-1:0][31:0] slot_q;
  logic [7:0] count_q;
  logic overflow_q;
  int checks = 0, failures = 0, novf = 0, nempty = 0;

  roi_list_builder #(.N_MOD(NM), .N_ROI(NR), .N_SLOTS(NS)) dut (
    .clk, .rst_n, .roi, .mod_err, .slot_q, .count_q, .overflow_q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_w [NS];
    int n, occ;
    for (int m = 0; m < NM; m++) for (int r = 0; r < NR; r++) roi[m][r] = '0;
    mod_err = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 1500; it++) begin
      @(negedge clk);
      occ = (it % 3 == 0) ? 5 : (it % 3 == 1) ? 25 : 70;   // percent
      for (int m = 0; m < NM; m++)
        for (int r = 0; r < NR; r++) begin
          roi[m][r] = roi_t'({$urandom, $urandom});
          roi[m][r].valid = ($urandom_range(0, 99) < occ);
          if ($urandom_range(0, 9) == 0) roi[m][r].thr = 8'h00;   // zero RoI
        end
      mod_err = ($urandom_range(0, 3) == 0) ? NM'(1) << $urandom_range(0, NM-1) : '0;
      for (int s = 0; s < NS; s++) exp_w[s] = 32'h0;
      n = 0;
      for (int m = 0; m < NM; m++)
        for (int r = 0; r < NR; r++)
          if (roi[m][r].valid && roi[m][r].thr != 0) begin
            if (n < NS) begin
              exp_w[n][31]    = mod_err[m];
              exp_w[n][30]    = 1'b0;
              exp_w[n][29:26] = 4'(m);
              exp_w[n][25:22] = roi[m][r].loc;
              exp_w[n][21:20] = roi[m][r].fine;
              exp_w[n][19:12] = roi[m][r].thr;
              exp_w[n][11:0]  = roi[m][r].et;
            end
            n++;
          end
      if (n > NS) begin exp_w[NS-1][31] = 1'b1; novf++; end
      if (n < NS) nempty++;
      @(posedge clk); #1;
      check(count_q == 8'(n), $sformatf("count %0d vs %0d", count_q, n));
      check(overflow_q == (n > NS), "overflow flag");
      for (int s = 0; s < NS; s++)
        check(slot_q[s] == exp_w[s], $sformatf("it %0d slot %0d: %h vs %h", it, s, slot_q[s], exp_w[s]));
    end
    check(novf > 0 && nempty > 0, "both overflow and partly filled lists seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
