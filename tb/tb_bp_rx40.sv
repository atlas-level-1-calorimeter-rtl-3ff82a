// tb_bp_rx40 -- self-checking test of the 40 Mb/s backplane receiver.
// Drives random words with good and bad odd parity, checks the registered
// data, the parity error flag one BC later and the error counter, the
// enable and the counter clear.
module tb_bp_rx40;
  import cmx_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [BP_W:0] bp_in = {1'b1, 24'h000000};
  logic [BP_W-1:0] data_q;
  logic perr_q;
  logic [15:0] err_cnt;
  int checks = 0, failures = 0;

  bp_rx40 dut (.clk, .rst_n, .en, .clr_err(clr), .bp_in, .data_q, .perr_q, .err_cnt);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nerr;
    logic [BP_W-1:0] d;
    logic bad;
    nerr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1; en = 1;
    for (int n = 0; n < 400; n++) begin
      d   = BP_W'($urandom);
      bad = ($urandom_range(0, 3) == 0);
      @(negedge clk);
      bp_in = {odd_par24(d) ^ bad, d};
      @(posedge clk); #1;
      check(data_q == d, $sformatf("data %h vs %h", data_q, d));
      check(perr_q == bad, "parity flag");
      if (bad) nerr++;
      check(err_cnt == 16'(nerr), $sformatf("err_cnt %0d vs %0d", err_cnt, nerr));
    end
    // disabled: data zero, no errors counted
    @(negedge clk); en = 0; bp_in = {1'b0, 24'h000001};  // bad parity
    @(posedge clk); #1;
    check(data_q == '0 && !perr_q && err_cnt == 16'(nerr), "disabled");
    // clear
    @(negedge clk); clr = 1; @(posedge clk); #1; clr = 0;
    check(err_cnt == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
