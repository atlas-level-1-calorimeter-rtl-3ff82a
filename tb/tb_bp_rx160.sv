// tb_bp_rx160 -- self-checking test of the 160 Mb/s DDR backplane receiver.
// The testbench plays a processor module: four 24-bit words per BC, one on
// each edge of the 80 MHz clock, and the clock/parity line rising just
// before each BC and falling a quarter (parity 0) or three quarters (parity
// 1) of a BC later.  Some BCs carry a wrong parity.  Checks the assembled
// 96-bit word and the parity flag at the start of the next BC (latency one
// BC), the error counter and that the phase was realigned once.
module tb_bp_rx160;
  import cmx_pkg::*;
  localparam int NBC = 300;
  logic clk80 = 0, rst_n = 0, clr = 0;
  logic [BP_W-1:0] d_in = '0;
  logic line = 0;
  logic [PROC_W-1:0] word_q;
  logic perr_q, valid_q;
  logic [15:0] err_cnt, realign_cnt;
  int checks = 0, failures = 0;

  bp_rx160 dut (.clk80, .rst_n, .clr_err(clr), .d_in, .clkpar_in(line),
                .word_q, .perr_q, .valid_q, .err_cnt, .realign_cnt);

  always #6.25 clk80 = ~clk80;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4 * NBC) @(posedge clk80);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PROC_W-1:0] words [NBC];
  bit                bad   [NBC];

  initial begin
    for (int k = 0; k < NBC; k++) begin
      words[k] = {$urandom, $urandom, $urandom};
      bad[k]   = (k > 2) && ($urandom_range(0, 4) == 0);
      if (k < 2) words[k] = 96'h1;        // parity 0 while aligning
    end
    #20 rst_n = 1;
  end

  // driver: BC k opens at t0 = 43.75 + 25k
  initial begin
    logic p;
    #40.625;
    for (int k = 0; k < NBC; k++) begin
      p = (~^words[k]) ^ bad[k];
      d_in = words[k][95:72];
      #2.125 line = 1;
      #4.125 d_in = words[k][71:48];
      if (!p) line = 0;
      #6.25  d_in = words[k][47:24];
      #6.25  d_in = words[k][23:0];
      if (p) line = 0;
      #6.25;
    end
  end

  // checker: just after the edge that opens BC k+1
  initial begin
    int nerr;
    nerr = 0;
    #(43.75 + 25.0 + 1.0);
    for (int k = 0; k < NBC - 1; k++) begin
      if (k >= 1) begin
        check(valid_q, $sformatf("valid BC %0d", k));
        check(word_q == words[k], $sformatf("word BC %0d: %h vs %h", k, word_q, words[k]));
        check(perr_q == bad[k], $sformatf("parity flag BC %0d", k));
      end
      if (k == 1) nerr = int'(err_cnt);
      else if (k > 1 && bad[k]) nerr++;
      if (k > 1) check(err_cnt == 16'(nerr), $sformatf("err_cnt %0d vs %0d", err_cnt, nerr));
      #25;
    end
    check(realign_cnt == 16'd1, $sformatf("realign count %0d", realign_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
