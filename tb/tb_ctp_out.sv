// tb_ctp_out -- self-checking test of the CTP output register in 40 MHz
// and 80 MHz modes.  Two new words per BC; at 40 MHz the outputs must hold
// word A for the whole BC, at 80 MHz show A then B, each with odd parity on
// line 32.
module tb_ctp_out;
  import cmx_pkg::*;
  logic clk80 = 0, rst_n = 0, bc_start = 1, mode80 = 0;
  logic [N_CTP-1:0][CTP_W-2:0] a, b;
  logic [N_CTP-1:0][CTP_W-1:0] q;
  int checks = 0, failures = 0;

  ctp_out dut (.clk80, .rst_n, .bc_start, .mode80, .word_a(a), .word_b(b), .ctp_q(q));

  always #6.25 clk80 = ~clk80;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [CTP_W-1:0] wp(input logic [CTP_W-2:0] d);
    return {(($countones(d) % 2) == 0), d};
  endfunction

  initial begin
    repeat (5000) @(posedge clk80);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk80);
    @(negedge clk80) rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      mode80 = (n >= 300);
      // first half of the BC
      @(negedge clk80);
      bc_start = 1;
      for (int c = 0; c < N_CTP; c++) begin a[c] = $urandom; b[c] = $urandom; end
      @(posedge clk80); #1;
      for (int c = 0; c < N_CTP; c++) check(q[c] == wp(a[c]), "first half shows A");
      @(negedge clk80) bc_start = 0;
      @(posedge clk80); #1;
      for (int c = 0; c < N_CTP; c++)
        check(q[c] == (mode80 ? wp(b[c]) : wp(a[c])), $sformatf("second half n=%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
