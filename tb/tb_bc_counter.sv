// tb_bc_counter -- self-checking test of the BC counter: counts through two
// orbits with BCR at the right place, wraps at 3564 without BCR, and flags a
// BCR that comes early.
module tb_bc_counter;
  logic clk = 0, rst_n = 0, bcr = 0;
  logic [11:0] bcid_q;
  logic orbit_err;
  int checks = 0, failures = 0;

  bc_counter dut (.clk, .rst_n, .bcr, .bcid_q, .orbit_err);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp = 1;   // one edge passes between reset release and the loop
    for (int n = 1; n < 3 * 3564 + 500; n++) begin
      @(negedge clk);
      // BCR at the last BC of the first orbit, early BCR in the third orbit
      bcr = (n == 3564 - 1) || (n == 2 * 3564 + 100);
      @(posedge clk); #1;
      if (bcr) begin
        check(orbit_err == (n != 3564 - 1), "orbit error flag");
        exp = 0;
      end else begin
        exp = (exp + 1) % 3564;
        check(!orbit_err, "no orbit error");
      end
      check(int'(bcid_q) == exp, $sformatf("bcid %0d vs %0d", bcid_q, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
