// tb_hit_sum -- self-checking test of the saturating multiplicity merger
// with 16 inputs of 8 x 3-bit counts.  Random counts (many small, some
// large so that sums saturate) and random masks; the expected sums are
// computed per threshold in the testbench and compared one clock later.
module tb_hit_sum;
  localparam int N_IN = 16, N_THR = 8, MB = 3;
  logic clk = 0, rst_n = 0;
  logic [N_IN-1:0] mask;
  logic [N_IN-1:0][N_THR*MB-1:0] mult_in;
  logic [N_THR*MB-1:0] sum_q;
  logic [N_THR-1:0] sat_q;
  int checks = 0, failures = 0, nsat = 0;

  hit_sum #(.N_IN(N_IN), .N_THR(N_THR), .MBITS(MB)) dut (.clk, .rst_n, .mask, .mult_in, .sum_q, .sat_q);

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
    int s;
    mask = '0; mult_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      mask = (n % 3 == 0) ? '1 : N_IN'($urandom);
      for (int i = 0; i < N_IN; i++)
        for (int t = 0; t < N_THR; t++)
          mult_in[i][MB*t +: MB] = (n % 4 == 0) ? MB'($urandom) :
                                    (($urandom_range(0, 9) == 0) ? 3'd1 : 3'd0);
      @(posedge clk); #1;
      for (int t = 0; t < N_THR; t++) begin
        s = 0;
        for (int i = 0; i < N_IN; i++)
          if (mask[i]) s += int'(mult_in[i][MB*t +: MB]);
        if (s > 7) nsat++;
        check(sum_q[MB*t +: MB] == MB'((s > 7) ? 7 : s),
              $sformatf("n=%0d thr %0d: %0d vs %0d", n, t, sum_q[MB*t +: MB], s));
        check(sat_q[t] == (s > 7), "saturation flag");
      end
    end
    check(nsat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
