// tb_glink_mux -- self-checking test of the 24-bit to 8-bit multiplexer.
// A new random 24-bit frame every three 120 MHz cycles (one BC); the bytes
// must follow, most significant first, in the three cycles after the frame
// is taken.
module tb_glink_mux;
  logic clk = 0, rst_n = 0;
  logic [23:0] frame = '0;
  logic [7:0] byte_q;
  logic [1:0] phase_q;
  int checks = 0, failures = 0;

  glink_mux dut (.clk120(clk), .rst_n, .frame, .byte_q, .phase_q);

  always #4.1667 clk = ~clk;

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
    logic [23:0] f;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      f = 24'($urandom);
      frame = f;
      @(posedge clk); #1;
      check(byte_q == f[23:16], $sformatf("byte 0 of frame %0d", n));
      @(negedge clk) frame = 24'($urandom);   // frame may change after it is taken
      @(posedge clk); #1;
      check(byte_q == f[15:8], "byte 1");
      @(posedge clk); #1;
      check(byte_q == f[7:0], "byte 2");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
