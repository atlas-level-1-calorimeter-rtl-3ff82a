// tb_async_fifo -- self-checking test of the dual-clock FIFO.
// Write clock 40.08 MHz (24.95 ns), read clock 40.00 MHz (25 ns), as
// between the bunch-crossing clock and the readout links, plus a phase with
// a much slower reader.  The writer sends a counting sequence in random
// bursts while the FIFO is not full; the reader pops at random and checks
// that every word arrives once and in order.  It also checks that the FIFO
// really fills (full seen) and empties, and that nothing comes out of an
// empty FIFO.
module tb_async_fifo;
  localparam int W = 20, AW = 4;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic we = 0, re = 0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  int rperiod_half = 12500;   // ps
  logic [W-1:0] expect_q = '0;
  bit done = 0;

  always #12.475 wclk = ~wclk;
  always begin #(rperiod_half * 1ps); rclk = ~rclk; end

  async_fifo #(.W(W), .AW(AW)) dut (
    .wclk, .wrst_n(rst_n), .we, .wdata, .full,
    .rclk, .rrst_n(rst_n), .re, .rdata, .empty
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    #100 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge wclk);
      if (i == 10000) rperiod_half = 40000;           // slow reader
      we = ($urandom_range(0, 3) != 0);
      if (full) n_full++;
      @(posedge wclk);
      if (we && !full) wdata <= wdata + 1'b1;         // next word after a write
    end
    we = 0;
    repeat (200) @(posedge rclk);
    done = 1;
  end

  // reader
  always @(posedge rclk) begin
    if (rst_n) begin
      if (re && !empty) begin
        check(rdata == expect_q, $sformatf("word %h vs %h", rdata, expect_q));
        expect_q <= expect_q + 1'b1;
      end
      if (empty) n_empty++;
      re <= ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    wait (done);
    check(empty, "drained at the end");
    check(expect_q == wdata, $sformatf("all words read: %0d vs %0d", expect_q, wdata));
    check(n_full > 0, "full reached");
    check(n_empty > 0, "empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
