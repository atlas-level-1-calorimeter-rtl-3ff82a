// tb_lvds_cable_port -- self-checking test of the LVDS cable port.
// A driving port (crate side) is wired to a receiving port (system side);
// words pass with one BC latency on each side and arrive with good parity.
// Then corrupted words are injected at the receiver, and an input-only port
// (port 3) is checked never to drive.
module tb_lvds_cable_port;
  import cmx_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [BP_W-1:0] tx_data;
  logic [BP_W:0] pad_a, pad_b_in, pad_c_out, pad_c_in, pad_unused;
  logic oe_a, oe_b, oe_c;
  logic [BP_W-1:0] rx_a, rx_b, rx_c;
  logic perr_a, perr_b, perr_c;
  logic [15:0] cnt_a, cnt_b, cnt_c;
  logic inject;
  logic [BP_W:0] flip;
  int checks = 0, failures = 0;

  // port A drives, port B receives what A sends (possibly corrupted)
  lvds_cable_port #(.CAN_DRIVE(1'b1)) u_a (.clk, .rst_n, .dir_out(1'b1), .clr_err(clr),
    .tx_data, .pad_out(pad_a), .pad_oe(oe_a), .pad_in('0), .rx_data(rx_a), .rx_perr(perr_a), .err_cnt(cnt_a));
  assign pad_b_in = inject ? (pad_a ^ flip) : pad_a;
  lvds_cable_port #(.CAN_DRIVE(1'b1)) u_b (.clk, .rst_n, .dir_out(1'b0), .clr_err(clr),
    .tx_data('0), .pad_out(pad_unused), .pad_oe(oe_b), .pad_in(pad_b_in), .rx_data(rx_b), .rx_perr(perr_b), .err_cnt(cnt_b));
  // input-only port asked to drive
  lvds_cable_port #(.CAN_DRIVE(1'b0)) u_c (.clk, .rst_n, .dir_out(1'b1), .clr_err(clr),
    .tx_data, .pad_out(pad_c_out), .pad_oe(oe_c), .pad_in(pad_c_in), .rx_data(rx_c), .rx_perr(perr_c), .err_cnt(cnt_c));

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
    logic [BP_W-1:0] hist [4];
    int nerr;
    nerr = 0;
    tx_data = '0; inject = 0; flip = '0; pad_c_in = {1'b1, 24'h0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      tx_data = BP_W'($urandom);
      inject  = (n > 5) && ($urandom_range(0, 4) == 0);
      flip    = (BP_W + 1)'(1) << $urandom_range(0, BP_W);
      pad_c_in = {odd_par24(tx_data), tx_data};
      // A's output now shows the word of the previous cycle
      @(posedge clk); #1;
      hist[n % 4] = tx_data;
      check(oe_a && !oe_b && !oe_c, "output enables");
      check(pad_a == {odd_par24(tx_data), tx_data}, "A drives word with odd parity");
      check(pad_c_out == '0, "input-only port drives nothing");
      check(rx_c == tx_data && !perr_c, "input-only port receives");
      // B sampled A's previous word, corrupted when inject was set this cycle
      if (n >= 2)
        check(rx_b == (hist[(n + 3) % 4] ^ (inject ? flip[BP_W-1:0] : '0)),
              $sformatf("B receives n=%0d", n));
      if (n >= 1) begin
        check(perr_b == inject, $sformatf("B parity flag n=%0d", n));
        if (n == 1) nerr = int'(cnt_b);   // includes the reset word
        else if (inject) nerr++;
        check(cnt_b == 16'(nerr), "B error count");
      end
    end
    check(nerr > 5, "errors were injected");
    @(negedge clk) clr = 1; @(posedge clk); #1 clr = 0;
    check(cnt_b == 0, "counter clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
