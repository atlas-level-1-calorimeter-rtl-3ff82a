// tb_clk_parity_dec -- checks parity recovery from the duty cycle of the
// forwarded clock line and the self alignment of the BC phase.
// The line rises just before the edge that opens each BC and falls a
// quarter (parity 0) or three quarters (parity 1) of a BC later; the
// decoder is started on the wrong phase so that it must realign.
module tb_clk_parity_dec;
  logic clk = 0, rst_n = 0, line = 0;
  logic bc_start, mid_bc, parity_q, realign;
  int checks = 0, failures = 0, realigns = 0;

  clk_parity_dec dut (.clk, .rst_n, .clkpar_in(line), .bc_start, .mid_bc, .parity_q, .realign);

  // 80 MHz: period 12.5 ns -> use 10 time units per half period (ns/1.25)
  always #10 clk = ~clk;

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

  always @(posedge clk) if (rst_n && realign) realigns++;

  initial begin
    bit par [400];
    for (int i = 0; i < 400; i++) par[i] = ($urandom_range(0, 1) == 1);
    par[0] = 0; par[1] = 0;
    // BC k opens at the posedge at time 40k+10 (after one extra cycle) so the
    // decoder, released at a BC start, starts on the wrong phase.
    #1; rst_n = 0;
    @(posedge clk); #2 rst_n = 1;     // released after edge at t=10
    fork
      begin : drive
        for (int k = 0; k < 400; k++) begin
          // BC k opens at time 50 + 40k  (posedge at 50, 90, ...: 50 = 10+40)
          #((k == 0) ? 36 : 0);        // now t = 48 for k = 0
          line = 1;
          #(par[k] ? 32 : 12);
          line = 0;
          #(par[k] ? 8 : 28);
        end
      end
      begin : watch
        // after alignment, check parity at every BC start edge
        int bc;
        bc = 0;
        @(posedge clk);                // t = 30, mid of a pre-BC (line low)
        while (bc < 399) begin
          @(posedge clk);
          if ($time >= 50 + 40 * (bc + 1) - 1) begin
            // this edge opens BC bc+1: parity of BC bc must be visible
            #1;
            if (bc >= 3) begin
              check(mid_bc, $sformatf("phase after BC start at %0t", $time));
              check(parity_q == par[bc], $sformatf("parity BC %0d", bc));
            end
            bc++;
          end
        end
      end
    join
    check(realigns >= 1, "decoder realigned at least once");
    $display("realigns=%0d", realigns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
