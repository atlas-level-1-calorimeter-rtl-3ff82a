// tb_readout_ctrl -- self-checking test of the L1A readout.
// Random payloads every BC, tagged with a BC number; L1As at random times
// and in bursts that overfill the 4-event derandomiser.  The monitor
// collects the G-link words: each event must be a header {BCID, event
// number} followed by ceil(W/20) payload words, the payload must be the one
// presented 'latency' BCs before the L1A, event numbers must run without
// gaps, and received plus lost events must equal the L1As sent.  The
// header of the first event must appear 2 BCs after its L1A.
module tb_readout_ctrl;
  import cmx_pkg::*;
  localparam int W = 50, DEPTH = 128, ED = 4, LAT = 10;
  localparam int NW = (W + 19) / 20;
  localparam int NBC = 3000;
  logic clk = 0, rst_n = 0, l1a = 0;
  logic [W-1:0] payload;
  logic [11:0] bcid;
  logic [19:0] gl_data;
  logic gl_dav;
  logic [15:0] lost_cnt, evt_cnt;
  int checks = 0, failures = 0;
  int n_l1a = 0, n_rx = 0;

  readout_ctrl #(.W(W), .DEPTH(DEPTH), .EVT_DEPTH(ED)) dut (
    .clk, .rst_n, .payload, .bcid, .l1a, .latency(7'(LAT)),
    .gl_data, .gl_dav, .lost_cnt, .evt_cnt);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (NBC + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist [4096];
  int exp_q [$];
  int cyc = 0;            // BC number of the current cycle (edge count)
  int first_l1a_cyc = -1, first_hdr_cyc = -1;

  // stimulus: at each negedge present payload for the coming edge
  initial begin
    payload = '0; bcid = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < NBC; n++) begin
      payload = {$urandom, $urandom};
      bcid    = 12'(n);
      hist[n] = payload;
      if (n > LAT + 2 && n < NBC - 400)
        l1a = ((n % 500) > 480) ? 1'b1 : ($urandom_range(0, 59) == 0);   // bursts
      else
        l1a = 0;
      if (l1a) begin
        n_l1a++;
        exp_q.push_back(n - LAT);
        if (first_l1a_cyc < 0) first_l1a_cyc = n;
      end
      @(negedge clk);
    end
    l1a = 0;
    repeat (400) @(negedge clk);
    check(n_rx + int'(lost_cnt) == n_l1a, $sformatf("received %0d + lost %0d vs L1As %0d", n_rx, lost_cnt, n_l1a));
    check(lost_cnt > 0, "derandomiser overflow exercised");
    check(first_hdr_cyc - first_l1a_cyc == 2, $sformatf("header latency %0d", first_hdr_cyc - first_l1a_cyc));
    $display("events=%0d lost=%0d", n_rx, lost_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: BC n's payload is sampled at edge n (counted from rst release)
  initial begin
    int idx, ev_bc;
    logic [NW*20-1:0] got;
    @(negedge clk iff rst_n);
    // cyc counts edges after the first one following reset (edge 0)
    forever begin
      @(posedge clk); #1;
      cyc++;
      if (gl_dav) begin
        if (first_hdr_cyc < 0) first_hdr_cyc = cyc;   // edge index
        while (exp_q.size() > 0 && exp_q[0] != int'(gl_data[19:8])) void'(exp_q.pop_front());
        check(exp_q.size() > 0, "header BC belongs to an L1A, LAT BCs earlier");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        ev_bc = int'(gl_data[19:8]);
        check(gl_data[7:0] == 8'(n_rx), $sformatf("event number %0d vs %0d", gl_data[7:0], n_rx));
        for (int w = 0; w < NW; w++) begin
          @(posedge clk); #1; cyc++;
          check(gl_dav, "DAV held through the event");
          got[w*20 +: 20] = gl_data;
        end
        check(got[W-1:0] == hist[ev_bc], $sformatf("payload of BC %0d", ev_bc));
        check(got[NW*20-1:W] == '0, "padding zero");
        n_rx++;
      end
    end
  end

endmodule
