// tb_tp_link_mapper -- self-checking test of the TP link mapping and fan-out.
// For each mode it drives random backplane words and RoI slots, random
// transmitter source selects (including 'off'), and checks each
// transmitter's payload and enable one clock later against the expected
// logical link, cut from the bit stream in the testbench.
module tb_tp_link_mapper;
  import cmx_pkg::*;
  localparam int NP = 16, NT = 66, NS = 24;
  logic clk = 0, rst_n = 0;
  cmx_mode_e mode;
  logic proc_en;
  logic [NP-1:0][PROC_W-1:0] raw;
  logic [NS-1:0][31:0] slot;
  logic [NT-1:0][3:0] sel;
  logic [NT-1:0][LINK_W-1:0] tx;
  logic [NT-1:0] en;
  int checks = 0, failures = 0;
  int seen_mode [4];
  int n_repl = 0;

  tp_link_mapper #(.N_PROC(NP), .N_TX(NT), .N_SLOTS(NS)) dut (
    .clk, .rst_n, .mode, .proc_en, .raw, .slot, .sel, .tx_data_q(tx), .tx_en_q(en));

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
    logic [LINK_W-1:0] link [12];
    logic [NP*PROC_W-1:0] stream;
    bit use_raw, on;
    mode = MODE_CMM_E; proc_en = 0; raw = '0; slot = '0; sel = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      mode    = cmx_mode_e'(it % 4);
      proc_en = it[2];
      for (int p = 0; p < NP; p++) raw[p] = {$urandom, $urandom, $urandom};
      for (int s = 0; s < NS; s++) slot[s] = $urandom;
      for (int t = 0; t < NT; t++) sel[t] = 4'($urandom);
      seen_mode[it % 4]++;
      // expected logical links
      for (int p = 0; p < NP; p++) stream[p*PROC_W +: PROC_W] = raw[p];
      use_raw = (mode == MODE_TEST) || (mode == MODE_UPGRADE && !proc_en);
      on      = (mode != MODE_CMM_E);
      for (int k = 0; k < 12; k++) begin
        if (use_raw) link[k] = stream[k*LINK_W +: LINK_W];
        else if (k < 6) link[k] = {slot[4*k+3], slot[4*k+2], slot[4*k+1], slot[4*k]};
        else link[k] = '0;
      end
      @(posedge clk); #1;
      for (int t = 0; t < NT; t++) begin
        if (on && sel[t] < 12) begin
          check(en[t], "enable");
          check(tx[t] == link[sel[t]], $sformatf("it %0d tx %0d link %0d", it, t, sel[t]));
          if (t >= 12) n_repl++;
        end else begin
          check(!en[t] && tx[t] == '0, "transmitter off");
        end
      end
    end
    check(n_repl > 0, "replication exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
