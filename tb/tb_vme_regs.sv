// tb_vme_regs -- self-checking test of the VME-- slave.
// As the module in slot 3 (0x700000) and in slot 20 (0x780000) it writes
// and reads back the control registers and transmitter selects, reads
// status words, checks the configuration outputs, the error-clear pulse,
// that accesses to the other module's range are ignored (no DTACK), and
// that window accesses reach the internal memory at {base, offset}.  A small
// memory model answers on the window port.
module tb_vme_regs;
  import cmx_pkg::*;
  localparam int NT = 66, NS = 32;
  logic clk = 0, rst_n = 0;
  logic [4:0] geo_slot = 5'd3;
  logic [23:1] addr = '0;
  logic ds = 0, wr = 0;
  logic [15:0] wdata = '0, rdata;
  logic dtack;
  cmx_mode_e mode;
  logic proc_en, ctp80, cpm_fmt, jem_fmt, sys_role, cable2_out, clr_err;
  logic [15:0] proc_mask;
  logic [6:0] lat_daq, lat_roi;
  logic [NT-1:0][3:0] tx_sel;
  logic [NS-1:0][15:0] status;
  logic [31:0] win_addr;
  logic win_re, win_we;
  logic [15:0] win_wdata, win_rdata;
  int checks = 0, failures = 0, n_clr = 0;

  vme_regs #(.N_TX(NT), .N_STAT(NS)) dut (
    .clk, .rst_n, .geo_slot, .vme_addr(addr), .vme_ds(ds), .vme_write(wr),
    .vme_wdata(wdata), .vme_rdata(rdata), .vme_dtack(dtack),
    .mode, .proc_en, .ctp80, .cpm_fmt, .jem_fmt, .sys_role, .cable2_out, .proc_mask,
    .lat_daq, .lat_roi, .clr_err, .tx_sel, .status,
    .win_addr, .win_re, .win_we, .win_wdata, .win_rdata);

  always #5 clk = ~clk;

  // window memory model: 256 words indexed by the low address bits, tagged
  // with the high bits to detect wrong bases
  logic [15:0] mem [256];
  logic [31:0] mem_tag [256];
  always @(posedge clk) begin
    if (win_we) begin mem[win_addr[7:0]] <= win_wdata; mem_tag[win_addr[7:0]] <= win_addr; end
    win_rdata <= (mem_tag[win_addr[7:0]] == win_addr) ? mem[win_addr[7:0]] : 16'hDEAD;
  end
  always @(posedge clk) if (clr_err) n_clr++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one bus cycle; returns read data, and whether DTACK came within 4 clocks
  task automatic access(input logic [23:0] a, input bit w, input logic [15:0] d,
                        output logic [15:0] q, output bit acked);
    @(negedge clk);
    addr = a[23:1]; wr = w; wdata = d; ds = 1;
    @(negedge clk); ds = 0;
    acked = 0; q = '0;
    for (int i = 0; i < 4 && !acked; i++) begin
      if (dtack) begin acked = 1; q = rdata; end
      else @(negedge clk);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    bit ack;
    logic [23:0] base;
    logic [3:0] sel_exp [NT];
    for (int i = 0; i < NS; i++) status[i] = 16'(16'h5000 + i * 7);
    for (int i = 0; i < 256; i++) mem_tag[i] = 32'hFFFF_FFFF;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      geo_slot = pass ? 5'd20 : 5'd3;
      base     = pass ? 24'h780000 : 24'h700000;
      // control register
      access(base + 24'h0, 1, 16'h00EE, q, ack);   // mode 2, proc, ctp80, sys, cable2, jem
      check(ack, "CTRL write acknowledged");
      check(mode == MODE_UPGRADE && proc_en && ctp80 && !cpm_fmt && jem_fmt && sys_role && cable2_out, "CTRL outputs");
      access(base + 24'h0, 0, 16'h0, q, ack);
      check(ack && q == 16'h00EE, "CTRL readback");
      access(base + 24'h2, 1, 16'hA5C3, q, ack);
      check(proc_mask == 16'hA5C3, "mask output");
      access(base + 24'h2, 0, 16'h0, q, ack);
      check(q == 16'hA5C3, "mask readback");
      access(base + 24'h4, 1, 16'd37, q, ack);
      access(base + 24'h6, 1, 16'd99, q, ack);
      check(lat_daq == 7'd37 && lat_roi == 7'd99, "latency outputs");
      access(base + 24'h4, 0, 16'h0, q, ack);
      check(q == 16'd37, "latency readback");
      // transmitter selects
      for (int t = 0; t < NT; t++) begin
        sel_exp[t] = 4'($urandom);
        access(base + 24'h40 + 24'(2 * t), 1, {12'h0, sel_exp[t]}, q, ack);
      end
      for (int t = 0; t < NT; t++) begin
        check(tx_sel[t] == sel_exp[t], "tx select output");
        access(base + 24'h40 + 24'(2 * t), 0, 16'h0, q, ack);
        check(ack && q == {12'h0, sel_exp[t]}, "tx select readback");
      end
      // status
      for (int i = 0; i < NS; i++) begin
        access(base + 24'h200 + 24'(2 * i), 0, 16'h0, q, ack);
        check(ack && q == status[i], $sformatf("status %0d", i));
      end
      // clear command
      access(base + 24'h8, 1, 16'h1, q, ack);
      @(posedge clk); #1;
      check(ack && n_clr == pass + 1, "clear pulse");
      // other module's range: no answer
      access((pass ? 24'h700000 : 24'h780000), 1, 16'h0003, q, ack);
      check(!ack && mode == MODE_UPGRADE, "other range ignored");
      // window: base register then write and read back through the window
      access(base + 24'hA, 1, 16'h0123, q, ack);
      for (int i = 0; i < 8; i++) begin
        access(base + 24'h40000 + 24'(2 * i), 1, 16'(16'hB000 + i + pass), q, ack);
        check(ack && win_addr == {15'h0123, 17'(i)}, "window write address");
      end
      for (int i = 0; i < 8; i++) begin
        access(base + 24'h40000 + 24'(2 * i), 0, 16'h0, q, ack);
        check(ack && q == 16'(16'hB000 + i + pass), $sformatf("window read %0d", i));
      end
      // moving the window changes the internal address
      access(base + 24'hA, 1, 16'h0124, q, ack);
      access(base + 24'h40000, 0, 16'h0, q, ack);
      check(q == 16'hDEAD, "moved window reaches other memory");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
