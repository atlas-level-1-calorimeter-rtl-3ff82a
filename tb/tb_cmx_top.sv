// tb_cmx_top -- end-to-end test of the CMX processing FPGA at its default
// size (16 processor modules, 66 optical transmitters).
//
// The testbench plays the processor modules, the other CMX modules on the
// cables, the TTC system and the VME-- master, and checks the outputs BC by
// BC against its own model:
//   1. CMM emulation, system module: 40 Mb/s backplane words with odd
//      parity (some corrupted) and crate sums on three cables; the CTP word
//      must be the saturated sum 3 BCs after the backplane data.  L1As are
//      read out on the DAQ link, whose byte stream is decoded and checked.
//   2. CMM emulation, crate module: the crate sum must leave on cable port 1.
//   3. Test mode: 160 Mb/s DDR words with duty-cycle parity; the first word
//      feeds the CTP sums, all 1536 bits go raw onto links 0..11.
//   4. Upgrade mode, raw and with RoI processing (low and high occupancy,
//      the latter overflowing the 24-word RoI list, the former with a module
//      that reports too many RoIs), with transmitters 12.. replicating
//      links, and the CTP at 80 MHz; then standalone mode with the 6-bit ET
//      + fine position format and with the jet (JEM) format.
//   5. A burst of L1As overflowing the derandomiser, a VME-- window access
//      and a read of the error counters.
// The readout links run on their own clock, 0.2 % slower than the BC clock
// and unrelated in phase; their byte streams are decoded back into events.
// Every mechanism above is counted; one that never happened is a failure.
module tb_cmx_top;
  import cmx_pkg::*;
  localparam int NP = 16, NT = 66, NS = 24;

  // ------------------------------------------------------------ clocks
  // BC clock 40 MHz; readout-link clock 0.2 % slower (40.00 against
  // 40.08 MHz) and unrelated in phase
  logic clk40 = 0, clk80 = 0, clk_gl = 0, clk120 = 0, rst_n = 0;
  always #12.5 clk40 = ~clk40;
  initial begin #3.3; forever #12.525 clk_gl = ~clk_gl; end
  always @(posedge clk40) begin
    clk80 = 1; #6.25 clk80 = 0; #6.25 clk80 = 1; #6.25 clk80 = 0;
  end
  always @(posedge clk_gl) begin
    clk120 = 1; #4.175 clk120 = 0; #4.175 clk120 = 1; #4.175 clk120 = 0;
    #4.175 clk120 = 1; #4.175 clk120 = 0;
  end

  // ------------------------------------------------------------ DUT
  logic [NP-1:0]           clk80_rec;
  logic [NP-1:0][BP_W:0]   bp_in;
  logic [2:0][BP_W:0]      cable_in;
  logic [1:0][BP_W:0]      cable_out;
  logic [1:0]              cable_oe;
  logic                    l1a = 0, bcr = 0;
  logic [4:0]              geo_slot = 5'd20;
  logic [23:1]             vme_addr = '0;
  logic                    vme_ds = 0, vme_write = 0;
  logic [15:0]             vme_wdata = '0, vme_rdata;
  logic                    vme_dtack;
  logic [31:0]             win_addr;
  logic                    win_re, win_we;
  logic [15:0]             win_wdata, win_rdata;
  logic [N_CTP-1:0][CTP_W-1:0] ctp;
  logic [NT-1:0][LINK_W-1:0] tx;
  logic [NT-1:0]           tx_en;
  logic [7:0]              gl_daq, gl_roi;

  assign clk80_rec = {NP{clk80}};

  cmx_top dut (
    .clk40, .clk80, .clk_gl, .clk120, .rst_n, .clk80_rec, .bp_in,
    .cable_in, .cable_out, .cable_oe, .ttc_l1a(l1a), .ttc_bcr(bcr),
    .geo_slot, .vme_addr, .vme_ds, .vme_write, .vme_wdata, .vme_rdata, .vme_dtack,
    .win_addr, .win_re, .win_we, .win_wdata, .win_rdata,
    .ctp, .opt_tx_data(tx), .opt_tx_en(tx_en), .gl_daq_byte(gl_daq), .gl_roi_byte(gl_roi));

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // mechanism counters
  int m_perr40 = 0, m_perr160 = 0, m_realign = 0, m_sat = 0, m_cable_in = 0,
      m_cable_out = 0, m_raw_links = 0, m_roi_list = 0, m_list_ovf = 0,
      m_repl = 0, m_ctp80 = 0, m_daq_evt = 0, m_roi_evt = 0, m_derand_ovf = 0,
      m_window = 0, m_mode_switch = 0, m_legacy_ctp = 0, m_test_ctp = 0, m_up_ctp = 0,
      m_excess = 0, m_fine = 0, m_jem = 0;

  localparam int NBC = 3000;
  typedef enum int {S_IDLE, S_LEG, S_LEG_CRATE, S_TEST, S_UPRAW, S_UPPROC_LO, S_UPPROC_HI, S_UPPROC_FP, S_UPPROC_JEM} scen_e;
  scen_e scen = S_IDLE;
  bit    ctp80_on = 0;
  bit    inject40 = 1;

  // stimulus history, indexed by the clk40 edge that samples it
  scen_e             scen_h  [NBC];
  bit                ctp80_h [NBC];
  logic [BP_W-1:0]   mult_h  [NBC][NP];   // legacy-format multiplicities sent
  logic [PROC_W-1:0] word_h  [NBC][NP];   // 96-bit words (DDR modes)
  logic [BP_W-1:0]   cab_h   [NBC][3];
  logic [31:0]       list_h  [NBC][NS];
  int                cnt_h   [NBC];
  int                bc = 0;              // clk40 edges since reset release

  initial begin
    repeat (NBC + 200) @(posedge clk40);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  function automatic logic [BP_W-1:0] sat_add(input logic [BP_W-1:0] a, input logic [BP_W-1:0] b);
    logic [BP_W-1:0] r;
    int s;
    for (int t = 0; t < 8; t++) begin
      s = int'(a[3*t +: 3]) + int'(b[3*t +: 3]);
      r[3*t +: 3] = (s > 7) ? 3'd7 : 3'(s);
    end
    return r;
  endfunction

  // random small multiplicities, mostly 0 or 1
  function automatic logic [BP_W-1:0] rand_mult();
    logic [BP_W-1:0] r;
    for (int t = 0; t < 8; t++)
      r[3*t +: 3] = ($urandom_range(0, 5) == 0) ? 3'($urandom_range(1, 3)) : 3'd0;
    return r;
  endfunction

  // ------------------------------------------------------------ stimulus
  // Runs once per BC, starting 3.125 ns before the clk40 edge 'n' that
  // samples the BC (DDR word 0 lands on that edge).
  initial begin : driver
    int n, np_max;
    logic [15:0] pres;
    logic [7:0] thr [5], et [5];
    int locs [5];
    bit bad, p, allsame, exc, fp;
    bp_in = '0;
    for (int i = 0; i < NP; i++) bp_in[i][BP_W] = 1'b1;      // good parity on zero
    cable_in = '0;
    for (int c = 0; c < 3; c++) cable_in[c][BP_W] = 1'b1;
    @(posedge rst_n);
    @(posedge clk40);            // edge 0
    #21.875;
    forever begin
      n = bc + 1;
      if (n >= NBC) break;
      scen_h[n]  = scen;
      ctp80_h[n] = ctp80_on;
      for (int c = 0; c < 3; c++) begin
        cab_h[n][c] = (scen == S_LEG || scen == S_TEST || scen == S_UPPROC_LO) ? rand_mult() : '0;
        cable_in[c] = {odd_par24(cab_h[n][c]), cab_h[n][c]};
      end
      for (int s = 0; s < NS; s++) list_h[n][s] = '0;
      cnt_h[n] = 0;
      if (scen inside {S_IDLE, S_LEG, S_LEG_CRATE}) begin
        for (int i = 0; i < NP; i++) begin
          mult_h[n][i] = (scen == S_IDLE) ? '0 : rand_mult();
          if (n % 50 == 7) mult_h[n][i] = 24'o77777777 & 24'(($urandom & 32'h00249249) * 3);
          word_h[n][i] = '0;
          bad = (scen == S_LEG) && inject40 && ($urandom_range(0, 99) == 0);
          bp_in[i] = {odd_par24(mult_h[n][i]) ^ bad, mult_h[n][i]};
          if (bad) m_perr40++;
        end
        #25;
      end else begin
        // DDR modes: build the 96-bit words
        for (int i = 0; i < NP; i++) begin
          if (scen == S_TEST) begin
            mult_h[n][i] = rand_mult();
            word_h[n][i] = {mult_h[n][i], $urandom, $urandom, 8'($urandom)};
          end else if (scen == S_UPPROC_JEM) begin
            // jet format: 8 presence bits, 4 RoIs with fine position and
            // 12-bit ET; module 15 sometimes reports more than 4
            logic [7:0]  jp;
            logic [1:0]  jf [4];
            logic [11:0] je [4];
            int k;
            jp = 8'($urandom) & 8'($urandom) & 8'($urandom);
            if (i == 15 && $urandom_range(0, 4) == 0) jp = 8'hF8 | 8'($urandom);
            exc = ($countones(jp) > 4);
            for (int r = 0; r < 4; r++) begin
              thr[r] = 8'($urandom) & (($urandom_range(0, 4) == 0) ? 8'h00 : 8'hFF);
              jf[r] = 2'($urandom); je[r] = 12'($urandom);
            end
            mult_h[n][i] = '0;
            k = 0;
            for (int q = 0; q < 8; q++)
              if (jp[7 - q] && k < 4) begin
                for (int t = 0; t < 8; t++)
                  if (thr[k][t]) mult_h[n][i][3*t +: 3] = mult_h[n][i][3*t +: 3] + 3'd1;
                if (thr[k] != 0) begin
                  if (cnt_h[n] < NS)
                    list_h[n][cnt_h[n]] = {exc, 1'b0, 4'(i), 4'(q), jf[k], thr[k], je[k]};
                  cnt_h[n]++;
                end
                k++;
              end
            word_h[n][i] = {jp, jf[0], jf[1], jf[2], jf[3], thr[0],
                            je[0], je[1][11:8], thr[1],
                            je[1][7:0], je[2][11:4], thr[2],
                            je[2][3:0], je[3], thr[3]};
          end else begin
            np_max = (scen == S_UPPROC_HI) ? 5 : 2;
            pres = '0;
            for (int r = 0; r < 5; r++) begin thr[r] = '0; et[r] = '0; locs[r] = 0; end
            for (int r = 0; r < np_max; r++) if ($urandom_range(0, 1) == 1 || scen == S_UPPROC_HI)
              pres[$urandom_range(0, 15)] = 1'b1;
            // now and then a module reports more RoIs than the format holds
            if (scen == S_UPPROC_LO && i == 15 && $urandom_range(0, 9) == 0)
              while ($countones(pres) < 6) pres[$urandom_range(0, 15)] = 1'b1;
            exc = ($countones(pres) > 5);
            fp  = (scen == S_UPPROC_FP);
            // RoIs in presence-bit order
            begin
              int k;
              k = 0;
              for (int q = 0; q < 16; q++)
                if (pres[15 - q] && k < 5) begin
                  locs[k] = q;
                  thr[k] = 8'($urandom) & (($urandom_range(0, 4) == 0) ? 8'h00 : 8'hFF);
                  et[k]  = 8'($urandom);
                  k++;
                end
              // expected multiplicities and list entries
              mult_h[n][i] = '0;
              for (int r = 0; r < k; r++) begin
                for (int t = 0; t < 8; t++)
                  if (thr[r][t]) mult_h[n][i][3*t +: 3] = mult_h[n][i][3*t +: 3] + 3'd1;
                if (thr[r] != 0) begin
                  if (cnt_h[n] < NS)
                    list_h[n][cnt_h[n]] = fp ? {exc, 1'b0, 4'(i), 4'(locs[r]), et[r][1:0], thr[r], 4'h0, 2'b00, et[r][7:2]}
                                             : {exc, 1'b0, 4'(i), 4'(locs[r]), 2'b00, thr[r], 4'h0, et[r]};
                  cnt_h[n]++;
                end
              end
            end
            word_h[n][i] = {pres, thr[0], et[0], et[1], thr[1], et[2], et[3], thr[2], et[4], thr[3], thr[4]};
          end
        end
        if (cnt_h[n] > NS) list_h[n][NS-1][31] = 1'b1;
        // the first BCs after entering a DDR mode carry parity 0 so that the
        // clock/parity decoders can find the BC phase
        allsame = 1;
        for (int j = 1; j <= 6; j++) if (n - j < 0 || scen_h[n - j] != scen) allsame = 0;
        if (!allsame)
          for (int i = 0; i < NP; i++) begin
            word_h[n][i] = 96'h1;
            mult_h[n][i] = '0;
            cnt_h[n] = 0;
            for (int s = 0; s < NS; s++) list_h[n][s] = '0;
          end
        // drive one BC: words at -3.125, +3.125, +9.375, +15.625 around the
        // edge; the clock line rises at -1 and falls at +3.125 (parity 0) or
        // +15.625 (parity 1)
        for (int i = 0; i < NP; i++) bp_in[i][BP_W-1:0] = word_h[n][i][95:72];
        #2.125;
        for (int i = 0; i < NP; i++) bp_in[i][BP_W] = 1'b1;
        #4.125;
        for (int i = 0; i < NP; i++) begin
          bad = allsame && (scen == S_TEST) && (i == 3) && ($urandom_range(0, 29) == 0);
          if (bad) m_perr160++;
          p = (~^word_h[n][i]) ^ bad;
          word_h[n][i][0] = word_h[n][i][0];   // unchanged, kept for clarity
          bp_in[i][BP_W-1:0] = word_h[n][i][71:48];
          if (!p) bp_in[i][BP_W] = 1'b0;
          if (bad) list_h[n][0][0] = list_h[n][0][0];
        end
        #6.25;
        for (int i = 0; i < NP; i++) bp_in[i][BP_W-1:0] = word_h[n][i][47:24];
        #6.25;
        for (int i = 0; i < NP; i++) begin
          bp_in[i][BP_W-1:0] = word_h[n][i][23:0];
          bp_in[i][BP_W] = 1'b0;
        end
        #6.25;
      end
    end
  end

  // ------------------------------------------------------------ checker
  function automatic bit stable(input int m, input int span);
    if (m - span < 1) return 0;
    for (int j = 0; j <= span; j++) if (scen_h[m - j] != scen_h[m]) return 0;
    return 1;
  endfunction

  always @(posedge clk40) begin
    if (rst_n) begin
      #1;
      begin
        int m;
        logic [BP_W-1:0] e, crate;
        m = bc;
        // CTP, first half of the BC
        if (m >= 12 && stable(m, 10)) begin
          e = '0;
          case (scen_h[m])
            S_LEG: begin
              for (int i = 0; i < NP; i++) e = sat_add(e, mult_h[m-3][i]);
              for (int c = 0; c < 3; c++) e = sat_add(e, cab_h[m-2][c]);
              check(ctp[0][23:0] == e, $sformatf("legacy CTP sum BC %0d: %h vs %h", m, ctp[0][23:0], e));
              check(ctp[0][32] == ~^ctp[0][31:0], "CTP parity");
              m_legacy_ctp++;
              for (int c = 0; c < 3; c++) if (cab_h[m-2][c] != 0) m_cable_in++;
              if (ctp[1][7:0] != 0) m_sat++;
            end
            S_LEG_CRATE: begin
              crate = '0;
              for (int i = 0; i < NP; i++) crate = sat_add(crate, mult_h[m-2][i]);
              check(cable_oe[0] && cable_out[0] == {odd_par24(crate), crate},
                    $sformatf("crate sum on cable BC %0d", m));
              m_cable_out++;
            end
            S_TEST, S_UPRAW, S_UPPROC_LO, S_UPPROC_HI, S_UPPROC_FP, S_UPPROC_JEM: begin
              for (int i = 0; i < NP; i++) e = sat_add(e, mult_h[m-5][i]);
              if (scen_h[m] == S_TEST || scen_h[m] == S_UPPROC_LO)
                for (int c = 0; c < 3; c++) e = sat_add(e, cab_h[m-2][c]);
              check(ctp[0][23:0] == e, $sformatf("CTP sum BC %0d (scen %0d): %h vs %h", m, scen_h[m], ctp[0][23:0], e));
              if (scen_h[m] == S_TEST) m_test_ctp++; else m_up_ctp++;
            end
            default: ;
          endcase
          // optical links
          case (scen_h[m])
            S_TEST, S_UPRAW: begin
              logic [NP*PROC_W-1:0] stream;
              for (int i = 0; i < NP; i++) stream[i*PROC_W +: PROC_W] = word_h[m-3][i];
              for (int k = 0; k < 12; k++)
                check(tx_en[k] && tx[k] == stream[k*LINK_W +: LINK_W], $sformatf("raw link %0d BC %0d", k, m));
              m_raw_links++;
            end
            S_UPPROC_LO, S_UPPROC_HI, S_UPPROC_FP, S_UPPROC_JEM: begin
              for (int k = 0; k < 6; k++)
                for (int w = 0; w < 4; w++)
                  check(tx[k][32*w +: 32] == list_h[m-4][4*k + w],
                        $sformatf("RoI list link %0d word %0d BC %0d: %h vs %h", k, w, m, tx[k][32*w +: 32], list_h[m-4][4*k+w]));
              if (cnt_h[m-4] > 0) m_roi_list++;
              if (cnt_h[m-4] > NS) m_list_ovf++;
              for (int w = 0; w < NS; w++) if (list_h[m-4][w][31] && w < cnt_h[m-4] && w != NS-1) m_excess++;
              if (scen_h[m] == S_UPPROC_JEM && cnt_h[m-4] > 0) m_jem++;
              if (scen_h[m] == S_UPPROC_FP) for (int w = 0; w < NS; w++) if (list_h[m-4][w][21:20] != 0) m_fine++;
              for (int k = 6; k < 12; k++) check(tx[k] == '0, "unused processed links zero");
            end
            S_LEG: for (int k = 0; k < NT; k++) check(!tx_en[k], "no links in CMM emulation");
            default: ;
          endcase
          // replication: transmitters 12.. copy link (t % 6)
          if (scen_h[m] inside {S_UPRAW, S_UPPROC_LO, S_UPPROC_HI, S_UPPROC_FP, S_UPPROC_JEM}) begin
            for (int t = 12; t < NT; t++)
              check(tx_en[t] && tx[t] == tx[t % 6], $sformatf("replica %0d", t));
            m_repl++;
          end
        end
        // 80 MHz CTP: the second half carries the RoI count
        if (m >= 12 && stable(m, 10) && ctp80_h[m] && scen_h[m] inside {S_UPPROC_LO, S_UPPROC_HI, S_UPPROC_FP, S_UPPROC_JEM}) begin
          #12.5;
          check(ctp[1][15:8] == 8'(cnt_h[m-3] > 255 ? 255 : cnt_h[m-3]),
                $sformatf("CTP second word RoI count BC %0d: %0d vs %0d", m, ctp[1][15:8], cnt_h[m-3]));
          m_ctp80++;
        end
      end
    end
  end

  always @(posedge clk40) if (rst_n) bc <= bc + 1;

  // ------------------------------------------------------------ readout monitor
  // The byte streams are cut into 24-bit frames; the frame boundary is found
  // from the idle frame (AF FC 00) that each link sends after reset.
  int daq_words [$];
  int roi_words [$];
  int n_l1a = 0;
  int daq_hdr_bc [$];
  initial begin : glink_mon
    logic [23:0] fd, fr, sd, sr;
    int ph;
    ph = 0;
    sd = '0; sr = '0;
    @(posedge rst_n);
    // both links leave reset together, so one lock serves both
    while (!(sd == 24'hAFFC00 && sr == 24'hAFFC00)) begin
      @(posedge clk120); #0.5;
      sd = {sd[15:0], gl_daq};
      sr = {sr[15:0], gl_roi};
    end
    forever begin
      @(posedge clk120); #0.5;
      fd[23 - 8*ph -: 8] = gl_daq;
      fr[23 - 8*ph -: 8] = gl_roi;
      if (ph == 2) begin
        if (fd[23:20] == 4'b1100) daq_words.push_back(int'(fd[19:0]));
        else if (fd[23:20] == 4'b0011) daq_words.push_back(int'(20'(~fd[19:0])));
        else check(fd == 24'hAFFC00, $sformatf("DAQ frame %h", fd));
        if (fr[23:20] == 4'b1100) roi_words.push_back(int'(fr[19:0]));
        else if (fr[23:20] == 4'b0011) roi_words.push_back(int'(20'(~fr[19:0])));
        else check(fr == 24'hAFFC00, $sformatf("RoI frame %h", fr));
      end
      ph = (ph + 1) % 3;
    end
  end

  localparam int DAQ_W  = NP * PROC_W + 24 + NP;
  localparam int DAQ_NW = (DAQ_W + 19) / 20;
  localparam int ROI_NW = (NS * 32 + 24 + 8 + 8 + 19) / 20;

  // ------------------------------------------------------------ VME
  task automatic vme(input logic [23:0] a, input bit w, input logic [15:0] d, output logic [15:0] q);
    @(negedge clk40);
    vme_addr = a[23:1]; vme_write = w; vme_wdata = d; vme_ds = 1;
    @(negedge clk40); vme_ds = 0;
    q = '0;
    for (int i = 0; i < 6; i++) begin
      if (vme_dtack) begin q = vme_rdata; break; end
      @(negedge clk40);
    end
  endtask

  logic [15:0] wmem [16];
  always @(posedge clk40) begin
    if (win_we) wmem[win_addr[3:0]] <= win_wdata;
    win_rdata <= wmem[win_addr[3:0]];
  end

  localparam logic [23:0] BASE = 24'h780000;   // slot 20
  localparam int LAT = 20;

  task automatic set_ctrl(input cmx_mode_e md, input bit proc, input bit c80, input bit sys, input bit fmt = 0, input bit jem = 0);
    logic [15:0] q;
    vme(BASE + 0, 1, {8'b0, jem, 1'b0, sys, fmt, c80, proc, 2'(md)}, q);
  endtask

  task automatic run_bcs(input int k);
    repeat (k) @(posedge clk40);
  endtask

  // L1A at the negedge before edge 'bc+1'; remembers that edge
  int l1a_edges [$];
  task automatic fire_l1a();
    @(negedge clk40);
    l1a = 1; l1a_edges.push_back(bc + 1); n_l1a++;
    @(negedge clk40);
    l1a = 0;
  endtask

  // ------------------------------------------------------------ main
  int k0;   // edge at which BCR was sampled
  initial begin : main
    logic [15:0] q;
    int nev, lost;
    for (int i = 0; i < 16; i++) wmem[i] = '0;
    win_rdata = '0;
    repeat (3) @(posedge clk40);
    @(negedge clk40) rst_n = 1;
    // BCR so that BCID = edge - k0
    @(negedge clk40) bcr = 1; k0 = bc + 1;
    @(negedge clk40) bcr = 0;
    vme(BASE + 24'h4, 1, 16'(LAT), q);
    vme(BASE + 24'h6, 1, 16'(LAT), q);
    vme(BASE + 24'h4, 0, 16'h0, q);
    check(q == 16'(LAT), "latency register");
    // 1. CMM emulation, system module
    set_ctrl(MODE_CMM_E, 0, 0, 1);
    scen = S_LEG; m_mode_switch++;
    run_bcs(40);
    for (int j = 0; j < 5; j++) begin fire_l1a(); run_bcs(90); end
    inject40 = 0;
    run_bcs(20);
    begin
      int tot;
      tot = 0;
      for (int i = 0; i < NP; i++) begin vme(BASE + 24'h200 + 24'(2 * i), 0, 16'h0, q); tot += int'(q); end
      check(tot == m_perr40, $sformatf("40 Mb/s parity errors counted %0d vs %0d", tot, m_perr40));
    end
    // 2. crate module
    set_ctrl(MODE_CMM_E, 0, 0, 0);
    scen = S_LEG_CRATE; m_mode_switch++;
    run_bcs(40);
    // 3. test mode
    vme(BASE + 24'h8, 1, 16'h1, q);       // clear error counters
    set_ctrl(MODE_TEST, 0, 0, 1);
    scen = S_TEST; m_mode_switch++;
    run_bcs(200);
    begin
      int tot;
      tot = 0;
      for (int i = 0; i < NP; i++) begin vme(BASE + 24'h200 + 24'(2 * i), 0, 16'h0, q); tot += int'(q); end
      // the first assembled BCs after the switch may also count
      check(tot >= m_perr160 && tot <= m_perr160 + 2 * NP, $sformatf("160 Mb/s parity errors %0d vs %0d", tot, m_perr160));
      vme(BASE + 24'h200 + 24'(2 * 28), 0, 16'h0, q);
      if (q != 0) m_realign++;
    end
    // 4. upgrade mode: replicas on transmitters 12.. copy link t % 6
    for (int t = 12; t < NT; t++) vme(BASE + 24'h40 + 24'(2 * t), 1, 16'(t % 6), q);
    set_ctrl(MODE_UPGRADE, 0, 0, 1);
    scen = S_UPRAW; m_mode_switch++;
    run_bcs(60);
    set_ctrl(MODE_UPGRADE, 1, 1, 1);
    ctp80_on = 1;
    scen = S_UPPROC_LO; m_mode_switch++;
    run_bcs(120);
    scen = S_UPPROC_HI;
    run_bcs(120);
    // standalone mode with the 6-bit ET + fine position format
    set_ctrl(MODE_STANDALONE, 1, 1, 1, 1);
    scen = S_UPPROC_FP; m_mode_switch++;
    run_bcs(100);
    // jet (JEM) format
    set_ctrl(MODE_STANDALONE, 1, 1, 1, 0, 1);
    scen = S_UPPROC_JEM; m_mode_switch++;
    run_bcs(100);
    // 5. L1A burst: more events than the derandomiser holds
    for (int j = 0; j < 12; j++) fire_l1a();
    run_bcs(1100);
    // window access
    vme(BASE + 24'hA, 1, 16'h0002, q);
    vme(BASE + 24'h40006, 1, 16'hBEEF, q);
    check(win_addr == {15'h0002, 17'h3}, "window address");
    vme(BASE + 24'h40006, 0, 16'h0, q);
    check(q == 16'hBEEF, "window read back");
    if (q == 16'hBEEF) m_window++;
    vme(BASE + 24'h200 + 24'(2 * 30), 0, 16'h0, q);
    check(q == 16'h0, "no words lost crossing to the readout-link clock");
    vme(BASE + 24'h200 + 24'(2 * 19), 0, 16'h0, q);
    lost = int'(q);
    m_derand_ovf = lost;

    // ---- readout: cut DAQ words into events
    nev = 0;
    while (daq_words.size() >= DAQ_NW + 1) begin
      int hdr, bcid, b;
      logic [DAQ_NW*20-1:0] pl;
      hdr = daq_words.pop_front();
      for (int w = 0; w < DAQ_NW; w++) pl[20*w +: 20] = 20'(daq_words.pop_front());
      bcid = hdr >> 8;
      check((hdr % 256) == (nev % 256), "DAQ event number");
      // data written at edge E holds BCID of edge E-1 and inputs of edge E-2
      b = bcid + k0 - 1;
      if (nev < 5) begin
        check(l1a_edges[nev] - LAT - 1 - k0 == bcid, $sformatf("DAQ BCID %0d for L1A at edge %0d", bcid, l1a_edges[nev]));
        for (int i = 0; i < NP; i++)
          check(pl[i*PROC_W +: 24] == mult_h[b][i], $sformatf("DAQ module %0d data", i));
      end
      nev++;
    end
    m_daq_evt = nev;
    check(nev + lost == n_l1a, $sformatf("DAQ events %0d + lost %0d vs L1As %0d", nev, lost, n_l1a));
    // RoI readout: count events
    nev = 0;
    while (roi_words.size() >= ROI_NW + 1) begin
      int hdr;
      hdr = roi_words.pop_front();
      for (int w = 0; w < ROI_NW; w++) void'(roi_words.pop_front());
      nev++;
    end
    m_roi_evt = nev;
    check(nev > 0, "RoI readout events");

    // ---- mechanisms
    $display("mechanisms: perr40=%0d perr160=%0d realign=%0d sat=%0d cable_in=%0d cable_out=%0d",
             m_perr40, m_perr160, m_realign, m_sat, m_cable_in, m_cable_out);
    $display("  legacy_ctp=%0d test_ctp=%0d upgrade_ctp=%0d raw_links=%0d roi_list=%0d list_ovf=%0d",
             m_legacy_ctp, m_test_ctp, m_up_ctp, m_raw_links, m_roi_list, m_list_ovf);
    $display("  replication=%0d ctp80=%0d daq_events=%0d roi_events=%0d derand_ovf=%0d window=%0d mode_switch=%0d excess=%0d fine=%0d jem=%0d",
             m_repl, m_ctp80, m_daq_evt, m_roi_evt, m_derand_ovf, m_window, m_mode_switch, m_excess, m_fine, m_jem);
    check(m_perr40 > 0, "40 Mb/s parity error happened");
    check(m_perr160 > 0, "160 Mb/s parity error happened");
    check(m_realign > 0, "clock/parity realignment happened");
    check(m_sat > 0, "multiplicity saturation happened");
    check(m_cable_in > 0, "cable input used");
    check(m_cable_out > 0, "cable output used");
    check(m_legacy_ctp > 0 && m_test_ctp > 0 && m_up_ctp > 0, "CTP path in all modes");
    check(m_raw_links > 0, "raw links");
    check(m_roi_list > 0, "RoI list");
    check(m_list_ovf > 0, "RoI list overflow");
    check(m_repl > 0, "replication");
    check(m_ctp80 > 0, "CTP 80 MHz");
    check(m_daq_evt > 0 && m_roi_evt > 0, "readout events");
    check(m_derand_ovf > 0, "derandomiser overflow");
    check(m_window > 0, "VME window");
    check(m_excess > 0, "excess RoIs flagged");
    check(m_fine > 0, "fine-position format");
    check(m_jem > 0, "jet format");
    check(m_mode_switch >= 7, "mode switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
