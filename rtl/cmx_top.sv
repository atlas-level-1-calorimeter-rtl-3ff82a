// cmx_top -- processing FPGA of the CMX merger module.
//
// The CMX sits in a processor crate of the calorimeter trigger, in the slot
// of the Common Merger Module (CMM) it replaces.  It receives the results of
// up to 16 processor modules over the backplane and
//   * in CMM emulation mode (40 Mb/s backplane, 24 bits + odd parity per
//     module per BC) adds their hit multiplicities per threshold; a crate
//     module sends the crate sum on an LVDS cable, a system module adds the
//     crate sums from up to three cables and its own and drives the CTP;
//   * in test mode (160 Mb/s DDR backplane, 96 bits per module per BC) takes
//     the legacy 24 bits (first DDR word) for the same multiplicity path and
//     sends all 1536 bits per BC on 12 optical links to the Topological
//     Processor (TP);
//   * in upgrade and standalone modes decodes the CPM (or, selected by a
//     control bit, the JEM) RoI format, derives
//     multiplicities from the RoI threshold bits, and sends either the raw
//     data (12 links) or a zero-suppressed list of 32-bit RoI words (6 links);
//     spare transmitters replicate any of the logical links;
//   * on every L1A reads out its inputs and its results on two G-link style
//     readout links (DAQ and RoI) through 960 Mb/s transceiver byte ports;
//   * is configured and monitored through VME-- registers, with a moveable
//     window onto large memories.
// The modes, rates, widths and the two-level merging are the specification's;
// register map, word layouts, G-link frame codes and which data go where on
// the CTP and readout links are this design's (see each block).
//
// Clocks: clk40 is the 40.08 MHz BC clock; clk80 is twice it, with a rising
// edge at every clk40 rising edge.  clk_gl is the 40.00 MHz clock of the
// readout links (the original G-link frequency), unrelated to clk40; the
// readout words cross to it through dual-clock FIFOs, and clk120 is three
// times clk_gl with a rising edge at every clk_gl rising edge.  clk80_rec[i]
// is the 80 MHz clock
// recovered (by a clock manager outside this logic) from module i's
// forwarded clock line and is taken to be phase-aligned with clk40 after the
// input delay scan.  The transceivers, clock managers, input delays, TTC
// decoder and optics are outside; their signals are ports.
//
// Latency in CMM emulation mode, system module: backplane lines sampled at
// BC n, CTP outputs change after the 80 MHz edge that opens BC n+3.
// Test/upgrade: the 96-bit words of BC n are assembled at the start of BC
// n+1, taken into the BC clock domain at n+2; raw link data follow at n+3,
// the RoI list at n+4.
module cmx_top
  import cmx_pkg::*;
#(
  parameter int N_PROC   = 16,
  parameter int N_OPT_TX = 66
) (
  input  logic                          clk40,
  input  logic                          clk80,
  input  logic                          clk_gl,
  input  logic                          clk120,
  input  logic                          rst_n,
  // backplane: per module {line 24, lines 23..0}
  input  logic [N_PROC-1:0]             clk80_rec,
  input  logic [N_PROC-1:0][BP_W:0]     bp_in,
  // LVDS cables (ports 1 and 2 can drive, port 3 only receives)
  input  logic [N_CABLE-1:0][BP_W:0]    cable_in,
  output logic [1:0][BP_W:0]            cable_out,
  output logic [1:0]                    cable_oe,
  // TTC (decoded)
  input  logic                          ttc_l1a,
  input  logic                          ttc_bcr,
  // VME--
  input  logic [4:0]                    geo_slot,
  input  logic [23:1]                   vme_addr,
  input  logic                          vme_ds,
  input  logic                          vme_write,
  input  logic [15:0]                   vme_wdata,
  output logic [15:0]                   vme_rdata,
  output logic                          vme_dtack,
  output logic [31:0]                   win_addr,
  output logic                          win_re,
  output logic                          win_we,
  output logic [15:0]                   win_wdata,
  input  logic [15:0]                   win_rdata,
  // CTP
  output logic [N_CTP-1:0][CTP_W-1:0]   ctp,
  // optical transmitters (payload per BC to the transceivers)
  output logic [N_OPT_TX-1:0][LINK_W-1:0] opt_tx_data,
  output logic [N_OPT_TX-1:0]           opt_tx_en,
  // G-link readout byte streams (120 MHz) to the transceivers
  output logic [7:0]                    gl_daq_byte,
  output logic [7:0]                    gl_roi_byte
);

  localparam int MW      = N_THR * MULT_W;          // 24
  localparam int N_SLOTS = N_LINK_PROC * ROIS_PER_LINK;
  localparam int N_STAT  = 32;
  localparam int W_DAQ   = N_PROC * PROC_W + MW + N_PROC;
  localparam int W_ROI   = N_SLOTS * ROI_W + MW + N_THR + 8;

  // ---------------------------------------------------------------- control
  cmx_mode_e            mode;
  logic                 proc_en, ctp80, cpm_fmt, jem_fmt, sys_role, cable2_out, clr_err;
  logic [15:0]          proc_mask;
  logic [6:0]           lat_daq, lat_roi;
  logic [N_OPT_TX-1:0][3:0] tx_sel;
  logic [N_STAT-1:0][15:0]  status;
  logic [11:0]          bcid;
  logic                 orbit_err;

  vme_regs #(.N_TX(N_OPT_TX), .N_STAT(N_STAT)) u_vme (
    .clk(clk40), .rst_n,
    .geo_slot, .vme_addr, .vme_ds, .vme_write, .vme_wdata, .vme_rdata, .vme_dtack,
    .mode, .proc_en, .ctp80, .cpm_fmt, .jem_fmt, .sys_role, .cable2_out,
    .proc_mask, .lat_daq, .lat_roi, .clr_err, .tx_sel, .status,
    .win_addr, .win_re, .win_we, .win_wdata, .win_rdata
  );

  bc_counter u_bc (.clk(clk40), .rst_n, .bcr(ttc_bcr), .bcid_q(bcid), .orbit_err);

  // ------------------------------------------------------ backplane inputs
  logic [N_PROC-1:0][BP_W-1:0]   leg_q;
  logic [N_PROC-1:0]             leg_perr;
  logic [N_PROC-1:0][15:0]       leg_err_cnt;
  logic [N_PROC-1:0][PROC_W-1:0] r160_word;
  logic [N_PROC-1:0]             r160_perr, r160_valid;
  logic [N_PROC-1:0][15:0]       r160_err_cnt, r160_realign_cnt;
  logic [N_PROC-1:0][PROC_W-1:0] raw_q;      // 160 Mb/s data in the BC domain
  logic [N_PROC-1:0]             raw_perr_q;
  logic                          legacy_mode;

  assign legacy_mode = (mode == MODE_CMM_E);

  for (genvar i = 0; i < N_PROC; i++) begin : g_bp
    bp_rx40 u_rx40 (
      .clk(clk40), .rst_n, .en(legacy_mode && proc_mask[i]), .clr_err,
      .bp_in(bp_in[i]), .data_q(leg_q[i]), .perr_q(leg_perr[i]),
      .err_cnt(leg_err_cnt[i])
    );
    bp_rx160 u_rx160 (
      .clk80(clk80_rec[i]), .rst_n, .clr_err,
      .d_in(bp_in[i][BP_W-1:0]), .clkpar_in(bp_in[i][BP_W]),
      .word_q(r160_word[i]), .perr_q(r160_perr[i]), .valid_q(r160_valid[i]),
      .err_cnt(r160_err_cnt[i]), .realign_cnt(r160_realign_cnt[i])
    );
  end

  // into the BC clock domain (clocks phase-aligned, see header)
  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      raw_q      <= '0;
      raw_perr_q <= '0;
    end else begin
      for (int i = 0; i < N_PROC; i++) begin
        raw_q[i]      <= (!legacy_mode && proc_mask[i]) ? r160_word[i] : '0;
        raw_perr_q[i] <= !legacy_mode && proc_mask[i] && r160_valid[i] && r160_perr[i];
      end
    end
  end

  // ------------------------------------------------------ RoI decoding
  // Both upgrade formats are decoded; the jet (JEM) format is selected by a
  // control bit and fills the first four of the five RoI positions.
  roi_t                  roi [N_PROC][CPM_ROIS];
  roi_t                  croi [N_PROC][CPM_ROIS];
  roi_t                  jroi [N_PROC][JEM_ROIS];
  logic [N_PROC-1:0]     excess, cexcess, jexcess;
  logic [N_PROC-1:0][MW-1:0] mult_roi, mult;

  for (genvar i = 0; i < N_PROC; i++) begin : g_roi
    cpm_roi_decoder u_dec (.word(raw_q[i]), .fmt(cpm_fmt), .roi(croi[i]), .excess(cexcess[i]));
    jem_roi_decoder u_jdec (.word(raw_q[i]), .roi(jroi[i]), .excess(jexcess[i]));
    roi_multiplicity #(.N_ROI(CPM_ROIS)) u_mult (.roi(roi[i]), .mult(mult_roi[i]));
  end

  always_comb begin
    for (int i = 0; i < N_PROC; i++) begin
      for (int r = 0; r < CPM_ROIS; r++) roi[i][r] = jem_fmt ? '0 : croi[i][r];
      if (jem_fmt)
        for (int r = 0; r < JEM_ROIS; r++) roi[i][r] = jroi[i][r];
      excess[i] = jem_fmt ? jexcess[i] : cexcess[i];
    end
  end

  always_comb begin
    for (int i = 0; i < N_PROC; i++) begin
      unique case (mode)
        MODE_CMM_E: mult[i] = leg_q[i];
        MODE_TEST:  mult[i] = raw_q[i][PROC_W-1 -: BP_W];   // first DDR word
        default:    mult[i] = mult_roi[i];
      endcase
    end
  end

  // ------------------------------------------------------ crate and system sums
  logic [MW-1:0]    crate_sum, sys_sum;
  logic [N_THR-1:0] crate_sat, sys_sat;

  hit_sum #(.N_IN(N_PROC), .N_THR(N_THR), .MBITS(MULT_W)) u_crate_sum (
    .clk(clk40), .rst_n, .mask(proc_mask[N_PROC-1:0]), .mult_in(mult),
    .sum_q(crate_sum), .sat_q(crate_sat)
  );

  logic [N_CABLE-1:0][BP_W-1:0] cab_rx;
  logic [N_CABLE-1:0]           cab_perr;
  logic [N_CABLE-1:0][15:0]     cab_err_cnt;
  logic [N_CABLE-1:0]           cab_dir;
  logic [N_CABLE-1:0][BP_W:0]   cab_pad_out;
  logic [N_CABLE-1:0]           cab_pad_oe;

  assign cab_dir = {1'b0, cable2_out, !sys_role};

  for (genvar c = 0; c < N_CABLE; c++) begin : g_cab
    lvds_cable_port #(.CAN_DRIVE(c < 2)) u_port (
      .clk(clk40), .rst_n, .dir_out(cab_dir[c]), .clr_err,
      .tx_data(crate_sum), .pad_out(cab_pad_out[c]), .pad_oe(cab_pad_oe[c]),
      .pad_in(cable_in[c]), .rx_data(cab_rx[c]), .rx_perr(cab_perr[c]),
      .err_cnt(cab_err_cnt[c])
    );
  end
  assign cable_out = cab_pad_out[1:0];
  assign cable_oe  = cab_pad_oe[1:0];

  logic [3:0]             sys_mask;
  logic [3:0][MW-1:0]     sys_in;
  assign sys_in   = {cab_rx[2], cab_rx[1], cab_rx[0], crate_sum};
  assign sys_mask = {sys_role, sys_role && !cab_dir[1], sys_role && !cab_dir[0], 1'b1};

  hit_sum #(.N_IN(4), .N_THR(N_THR), .MBITS(MULT_W)) u_sys_sum (
    .clk(clk40), .rst_n, .mask(sys_mask), .mult_in(sys_in),
    .sum_q(sys_sum), .sat_q(sys_sat)
  );

  // ------------------------------------------------------ RoI list, TP links
  logic [N_SLOTS-1:0][ROI_W-1:0] slot;
  logic [7:0]                    roi_count;
  logic                          roi_ovf;
  logic [N_PROC-1:0]             mod_err;

  assign mod_err = excess | raw_perr_q;

  roi_list_builder #(.N_MOD(N_PROC), .N_ROI(CPM_ROIS), .N_SLOTS(N_SLOTS)) u_list (
    .clk(clk40), .rst_n, .roi, .mod_err,
    .slot_q(slot), .count_q(roi_count), .overflow_q(roi_ovf)
  );

  logic [N_PROC-1:0][PROC_W-1:0] raw_d1;
  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) raw_d1 <= '0;
    else        raw_d1 <= raw_q;
  end

  tp_link_mapper #(.N_PROC(N_PROC), .N_TX(N_OPT_TX), .N_SLOTS(N_SLOTS)) u_map (
    .clk(clk40), .rst_n, .mode, .proc_en,
    .raw(proc_en ? raw_d1 : raw_q), .slot, .sel(tx_sel),
    .tx_data_q(opt_tx_data), .tx_en_q(opt_tx_en)
  );

  // ------------------------------------------------------ CTP
  logic t40_q, t40_s;
  logic bc_start80;
  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n) t40_q <= 1'b0; else t40_q <= !t40_q;
  always_ff @(posedge clk80 or negedge rst_n)
    if (!rst_n) t40_s <= 1'b0; else t40_s <= t40_q;
  assign bc_start80 = (t40_q == t40_s);

  logic [MW-1:0]    ctp_sum;
  logic [N_THR-1:0] ctp_sat;
  logic [N_CTP-1:0][CTP_W-2:0] ctp_a, ctp_b;
  assign ctp_sum = sys_role ? sys_sum : crate_sum;
  assign ctp_sat = sys_role ? sys_sat : crate_sat;
  assign ctp_a[0] = {8'b0, ctp_sum};
  assign ctp_a[1] = {24'b0, ctp_sat};
  assign ctp_b[0] = {8'b0, ctp_sum};
  assign ctp_b[1] = {15'b0, roi_ovf, roi_count, ctp_sat};

  ctp_out u_ctp (
    .clk80, .rst_n, .bc_start(bc_start80), .mode80(ctp80),
    .word_a(ctp_a), .word_b(ctp_b), .ctp_q(ctp)
  );

  // ------------------------------------------------------ readout
  logic [N_PROC-1:0][PROC_W-1:0] ro_in, ro_in_d1;
  logic [N_PROC-1:0]             ro_perr, ro_perr_d1;
  always_comb begin
    for (int i = 0; i < N_PROC; i++) begin
      ro_in[i]   = legacy_mode ? {{(PROC_W-BP_W){1'b0}}, leg_q[i]} : raw_q[i];
      ro_perr[i] = legacy_mode ? leg_perr[i] : raw_perr_q[i];
    end
  end
  // inputs delayed one BC so that they share a slice with the sum made from them
  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      ro_in_d1   <= '0;
      ro_perr_d1 <= '0;
    end else begin
      ro_in_d1   <= ro_in;
      ro_perr_d1 <= ro_perr;
    end
  end

  logic [GLINK_W-1:0] daq_w, roi_w;
  logic               daq_dav, roi_dav;
  logic [15:0]        daq_lost, roi_lost, daq_evt, roi_evt;

  readout_ctrl #(.W(W_DAQ), .DEPTH(128), .EVT_DEPTH(8)) u_ro_daq (
    .clk(clk40), .rst_n, .payload({ro_perr_d1, crate_sum, ro_in_d1}), .bcid,
    .l1a(ttc_l1a), .latency(lat_daq), .gl_data(daq_w), .gl_dav(daq_dav),
    .lost_cnt(daq_lost), .evt_cnt(daq_evt)
  );

  readout_ctrl #(.W(W_ROI), .DEPTH(128), .EVT_DEPTH(8)) u_ro_roi (
    .clk(clk40), .rst_n, .payload({roi_ovf, 7'b0, sys_sat, sys_sum, slot}), .bcid,
    .l1a(ttc_l1a), .latency(lat_roi), .gl_data(roi_w), .gl_dav(roi_dav),
    .lost_cnt(roi_lost), .evt_cnt(roi_evt)
  );

  logic [GLINK_FRAME_W-1:0] daq_frame, roi_frame;
  logic signed [7:0]        daq_rd, roi_rd;

  // The readout links run on their own 40.00 MHz clock: a reset
  // synchroniser for that domain and one dual-clock FIFO per link.  Only
  // data words cross; the link side sends idle frames when its FIFO is
  // empty.  A full FIFO (not expected: the writer is 0.2 % faster but each
  // event is at most a few hundred words) drops words and sets a sticky flag.
  logic [1:0] gl_rst_q;
  logic       gl_rst_n;
  always_ff @(posedge clk_gl or negedge rst_n) begin
    if (!rst_n) gl_rst_q <= 2'b00;
    else        gl_rst_q <= {gl_rst_q[0], 1'b1};
  end
  assign gl_rst_n = gl_rst_q[1];

  logic [GLINK_W-1:0] daq_fq, roi_fq, daq_gw, roi_gw;
  logic               daq_full, roi_full, daq_empty, roi_empty, daq_gdav, roi_gdav;
  logic               daq_cdc_ovf, roi_cdc_ovf;

  async_fifo #(.W(GLINK_W), .AW(4)) u_cdc_daq (
    .wclk(clk40), .wrst_n(rst_n), .we(daq_dav), .wdata(daq_w), .full(daq_full),
    .rclk(clk_gl), .rrst_n(gl_rst_n), .re(!daq_empty), .rdata(daq_fq), .empty(daq_empty));
  async_fifo #(.W(GLINK_W), .AW(4)) u_cdc_roi (
    .wclk(clk40), .wrst_n(rst_n), .we(roi_dav), .wdata(roi_w), .full(roi_full),
    .rclk(clk_gl), .rrst_n(gl_rst_n), .re(!roi_empty), .rdata(roi_fq), .empty(roi_empty));

  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      daq_cdc_ovf <= 1'b0;
      roi_cdc_ovf <= 1'b0;
    end else begin
      if (daq_dav && daq_full) daq_cdc_ovf <= 1'b1;
      if (roi_dav && roi_full) roi_cdc_ovf <= 1'b1;
    end
  end

  always_ff @(posedge clk_gl or negedge gl_rst_n) begin
    if (!gl_rst_n) begin
      daq_gw <= '0; daq_gdav <= 1'b0;
      roi_gw <= '0; roi_gdav <= 1'b0;
    end else begin
      daq_gw <= daq_fq; daq_gdav <= !daq_empty;
      roi_gw <= roi_fq; roi_gdav <= !roi_empty;
    end
  end

  glink_encoder u_enc_daq (.clk(clk_gl), .rst_n(gl_rst_n), .data(daq_gw), .dav(daq_gdav),
                           .frame_q(daq_frame), .rd_q(daq_rd));
  glink_encoder u_enc_roi (.clk(clk_gl), .rst_n(gl_rst_n), .data(roi_gw), .dav(roi_gdav),
                           .frame_q(roi_frame), .rd_q(roi_rd));

  glink_mux u_mux_daq (.clk120, .rst_n(gl_rst_n), .frame(daq_frame), .byte_q(gl_daq_byte), .phase_q());
  glink_mux u_mux_roi (.clk120, .rst_n(gl_rst_n), .frame(roi_frame), .byte_q(gl_roi_byte), .phase_q());

  // ------------------------------------------------------ status words
  logic [15:0] ovf_cnt;
  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) ovf_cnt <= '0;
    else if (clr_err) ovf_cnt <= '0;
    else if (roi_ovf && ovf_cnt != 16'hFFFF) ovf_cnt <= ovf_cnt + 16'd1;
  end

  always_comb begin
    status = '0;
    for (int i = 0; i < N_PROC; i++) begin
      status[i] = legacy_mode ? leg_err_cnt[i] : r160_err_cnt[i];
      if (r160_realign_cnt[i] != 0) status[28][i] = 1'b1;
    end
    for (int c = 0; c < N_CABLE; c++)
      status[16 + c] = cab_err_cnt[c];
    status[19] = daq_lost;
    status[20] = roi_lost;
    status[21] = daq_evt;
    status[22] = roi_evt;
    status[23] = ovf_cnt;
    status[24] = {4'b0, bcid};
    status[25] = {orbit_err, 7'b0, roi_count};
    status[26] = {daq_rd, roi_rd};
    status[27] = {crate_sat, sys_sat};
    status[29] = {13'b0, cab_perr};
    status[30] = {14'b0, daq_cdc_ovf, roi_cdc_ovf};
  end

endmodule
