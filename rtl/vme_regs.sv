// vme_regs -- VME-- slave: control and status registers and a moveable
// window onto large memories.
//
// The CMX keeps the VME-- address range of the CMM it replaces: 0x700000 to
// 0x77FFFE for the module in slot 3 and 0x780000 to 0x7FFFFE for the one in
// slot 20 (512 kbytes each, 16-bit words at even addresses).  For the large
// tables and memories of the standalone mode the specification suggests an
// indirect scheme: a register holds the base of a window through which a
// much larger internal space is reached.  Both are built here.  The register
// map, the window in the upper half of the range and the bus timing are this
// design's:
//
//   byte offset  access  content
//   0x000        RW      CTRL [1:0] mode, [2] RoI processing on, [3] CTP at
//                        80 MHz, [4] CPM format (0: 8-bit ET, 1: 6-bit ET
//                        + fine position), [5] system module, [6] cable
//                        port 2 drives (output), [7] JEM (jet) format
//   0x002        RW      processor module enable mask
//   0x004        RW      DAQ readout latency (BCs)
//   0x006        RW      RoI readout latency (BCs)
//   0x008        W       COMMAND, bit 0 clears all error counters (reads 0)
//   0x00A        RW      window base
//   0x040 + 2i   RW      source link of optical transmitter i (>= 12: off)
//   0x200 + 2i   R       status word i
//   0x40000 ...  RW      window: internal word address
//                        {base[14:0], offset[17:1]}
//
// Bus: vme_ds is a one-clock strobe of a synchronised VME-- cycle with
// vme_addr, vme_write and vme_wdata valid.  A register access answers with a
// one-clock vme_dtack (and vme_rdata) on the next clock; a window access
// drives win_re or win_we for one clock after the strobe, expects the read
// data on win_rdata in the clock after that (a synchronous-read memory) and
// answers three clocks after the strobe.  A new strobe must not
// come before the dtack of the previous one.
module vme_regs
  import cmx_pkg::*;
#(
  parameter int N_TX   = 66,
  parameter int N_STAT = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [4:0]             geo_slot,
  input  logic [23:1]            vme_addr,
  input  logic                   vme_ds,
  input  logic                   vme_write,
  input  logic [15:0]            vme_wdata,
  output logic [15:0]            vme_rdata,
  output logic                   vme_dtack,
  // configuration
  output cmx_mode_e              mode,
  output logic                   proc_en,
  output logic                   ctp80,
  output logic                   cpm_fmt,
  output logic                   jem_fmt,
  output logic                   sys_role,
  output logic                   cable2_out,
  output logic [15:0]            proc_mask,
  output logic [6:0]             lat_daq,
  output logic [6:0]             lat_roi,
  output logic                   clr_err,
  output logic [N_TX-1:0][3:0]   tx_sel,
  input  logic [N_STAT-1:0][15:0] status,
  // window
  output logic [31:0]            win_addr,
  output logic                   win_re,
  output logic                   win_we,
  output logic [15:0]            win_wdata,
  input  logic [15:0]            win_rdata
);

  logic [15:0] ctrl_q, base_q;
  logic        selected, in_win;
  logic [18:1] off;
  logic [1:0]  win_pend;   // window access in flight, one bit per stage
  logic        win_wr_q;

  // slot 3 -> 0x700000, slot 20 -> 0x780000; other slots have no range
  always_comb begin
    selected = 1'b0;
    if (geo_slot == 5'd3)  selected = (vme_addr[23:19] == 5'h0E);
    if (geo_slot == 5'd20) selected = (vme_addr[23:19] == 5'h0F);
  end
  assign off    = vme_addr[18:1];
  assign in_win = off[18];

  assign mode       = cmx_mode_e'(ctrl_q[1:0]);
  assign proc_en    = ctrl_q[2];
  assign ctp80      = ctrl_q[3];
  assign cpm_fmt    = ctrl_q[4];
  assign jem_fmt    = ctrl_q[7];
  assign sys_role   = ctrl_q[5];
  assign cable2_out = ctrl_q[6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q    <= '0;
      base_q    <= '0;
      proc_mask <= 16'hFFFF;
      lat_daq   <= 7'd16;
      lat_roi   <= 7'd16;
      clr_err   <= 1'b0;
      for (int i = 0; i < N_TX; i++)
        tx_sel[i] <= (i < N_LINK_RAW) ? 4'(i) : 4'hF;
      vme_rdata <= '0;
      vme_dtack <= 1'b0;
      win_addr  <= '0;
      win_re    <= 1'b0;
      win_we    <= 1'b0;
      win_wdata <= '0;
      win_pend  <= '0;
      win_wr_q  <= 1'b0;
    end else begin
      vme_dtack <= 1'b0;
      clr_err   <= 1'b0;
      win_re    <= 1'b0;
      win_we    <= 1'b0;
      win_pend <= {win_pend[0], 1'b0};
      if (win_pend[1]) begin
        vme_dtack <= 1'b1;
        vme_rdata <= win_wr_q ? 16'h0000 : win_rdata;
      end
      if (vme_ds && selected) begin
        if (in_win) begin
          win_addr  <= {base_q[14:0], off[17:1]};
          win_re    <= !vme_write;
          win_we    <= vme_write;
          win_wdata <= vme_wdata;
          win_pend  <= 2'b01;
          win_wr_q  <= vme_write;
        end else begin
          vme_dtack <= 1'b1;
          vme_rdata <= '0;
          // off is the 16-bit word index: byte offset / 2
          if (off[17:8] == '0) begin
            unique case (off[7:1])
              7'h00: begin
                if (vme_write) ctrl_q <= vme_wdata; else vme_rdata <= ctrl_q;
              end
              7'h01: begin
                if (vme_write) proc_mask <= vme_wdata; else vme_rdata <= proc_mask;
              end
              7'h02: begin
                if (vme_write) lat_daq <= vme_wdata[6:0]; else vme_rdata <= {9'b0, lat_daq};
              end
              7'h03: begin
                if (vme_write) lat_roi <= vme_wdata[6:0]; else vme_rdata <= {9'b0, lat_roi};
              end
              7'h04: begin
                if (vme_write) clr_err <= vme_wdata[0];
              end
              7'h05: begin
                if (vme_write) base_q <= vme_wdata; else vme_rdata <= base_q;
              end
              default: ;
            endcase
          end
          // transmitter source selects at word offsets 0x20 ..
          if (off[17:1] >= 17'h20 && off[17:1] < 17'(32 + N_TX)) begin
            if (vme_write) tx_sel[off[17:1] - 17'h20] <= vme_wdata[3:0];
            else           vme_rdata <= {12'b0, tx_sel[off[17:1] - 17'h20]};
          end
          // status words at word offsets 0x100 ..
          if (off[17:1] >= 17'h100 && off[17:1] < 17'(256 + N_STAT)) begin
            if (!vme_write) vme_rdata <= status[off[17:1] - 17'h100];
          end
        end
      end
    end
  end

  // Handshake rule: one access at a time.
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n)
                                 vme_ds |-> (win_pend == 2'b00));

endmodule
