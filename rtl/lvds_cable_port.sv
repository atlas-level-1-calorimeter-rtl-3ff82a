// lvds_cable_port -- one LVDS cable port between crate and system CMX.
//
// Crate-level results travel from crate to system modules on cables of 25
// LVDS signals at 40 MHz, through passive rear transition modules.  This
// port either drives the cable (crate module) or receives from it (system
// module).  In the cabling scheme of the CMM system, ports 1 and 2 are
// configurable for input or output and port 3 is input only; the CAN_DRIVE
// parameter reflects that.  Using the 25th signal as odd parity over the 24
// data bits, as on the backplane, is this design's assumption.
//
// Interface: when dir_out is 1 (and CAN_DRIVE), tx_data is registered with
// its parity onto pad_out and pad_oe is 1 (latency 1 BC).  Otherwise pad_in
// is registered into rx_data and its parity checked (latency 1 BC); rx_perr
// flags an error and err_cnt counts them (saturating).
module lvds_cable_port
  import cmx_pkg::*;
#(
  parameter bit CAN_DRIVE = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            dir_out,
  input  logic            clr_err,
  input  logic [BP_W-1:0] tx_data,
  output logic [BP_W:0]   pad_out,
  output logic            pad_oe,
  input  logic [BP_W:0]   pad_in,
  output logic [BP_W-1:0] rx_data,
  output logic            rx_perr,
  output logic [15:0]     err_cnt
);

  logic drive;
  logic perr;
  assign drive = CAN_DRIVE && dir_out;
  assign perr  = !drive && ((^pad_in) == 1'b0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pad_out <= '0;
      pad_oe  <= 1'b0;
      rx_data <= '0;
      rx_perr <= 1'b0;
      err_cnt <= '0;
    end else begin
      pad_oe  <= drive;
      pad_out <= drive ? {odd_par24(tx_data), tx_data} : '0;
      rx_data <= drive ? '0 : pad_in[BP_W-1:0];
      rx_perr <= perr;
      if (clr_err)
        err_cnt <= '0;
      else if (perr && err_cnt != 16'hFFFF)
        err_cnt <= err_cnt + 16'd1;
    end
  end

endmodule
