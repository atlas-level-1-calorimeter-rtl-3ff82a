// readout_ctrl -- L1A readout of one G-link stream (DAQ or RoI).
//
// When the Level-1 Accept (L1A) arrives, the CMX reads out the data it saw
// at the bunch crossing that caused it: its input and output data to the
// DAQ readout driver, and (system modules) its results to the RoI readout
// driver, each over a 20-bit G-link with a data-available (DAV) flag at
// 40 MHz.  That is the specification's; the buffering scheme and the frame
// are this design's:
//   * every BC the payload and its BC number are written into a circular
//     latency buffer of DEPTH entries;
//   * on L1A the entry written 'latency' BCs earlier is copied into a
//     derandomising event FIFO of EVT_DEPTH events; if the FIFO is full the
//     event is dropped and 'lost_cnt' counts it;
//   * the event at the head of the FIFO is sent as one header word
//     {BCID[11:0], event number[7:0]} followed by ceil(W/20) payload words,
//     least significant bits first, with DAV high on each of them.
//     Between events DAV is low and the data word is zero.
//
// Timing: one G-link word per BC.  An L1A at BC n for latency L reads the
// payload presented at BC n-L; the header is on gl_data 2 BCs after the BC that sampled the L1A when
// the FIFO is empty.  latency must be in 1..DEPTH-1.
module readout_ctrl
  import cmx_pkg::*;
#(
  parameter int W         = 64,
  parameter int DEPTH     = 128,
  parameter int EVT_DEPTH = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [W-1:0]              payload,
  input  logic [11:0]               bcid,
  input  logic                      l1a,
  input  logic [$clog2(DEPTH)-1:0]  latency,
  output logic [GLINK_W-1:0]        gl_data,
  output logic                      gl_dav,
  output logic [15:0]               lost_cnt,
  output logic [15:0]               evt_cnt
);

  localparam int AW    = $clog2(DEPTH);
  localparam int EW    = $clog2(EVT_DEPTH);
  localparam int NWORD = (W + GLINK_W - 1) / GLINK_W;
  localparam int PW    = NWORD * GLINK_W;
  localparam int CW    = $clog2(NWORD + 1);

  typedef struct packed {
    logic [11:0] bcid;
    logic [W-1:0] data;
  } slice_t;

  // latency buffer
  slice_t          pipe [DEPTH];
  logic [AW-1:0]   wp;
  slice_t          rd_q;
  logic            rd_vld;

  always_ff @(posedge clk) begin
    pipe[wp] <= '{bcid: bcid, data: payload};
    rd_q     <= pipe[wp - latency];
  end

  // derandomiser
  slice_t          fifo [EVT_DEPTH];
  logic [7:0]      fifo_num [EVT_DEPTH];
  logic [EW:0]     f_wp, f_rp;
  logic            f_full, f_empty;
  assign f_full  = (f_wp[EW] != f_rp[EW]) && (f_wp[EW-1:0] == f_rp[EW-1:0]);
  assign f_empty = (f_wp == f_rp);

  // serializer
  logic            busy;
  logic [CW-1:0]   word_i;
  logic [PW-1:0]   shreg;

  always_ff @(posedge clk) begin
    if (rd_vld && !f_full) begin
      fifo[f_wp[EW-1:0]]     <= rd_q;
      fifo_num[f_wp[EW-1:0]] <= evt_cnt[7:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rd_vld   <= 1'b0;
      f_wp     <= '0;
      f_rp     <= '0;
      busy     <= 1'b0;
      word_i   <= '0;
      shreg    <= '0;
      gl_data  <= '0;
      gl_dav   <= 1'b0;
      lost_cnt <= '0;
      evt_cnt  <= '0;
    end else begin
      wp     <= wp + 1'b1;
      rd_vld <= l1a;
      if (rd_vld) begin
        if (f_full) begin
          if (lost_cnt != 16'hFFFF) lost_cnt <= lost_cnt + 16'd1;
        end else begin
          f_wp    <= f_wp + 1'b1;
          evt_cnt <= evt_cnt + 16'd1;
        end
      end

      if (!busy) begin
        gl_data <= '0;
        gl_dav  <= 1'b0;
        if (!f_empty) begin
          gl_data <= {fifo[f_rp[EW-1:0]].bcid, fifo_num[f_rp[EW-1:0]]};
          gl_dav  <= 1'b1;
          shreg   <= PW'(fifo[f_rp[EW-1:0]].data);
          f_rp    <= f_rp + 1'b1;
          word_i  <= '0;
          busy    <= 1'b1;
        end
      end else begin
        gl_data <= shreg[GLINK_W-1:0];
        gl_dav  <= 1'b1;
        shreg   <= shreg >> GLINK_W;
        word_i  <= word_i + 1'b1;
        if (word_i == CW'(NWORD - 1))
          busy <= 1'b0;
      end
    end
  end

endmodule
