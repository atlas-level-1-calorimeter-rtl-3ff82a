// cmx_pkg -- constants and types shared by the CMX merger FPGA.
//
// The CMX collects trigger data from up to 16 processor modules of one
// crate over the backplane.  In the backward compatible mode each module
// sends 24 bits plus odd parity per bunch crossing (BC, 25 ns); in the newer
// modes it sends four 24-bit DDR words per BC (96 bits) with the parity bit
// encoded in the duty cycle of the forwarded clock line.  These numbers, the
// 12 optical links of 6.4 Gb/s, the 20-bit G-link words and the 32-bit RoI
// words follow the specification.  The 8 thresholds x 3-bit multiplicity
// layout of the 24-bit legacy word, the RoI record and the 128-bit payload
// per link per BC (6.4 Gb/s with 8b/10b = 5.12 Gb/s = 128 bits in 25 ns) are
// this design's reading of it.
package cmx_pkg;

  localparam int N_PROC_MAX = 16;      // processor modules per crate
  localparam int BP_W       = 24;      // data lines per module
  localparam int DDR_WORDS  = 4;       // 24-bit words per BC at 160 Mb/s
  localparam int PROC_W     = BP_W * DDR_WORDS;  // 96 bits per module per BC

  localparam int N_THR      = 8;       // thresholds per legacy word
  localparam int MULT_W     = 3;       // multiplicity bits per threshold
  localparam int MULT_MAX   = (1 << MULT_W) - 1;

  localparam int N_CABLE    = 3;       // LVDS cable ports
  localparam int N_CTP      = 2;       // CTP output connectors
  localparam int CTP_W      = 33;      // lines per CTP connector

  localparam int LINK_W     = 128;     // payload bits per optical link per BC
  localparam int N_LINK_RAW = 12;      // links for the raw backplane data
  localparam int N_LINK_PROC = 6;      // links for the reduced RoI list
  localparam int ROI_W      = 32;      // bits per RoI word sent to the TP
  localparam int ROIS_PER_LINK = LINK_W / ROI_W;   // 4

  localparam int CPM_ROIS   = 5;       // RoIs per CPM backplane word
  localparam int JEM_ROIS   = 4;       // RoIs per JEM backplane word
  localparam int GLINK_W    = 20;      // G-link data word
  localparam int GLINK_FRAME_W = 24;   // encoded G-link frame

  localparam int BC_PER_ORBIT = 3564;  // bunch crossings per LHC orbit

  // Operating modes of the module (sections "backward compatible", "data
  // source for TP" with its test and upgrade sub-modes, and "standalone").
  typedef enum logic [1:0] {
    MODE_CMM_E      = 2'd0,   // CMM emulation, 40 Mb/s backplane
    MODE_TEST       = 2'd1,   // 160 Mb/s, legacy bits to CTP, raw data to TP
    MODE_UPGRADE    = 2'd2,   // 160 Mb/s, RoI format, data to TP
    MODE_STANDALONE = 2'd3    // as upgrade, reduced data to other CMX
  } cmx_mode_e;

  // One RoI as unpacked from a processor backplane word.
  typedef struct packed {
    logic       valid;   // presence bit was set
    logic [3:0] loc;     // index of the presence bit (0 = first column)
    logic [1:0] fine;    // fine position (0 in the 8-bit ET format)
    logic [11:0] et;     // cluster ET (CPM, 8 bits) or jet ET (JEM, 12 bits)
    logic [7:0] thr;     // threshold bits
  } roi_t;

  // Odd parity helper: the bit that makes the total number of ones odd.
  function automatic logic odd_par24(input logic [BP_W-1:0] d);
    return ~(^d);
  endfunction

endpackage
