// hit_sum -- saturating multiplicity merger (crate or system level).
//
// The CMM produces its multiplicity triggers in two steps: each crate CMM
// adds the hit counts of the processor modules in its crate, and a system
// CMM adds the crate results received on cables.  Each input word holds
// N_THR counts of MBITS bits, threshold t in bits [MBITS*t +: MBITS]; the sum
// for each threshold saturates at 2**MBITS-1 (7 for 3-bit counts).  The
// two-level scheme is the specification's; the word layout, the saturation
// value and the single register stage are this design's reading of the CMM
// it replaces.  Inputs whose mask bit is 0 are ignored.
//
// Timing: one register stage, sum_q follows the inputs by one clock (1 BC).
// sat_q flags, per threshold, that the true sum exceeded the maximum.
module hit_sum #(
  parameter int N_IN  = 16,
  parameter int N_THR = 8,
  parameter int MBITS = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_IN-1:0]             mask,
  input  logic [N_IN-1:0][N_THR*MBITS-1:0] mult_in,
  output logic [N_THR*MBITS-1:0]      sum_q,
  output logic [N_THR-1:0]            sat_q
);

  localparam int MAXV = (1 << MBITS) - 1;
  localparam int SUMW = MBITS + $clog2(N_IN + 1);

  logic [N_THR*MBITS-1:0] sum_d;
  logic [N_THR-1:0]       sat_d;

  always_comb begin
    for (int t = 0; t < N_THR; t++) begin
      logic [SUMW-1:0] acc;
      acc = '0;
      for (int i = 0; i < N_IN; i++)
        if (mask[i])
          acc = acc + SUMW'(mult_in[i][MBITS*t +: MBITS]);
      sat_d[t] = (acc > SUMW'(MAXV));
      sum_d[MBITS*t +: MBITS] = sat_d[t] ? MBITS'(MAXV) : acc[MBITS-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
      sat_q <= '0;
    end else begin
      sum_q <= sum_d;
      sat_q <= sat_d;
    end
  end

endmodule
