// tb_glink_encoder -- self-checking test of the readout frame encoder.
// Random 20-bit words with DAV mostly high, including strongly unbalanced
// words.  Each frame, one clock later, must decode back to the word (control
// field 1100 = as is, 0011 = inverted) or be the fill frame when DAV was
// low; the testbench keeps its own running disparity of the frames on the
// line and checks that it matches and stays within +/-24, and that both
// inverted and plain frames occur.
module tb_glink_encoder;
  import cmx_pkg::*;
  logic clk = 0, rst_n = 0, dav = 0;
  logic [19:0] data = '0;
  logic [23:0] frame_q;
  logic signed [7:0] rd_q;
  int checks = 0, failures = 0, n_inv = 0, n_plain = 0, n_fill = 0;

  glink_encoder dut (.clk, .rst_n, .data, .dav, .frame_q, .rd_q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int line_rd, d;
    line_rd = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      dav  = ($urandom_range(0, 4) != 0);
      case ($urandom_range(0, 3))
        0: data = 20'hFFFFF ^ (20'(1) << $urandom_range(0, 19));
        1: data = 20'h00000 | (20'(1) << $urandom_range(0, 19));
        default: data = 20'($urandom);
      endcase
      @(posedge clk); #1;
      if (!dav) begin
        check(frame_q == 24'hA_FFC00, "fill frame");
        n_fill++;
      end else if (frame_q[23:20] == 4'b1100) begin
        check(frame_q[19:0] == data, "plain data");
        n_plain++;
      end else if (frame_q[23:20] == 4'b0011) begin
        check(frame_q[19:0] == ~data, "inverted data");
        n_inv++;
      end else begin
        check(1'b0, $sformatf("bad control field %b", frame_q[23:20]));
      end
      d = 2 * $countones(frame_q) - 24;
      line_rd += d;
      check(int'(rd_q) == line_rd, $sformatf("running disparity %0d vs %0d", rd_q, line_rd));
      check(line_rd <= 24 && line_rd >= -24, "disparity bounded");
    end
    check(n_inv > 0 && n_plain > 0 && n_fill > 0, "all frame kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
