// tb_ads5400_phy_sp: calibrates the ADC receiver against a line model with
// different data eyes (some containing tap 0, some not) and different
// whole-sample skews per line (some slaves later than the master, which
// forces master bit slips), then switches the model to a sample ramp and
// checks that every received sample and over-range flag equals the ramp,
// consecutive within and across words. Also checks that each line's tap
// ends inside its eye, near the centre, and that the error register holds
// the errors of the final (failing, far-edge) checks.
module tb_ads5400_phy_sp;
  import fmc110_pkg::*;
  localparam int LINES = 13, TAP_WRAP = 26, EYE_W = 10;
  logic clk_fast = 0, clk = 0, rst = 1;
  logic [LINES-1:0] line_in;
  logic [4:0] tap [LINES];
  reg_req_t reg_req = '0;
  reg_rsp_t reg_rsp;
  logic dval;
  logic signed [LINES-2:0] data [8];
  logic [7:0] ovr, master_word;
  logic prbs = 1;
  int skew [LINES], eye_lo [LINES];
  int ramp;
  int checks = 0, failures = 0;

  ads5400_phy_sp #(.LINES(LINES), .CHECK_CYCLES(64), .CMP_WORDS(32), .TAP_WRAP(TAP_WRAP)) dut (.*);
  adc_lines_model #(.LINES(LINES), .TAP_WRAP(TAP_WRAP), .EYE_W(EYE_W)) model (
    .clk_fast, .prbs, .skew, .eye_lo, .tap, .line(line_in), .ramp
  );

  always #500 clk_fast = ~clk_fast;
  always #4000 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); reg_req.wr = 1; reg_req.addr = a[3:0]; reg_req.wdata = d;
    @(negedge clk); reg_req.wr = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); reg_req.rd = 1; reg_req.addr = a[3:0];
    @(negedge clk); reg_req.rd = 0; d = reg_rsp.rdata;
  endtask

  initial begin
    logic [31:0] d;
    int prev;
    for (int l = 0; l < LINES; l++) begin
      skew[l]   = (l == 0) ? 1 : (l * 5) % 4;      // master 1, slaves 0..3
      eye_lo[l] = (l * 7 + 18) % TAP_WRAP;         // some eyes hold tap 0
    end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (dval) begin failures++; $display("dval before calibration"); end
    wr(0, 32'h4);
    do rd(0, d); while (d[5] !== 1'b1 && d[6] !== 1'b1);
    checks++;
    if (d[6]) begin failures++; $display("eye search failed"); end
    rd(1, d);
    checks++;
    // the last check of every search is the failing one at the far eye edge
    if (d == 0) begin failures++; $display("error register reads 0 after calibration"); end
    rd(2, d);
    $display("master slip %0d, restarts %0d", d[4:0], d[23:8]);
    checks++;
    if (d[4:0] == 0) begin failures++; $display("expected a master slip"); end
    for (int l = 0; l < LINES; l++) begin
      int off;
      off = (int'(tap[l]) - eye_lo[l] + TAP_WRAP) % TAP_WRAP;
      checks++;
      if (off < 2 || off > EYE_W - 3) begin
        failures++; $display("line %0d tap %0d not centred in eye at %0d", l, tap[l], eye_lo[l]);
      end
    end
    // data mode
    prbs = 0;
    repeat (10) @(negedge clk);
    prev = -1;
    for (int w = 0; w < 50; w++) begin
      @(negedge clk);
      checks++;
      if (!dval) begin failures++; $display("dval low"); end
      for (int n = 0; n < 8; n++) begin
        int v;
        v = int'(unsigned'(data[n]));
        checks++;
        if ((prev >= 0 && v != (prev + 1) % 4096) || ovr[n] !== (v % 16 == 0)) begin
          failures++; $display("w=%0d n=%0d sample %0d after %0d ovr %0d", w, n, v, prev, ovr[n]);
        end
        prev = v;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
