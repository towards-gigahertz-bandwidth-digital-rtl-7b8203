// tb_trigger_ctrl: exercises every trigger source. Software writes must
// fire exactly one pulse; external edges (driven between clock edges) must
// fire for the selected polarity only, 3 clocks after the edge; the pattern
// source must fire exactly on the clocks where the selected word appears.
// The trigger counter register is checked against the pulses seen.
module tb_trigger_ctrl;
  import fmc110_pkg::*;
  logic clk = 0, rst = 1;
  reg_req_t reg_req = '0;
  reg_rsp_t reg_rsp;
  logic ext_trig = 0;
  logic [7:0] pattern_word = 0;
  logic trigger;
  int checks = 0, failures = 0, pulses = 0;

  trigger_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (trigger && !rst) pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); reg_req.wr = 1; reg_req.addr = a[3:0]; reg_req.wdata = d;
    @(negedge clk); reg_req.wr = 0;
  endtask

  // count pulses over a window
  task automatic expect_pulses(input int n, input string what);
    int p0;
    p0 = pulses;
    repeat (8) @(negedge clk);
    checks++;
    if (pulses - p0 != n) begin failures++; $display("%s: %0d pulses, expected %0d", what, pulses - p0, n); end
  endtask

  task automatic edge_test(input trig_src_e src, input int nrise, input int nfall);
    int p0, lat;
    wr(1, 32'(src));
    p0 = pulses;
    #2 ext_trig = 1;
    lat = 0;
    repeat (8) begin @(posedge clk); #1; lat++; if (trigger) break; end
    checks++;
    if (nrise == 1 && lat != 3) begin failures++; $display("rise latency %0d", lat); end
    repeat (8) @(negedge clk);
    #2 ext_trig = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (pulses - p0 != nrise + nfall) begin
      failures++; $display("edge source %0d: %0d pulses", src, pulses - p0);
    end
  endtask

  initial begin
    logic [31:0] d;
    int hits, fired;
    repeat (3) @(posedge clk);
    rst = 0;
    // software
    wr(1, 32'(TRIG_SOFTWARE));
    fork wr(2, 1); expect_pulses(1, "software"); join
    #2 ext_trig = 1; repeat (5) @(negedge clk); #2 ext_trig = 0;
    expect_pulses(0, "external edge while software selected");
    edge_test(TRIG_RISING, 1, 0);
    edge_test(TRIG_FALLING, 0, 1);
    edge_test(TRIG_BOTH, 1, 1);
    // pattern
    wr(1, 32'(TRIG_PATTERN) | (32'h3C << 8));
    hits = 0; fired = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      pattern_word = (i % 17 == 0) ? 8'h3C : 8'($urandom_range(255));
      if (pattern_word == 8'h3C) hits++;
      @(posedge clk); #1;
      if (trigger) fired++;
    end
    checks++;
    if (hits != fired) begin failures++; $display("pattern hits %0d fired %0d", hits, fired); end
    @(negedge clk); pattern_word = 0;
    repeat (3) @(negedge clk);
    @(negedge clk); reg_req.rd = 1; reg_req.addr = 3;
    @(negedge clk); reg_req.rd = 0; d = reg_rsp.rdata;
    checks++;
    if (d != pulses) begin failures++; $display("count register %0d, pulses %0d", d, pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
