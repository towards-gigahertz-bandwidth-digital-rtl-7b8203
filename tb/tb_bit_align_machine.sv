// tb_bit_align_machine: answers the machine's PRBS checks from an eye model
// (a check fails unless the tap lies in lo .. lo+EW-1, modulo 26) and checks,
// for eyes that contain tap 0 (search down first) and eyes that do not
// (search up first), including eyes that wrap around, that the machine ends
// with first_edge = lo-1, window = EW+1 and the tap at the eye centre
// lo + EW - (EW+1)/2. A line with no eye must end in `fail`.
module tb_bit_align_machine;
  localparam int WRAP = 26;
  logic clk = 0, rst = 1;
  logic start = 0;
  logic [4:0] tap, first_edge;
  logic [5:0] window;
  logic chk_start, chk_done = 0, chk_err = 0;
  logic busy, done, fail;
  int checks = 0, failures = 0;
  int lo = 0, ew = 8;
  bit no_eye = 0;
  int n_down = 0, n_up = 0;

  bit_align_machine #(.TAP_W(5), .TAP_WRAP(WRAP), .SETTLE(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker stand-in: answers 3 clocks after chk_start
  always @(posedge clk) begin
    chk_done <= 1'b0;
    if (chk_start) begin
      repeat (3) @(posedge clk);
      chk_err  <= no_eye || ((int'(tap) - lo + WRAP) % WRAP >= ew);
      chk_done <= 1'b1;
    end
  end

  task automatic trial(input int l, input int w, input bit none);
    int exp_tap;
    lo = l; ew = w; no_eye = none;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done && !fail) @(negedge clk);
    checks++;
    if (none) begin
      if (!fail) begin failures++; $display("no eye but not failed"); end
    end else begin
      exp_tap = (l + w - (w + 1) / 2) % WRAP;
      if (fail || int'(tap) != exp_tap || int'(first_edge) != (l - 1 + WRAP) % WRAP || int'(window) != w + 1) begin
        failures++;
        $display("eye %0d+%0d: tap %0d (exp %0d) edge %0d window %0d fail %0d", l, w, tap, exp_tap, first_edge, window, fail);
      end
      if ((0 - l + WRAP) % WRAP < w) n_down++; else n_up++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    trial(22, 8, 0);    // holds 0: search down
    trial(5, 10, 0);    // outside: search up
    trial(0, 12, 0);    // starts at the first edge
    trial(20, 6, 0);    // ends at the wrap
    trial(13, 9, 0);
    trial(25, 7, 0);
    trial(3, 8, 1);     // no eye at all
    checks++;
    if (n_down == 0 || n_up == 0) begin failures++; $display("both search directions needed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
