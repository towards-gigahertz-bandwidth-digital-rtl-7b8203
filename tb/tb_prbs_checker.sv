// tb_prbs_checker: feeds 8-bit words of a PRBS-7 stream (7-bit LFSR, two
// leftmost bits XORed back in) to the checker. A clean check of 100 words
// must count 0 errors; a check with isolated single-bit flips must count 3
// errors per flip (the flipped bit itself and the two later bits predicted
// from it, 6 and 7 positions on). Also checks that done comes
// CHECK_CYCLES + 1 clocks after start and that a new start clears the sum.
module tb_prbs_checker;
  localparam int CC = 100;
  logic clk = 0, rst = 1;
  logic [7:0] word = 0;
  logic start = 0, busy, done;
  logic [31:0] err_sum;
  logic [3:0] word_errs;
  int checks = 0, failures = 0;
  logic [6:0] lfsr = 7'h11;
  int flip_at = -1;        // word index to corrupt
  int widx = 0;

  prbs_checker #(.RATIO(8), .CHECK_CYCLES(CC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream generator: word bit 0 is the earliest bit
  always @(negedge clk) begin
    logic [7:0] w;
    for (int j = 0; j < 8; j++) begin
      w[j] = lfsr[6];
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    end
    if (widx % 10 == 3 && flip_at >= 0) w[widx % 8] = ~w[widx % 8];
    word = w;
    widx++;
  end

  task automatic run_check(input int exp_errs);
    int t0, t;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    checks++;
    if (t != CC + 1) begin failures++; $display("done after %0d clocks", t); end
    checks++;
    if (err_sum != exp_errs) begin failures++; $display("errors %0d expected %0d", err_sum, exp_errs); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    run_check(0);
    // corrupt one bit in every 10th word (positions well apart)
    @(negedge clk);
    flip_at = 0;
    repeat (20) @(negedge clk);
    // a check window of CC words holds exactly CC/10 flips when it starts
    // right after a word with widx % 10 == 5
    while (widx % 10 != 6) @(negedge clk);
    run_check(3 * CC / 10);
    flip_at = -1;
    repeat (5) @(negedge clk);
    run_check(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
