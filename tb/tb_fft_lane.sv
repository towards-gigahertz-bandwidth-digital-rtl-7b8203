// tb_fft_lane: streams three back-to-back frames of random complex samples
// (and then a gap) through a 32-point lane FFT and compares every output
// coefficient with a directly computed DFT, X[k] = sum x[n] exp(-2 pi i k n / M),
// allowing a small rounding tolerance. Also checks the reported index out_k,
// that every coefficient of a frame appears once, and the latency
// M - 1 + log2(M) from the first input to the first output.
module tb_fft_lane;
  localparam int W = 20, M = 32, TW_W = 18, FR = 3;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_start = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_start;
  logic [$clog2(M)-1:0] out_k;
  logic signed [W-1:0] out_re, out_im;
  int checks = 0, failures = 0;
  int xr [FR][M], xi [FR][M];
  int t_in0, t_out0, cyc = 0;

  fft_lane #(.W(W), .M(M), .TW_W(TW_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    for (int f = 0; f < FR; f++)
      for (int n = 0; n < M; n++) begin
        xr[f][n] = int'($urandom_range(4095)) - 2048;
        xi[f][n] = int'($urandom_range(4095)) - 2048;
      end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int f = 0; f < FR; f++)
      for (int n = 0; n < M; n++) begin
        @(negedge clk);
        if (f == 0 && n == 0) t_in0 = cyc;
        in_valid = 1; in_start = (n == 0);
        in_re = W'(xr[f][n]); in_im = W'(xi[f][n]);
      end
    @(negedge clk);
    in_valid = 0; in_start = 0; in_re = 0; in_im = 0;
  end

  // checker
  initial begin
    bit seen [M];
    real er, ei;
    for (int f = 0; f < FR; f++) begin
      foreach (seen[i]) seen[i] = 0;
      for (int p = 0; p < M; p++) begin
        do @(negedge clk); while (!out_valid);
        if (f == 0 && p == 0) begin
          t_out0 = cyc;
          checks++;
          if (t_out0 - t_in0 != M - 1 + $clog2(M)) begin
            failures++; $display("latency %0d expected %0d", t_out0 - t_in0, M - 1 + $clog2(M));
          end
        end
        checks++;
        if (out_start !== (p == 0)) begin failures++; $display("out_start wrong f=%0d p=%0d", f, p); end
        if (seen[out_k]) begin failures++; $display("index %0d repeated", out_k); end
        seen[out_k] = 1;
        er = 0; ei = 0;
        for (int n = 0; n < M; n++) begin
          er += xr[f][n] * $cos(2*PI*out_k*n/M) + xi[f][n] * $sin(2*PI*out_k*n/M);
          ei += xi[f][n] * $cos(2*PI*out_k*n/M) - xr[f][n] * $sin(2*PI*out_k*n/M);
        end
        checks++;
        if ((out_re - er) > 4.0 || (er - out_re) > 4.0 || (out_im - ei) > 4.0 || (ei - out_im) > 4.0) begin
          failures++;
          $display("f=%0d k=%0d got %0d,%0d exp %f,%f", f, out_k, out_re, out_im, er, ei);
        end
      end
    end
    repeat (2 * M) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("spurious output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
