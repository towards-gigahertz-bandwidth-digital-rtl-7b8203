// tb_fft_combine: feeds the exact lane transforms F_m[k] of a random
// 64-sample complex sequence (8 lanes of 8 points, lane m = samples 8n+m)
// in a shuffled k order and checks that the outputs X[k + q*M] match the
// directly computed 64-point DFT within rounding, that out_k follows in_k,
// and that the latency is 3 cycles.
module tb_fft_combine;
  localparam int W = 24, M = 8, N = 8 * M, TW_W = 18, FR = 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_start = 0;
  logic [$clog2(M)-1:0] in_k = 0;
  logic signed [W-1:0] in_re [8], in_im [8];
  logic out_valid, out_start;
  logic [$clog2(M)-1:0] out_k;
  logic signed [W-1:0] out_re [8], out_im [8];
  int checks = 0, failures = 0;
  real xr [FR][N], xi [FR][N];
  int korder [M];
  int cyc = 0, t_first_in, t_first_out;

  fft_combine #(.W(W), .M(M), .TW_W(TW_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FR; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = real'(int'($urandom_range(4095)) - 2048);
        xi[f][n] = real'(int'($urandom_range(4095)) - 2048);
      end
    for (int k = 0; k < M; k++) korder[k] = (k * 5 + 3) % M;   // a permutation
    for (int m = 0; m < 8; m++) begin in_re[m] = 0; in_im[m] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < FR; f++)
      for (int kk = 0; kk < M; kk++) begin
        int k;
        k = korder[kk];
        @(negedge clk);
        if (f == 0 && kk == 0) t_first_in = cyc;
        in_valid = 1; in_start = (kk == 0); in_k = k[$clog2(M)-1:0];
        for (int m = 0; m < 8; m++) begin
          real fr, fi;
          fr = 0; fi = 0;
          for (int n = 0; n < M; n++) begin
            fr += xr[f][8*n+m] * $cos(2*PI*k*n/M) + xi[f][8*n+m] * $sin(2*PI*k*n/M);
            fi += xi[f][8*n+m] * $cos(2*PI*k*n/M) - xr[f][8*n+m] * $sin(2*PI*k*n/M);
          end
          in_re[m] = W'($rtoi($floor(fr + 0.5)));
          in_im[m] = W'($rtoi($floor(fi + 0.5)));
        end
      end
    @(negedge clk);
    in_valid = 0; in_start = 0;
  end

  initial begin
    for (int f = 0; f < FR; f++)
      for (int kk = 0; kk < M; kk++) begin
        do @(negedge clk); while (!out_valid);
        if (f == 0 && kk == 0) begin
          t_first_out = cyc;
          checks++;
          if (t_first_out - t_first_in != 3) begin failures++; $display("latency %0d", t_first_out - t_first_in); end
        end
        checks++;
        if (int'(out_k) != korder[kk] || out_start !== (kk == 0)) begin
          failures++; $display("k order: got %0d exp %0d", out_k, korder[kk]);
        end
        for (int q = 0; q < 8; q++) begin
          real er, ei;
          int b;
          b = int'(out_k) + q * M;
          er = 0; ei = 0;
          for (int n = 0; n < N; n++) begin
            er += xr[f][n] * $cos(2*PI*b*n/N) + xi[f][n] * $sin(2*PI*b*n/N);
            ei += xi[f][n] * $cos(2*PI*b*n/N) - xr[f][n] * $sin(2*PI*b*n/N);
          end
          checks++;
          if ((out_re[q] - er) > 8.0 || (er - out_re[q]) > 8.0 || (out_im[q] - ei) > 8.0 || (ei - out_im[q]) > 8.0) begin
            failures++;
            $display("f=%0d bin=%0d got %0d,%0d exp %f,%f", f, b, out_re[q], out_im[q], er, ei);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
