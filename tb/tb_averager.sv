// tb_averager: runs the averager with M = 16 addresses, 8 bins per word,
// through a plain run of 3 shots and a diff-mode run of 4 shots (odd shots
// subtracted), with addresses in a shuffled order and idle gaps between
// shots, and an extra frame after the run that must be ignored. The RAM is
// then read back and compared with sums kept by the testbench. Also checks
// busy/done/shots.
module tb_averager;
  localparam int PAR = 8, M = 16, W_INC = 16, DAVG_MAX = 16;
  localparam int ACC_W = W_INC + $clog2(DAVG_MAX) + 1;
  logic clk = 0, rst = 1;
  logic arm = 0, diff_mode = 0;
  logic [31:0] depth = 0;
  logic busy, done;
  logic [31:0] shots;
  logic in_valid = 0, in_start = 0;
  logic [$clog2(M)-1:0] in_k = 0, rd_addr = 0;
  logic [W_INC-1:0] in_pwr [PAR];
  logic signed [ACC_W-1:0] rd_data [PAR];
  int checks = 0, failures = 0;
  longint ref_sum [M][PAR];

  averager #(.PAR(PAR), .M(M), .W_INC(W_INC), .DAVG_MAX(DAVG_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(input int s, input bit diff, input bit counted);
    for (int kk = 0; kk < M; kk++) begin
      int k;
      k = (kk * 7 + s) % M;
      @(negedge clk);
      in_valid = 1; in_start = (kk == 0); in_k = k[$clog2(M)-1:0];
      for (int q = 0; q < PAR; q++) begin
        in_pwr[q] = W_INC'($urandom);
        if (counted) begin
          if (s == 0) ref_sum[k][q] = 0;
          if (diff && s[0]) ref_sum[k][q] -= longint'(in_pwr[q]);
          else              ref_sum[k][q] += longint'(in_pwr[q]);
        end
      end
    end
    @(negedge clk);
    in_valid = 0; in_start = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic run(input int nshots, input bit diff);
    @(negedge clk);
    depth = nshots; diff_mode = diff; arm = 1;
    @(negedge clk);
    arm = 0;
    checks++;
    if (!busy || done) begin failures++; $display("not busy after arm"); end
    for (int s = 0; s < nshots; s++) send_frame(s, diff, 1);
    checks++;
    if (busy || !done || shots != nshots) begin
      failures++; $display("after run: busy=%0d done=%0d shots=%0d", busy, done, shots);
    end
    send_frame(1, diff, 0);   // must be ignored
    for (int k = 0; k < M; k++) begin
      @(negedge clk);
      rd_addr = k[$clog2(M)-1:0];
      @(negedge clk);
      for (int q = 0; q < PAR; q++) begin
        checks++;
        if (longint'(rd_data[q]) != ref_sum[k][q]) begin
          failures++; $display("k=%0d q=%0d got %0d exp %0d", k, q, rd_data[q], ref_sum[k][q]);
        end
      end
    end
  endtask

  initial begin
    for (int q = 0; q < PAR; q++) in_pwr[q] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(3, 0);
    run(4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
