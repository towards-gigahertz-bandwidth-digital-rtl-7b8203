// tb_ddc_fs4: checks the fs/4 down converter against exp(-2*pi*i*n/4)
// applied sample by sample: (1, -i, -1, +i) for n mod 4 = 0..3, including
// the most negative input code, and checks the one-cycle latency of data and
// valid.
module tb_ddc_fs4;
  localparam int PAR = 8, W = 12;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid;
  logic signed [W-1:0] din [PAR];
  logic signed [W:0] i_out [PAR], q_out [PAR];
  int checks = 0, failures = 0;

  ddc_fs4 #(.PAR(PAR), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] held [PAR];
    logic signed [W:0] ei, eq;
    for (int n = 0; n < PAR; n++) din[n] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int n = 0; n < PAR; n++) begin
        din[n] = (t == 0) ? W'(-(1 << (W-1))) : W'($urandom);
        held[n] = din[n];
      end
      in_valid = (t % 3) != 1;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("valid mismatch t=%0d", t); end
      for (int n = 0; n < PAR; n++) begin
        case (n % 4)
          0: begin ei =  13'(held[n]); eq = 0; end
          1: begin ei = 0; eq = -13'(held[n]); end
          2: begin ei = -13'(held[n]); eq = 0; end
          default: begin ei = 0; eq = 13'(held[n]); end
        endcase
        checks++;
        if (i_out[n] !== ei || q_out[n] !== eq) begin
          failures++;
          $display("t=%0d n=%0d x=%0d got %0d,%0d exp %0d,%0d", t, n, held[n], i_out[n], q_out[n], ei, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
