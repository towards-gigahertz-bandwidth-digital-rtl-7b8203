// tb_correlator_app: end-to-end check of the spectrum averager at N = 64.
// Random 12-bit ADC0 samples stream continuously; the host arms a diff-mode
// run of 3 shots; triggers start the captures (one extra trigger during a
// capture must be skipped and counted). After the run the averaged spectrum
// is read out while the memory side throttles with `stop`. Each of the N
// values is compared with a reference computed here from the same samples:
// mix by exp(-2 pi i n/4), N-point DFT, |X|^2, summed with signs +,-,+.
// The ADC1 input carries different data and must not leak in.
module tb_correlator_app;
  import fmc110_pkg::*;
  localparam int N = 64, M = N / 8, FFT_W = 22, W_INC = 40, DAVG = 16, SH = 0;
  localparam real PI = 3.14159265358979323846;
  localparam int NSHOT = 3;

  logic clk = 0, rst = 1;
  reg_req_t reg_req = '0;
  reg_rsp_t reg_rsp;
  logic trigger_in = 0;
  logic adc0_dval = 0, adc1_dval = 1;
  logic signed [SAMPLE_W-1:0] adc0_data [PAR], adc1_data [PAR];
  logic mem_write_stop = 0, mem_dval;
  logic [63:0] mem_data;
  int checks = 0, failures = 0;

  correlator_app #(.N(N), .FFT_W(FFT_W), .PWR_SHIFT(SH), .W_INC(W_INC), .DAVG_MAX(DAVG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // continuous ADC stream; remember every word by cycle
  int cyc = 0;
  int hist [int][PAR];
  always @(negedge clk) begin
    for (int n = 0; n < PAR; n++) begin
      adc0_data[n] = SAMPLE_W'($urandom);
      adc1_data[n] = 12'sd2000;
      hist[cyc][n] = int'(adc0_data[n]);
    end
    adc0_dval = 1;
  end
  always @(posedge clk) cyc <= cyc + 1;

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    reg_req.wr = 1; reg_req.addr = a[3:0]; reg_req.wdata = d;
    @(negedge clk);
    reg_req.wr = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    reg_req.rd = 1; reg_req.addr = a[3:0];
    @(negedge clk);
    reg_req.rd = 0;
    d = reg_rsp.rdata;
    if (!reg_rsp.rvalid) begin failures++; $display("no read response"); end
  endtask

  real ref_pwr [N];
  real tol [N];

  task automatic add_shot(input int c0, input int s);
    real xr [N], xi [N];
    for (int n = 0; n < N; n++) begin
      int x;
      x = hist[c0 + n / 8][n % 8];
      case (n % 4)
        0: begin xr[n] = x;  xi[n] = 0;  end
        1: begin xr[n] = 0;  xi[n] = -x; end
        2: begin xr[n] = -x; xi[n] = 0;  end
        default: begin xr[n] = 0; xi[n] = x; end
      endcase
    end
    for (int b = 0; b < N; b++) begin
      real er, ei, p;
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        er += xr[n] * $cos(2*PI*b*n/N) + xi[n] * $sin(2*PI*b*n/N);
        ei += xi[n] * $cos(2*PI*b*n/N) - xr[n] * $sin(2*PI*b*n/N);
      end
      p = er*er + ei*ei;
      if (s == 0) begin ref_pwr[b] = 0; tol[b] = 0; end
      ref_pwr[b] += (s % 2 == 1) ? -p : p;
      tol[b] += 40.0 * $sqrt(p) + 200.0;
    end
  endtask

  initial begin
    logic [31:0] d;
    int trig_cyc [NSHOT];
    repeat (3) @(posedge clk);
    rst = 0;
    wr(1, 32'(NSHOT) | 32'h8000_0000);
    wr(0, 32'h1);
    rd(2, d);
    checks++;
    if (d[0] !== 1'b1) begin failures++; $display("not busy after enable"); end
    for (int s = 0; s < NSHOT; s++) begin
      repeat (5 + s) @(negedge clk);
      trigger_in = 1;
      trig_cyc[s] = cyc;
      @(negedge clk);
      trigger_in = 0;
      if (s == 1) begin          // retrigger during the capture
        repeat (2) @(negedge clk);
        trigger_in = 1;
        @(negedge clk);
        trigger_in = 0;
      end
      repeat (M + 5) @(negedge clk);
    end
    // wait for the pipeline and the last shot
    do rd(2, d); while (d[1] !== 1'b1);
    rd(3, d);
    checks++;
    if (d != NSHOT) begin failures++; $display("shots %0d", d); end
    rd(4, d);
    checks++;
    if (d != 1) begin failures++; $display("skipped triggers %0d, expected 1", d); end
    for (int s = 0; s < NSHOT; s++) add_shot(trig_cyc[s] + 1, s);
    // readout with back-pressure
    fork
      wr(0, 32'h5);
      begin
        int got;
        got = 0;
        while (got < N) begin
          @(negedge clk);
          mem_write_stop = ($urandom_range(3) == 0);
          if (mem_dval) begin
            real g, e;
            g = real'($signed(mem_data));
            e = ref_pwr[got];
            checks++;
            if (g - e > tol[got] || e - g > tol[got]) begin
              failures++; $display("bin %0d got %f exp %f (tol %f)", got, g, e, tol[got]);
            end
            got++;
          end
        end
        mem_write_stop = 0;
      end
    join
    repeat (10) @(negedge clk);
    checks++;
    if (mem_dval) begin failures++; $display("extra readout words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
