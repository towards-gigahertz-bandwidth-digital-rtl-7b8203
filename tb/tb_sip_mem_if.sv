// tb_sip_mem_if: memory interface with its three clock domains (app 125 MHz,
// host ~120 MHz, memory 200 MHz, mutually unrelated phases) against the
// behavioural DDR3 controller model. Checks: address-pattern and zero-pattern
// write sequences land in memory (length rounded up to whole bursts of 8);
// application data pushed through the write FIFO is written and then read
// back to the host in order under random host back-pressure; the words-read
// register; that a repeated command value is ignored; that the FIFO's
// almost-full (stop) rises and writes into the full FIFO are counted as
// overflows and reported in register 6; and the burst throughput of a
// read sequence (one 8-word burst per at most 16 memory clocks plus latency
// when the host never stalls).
module tb_sip_mem_if;
  import fmc110_pkg::*;
  localparam int ADDR_W = 28, FIFO_DEPTH = 32;
  logic app_clk = 0, host_clk = 0, mem_clk = 0;
  logic app_rst = 1, host_rst = 1, mem_rst = 1;
  logic app_dval = 0; logic [63:0] app_data = 0; logic app_stop;
  reg_req_t reg_req = '0; reg_rsp_t reg_rsp;
  logic host_rd_valid, host_rd_ready = 0; logic [63:0] host_rd_data;
  logic [ADDR_W-1:0] app_addr; logic [2:0] app_cmd; logic app_en, app_rdy;
  logic [255:0] app_wdf_data; logic app_wdf_wren, app_wdf_end, app_wdf_rdy;
  logic [255:0] app_rd_data; logic app_rd_data_valid;
  int checks = 0, failures = 0;

  sip_mem_if #(.ADDR_W(ADDR_W), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);
  memc_ui_model #(.ADDR_W(ADDR_W)) u_mem (.clk(mem_clk), .*);

  always #4000 app_clk = ~app_clk;
  initial begin #1300; forever #4150 host_clk = ~host_clk; end
  initial begin #700;  forever #2500 mem_clk  = ~mem_clk; end

  initial begin
    repeat (6_000_000) @(posedge app_clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge host_clk); reg_req.wr = 1; reg_req.addr = a[3:0]; reg_req.wdata = d;
    @(negedge host_clk); reg_req.wr = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge host_clk); reg_req.rd = 1; reg_req.addr = a[3:0];
    @(negedge host_clk); reg_req.rd = 0; d = reg_rsp.rdata;
  endtask

  task automatic wait_ready();
    logic [31:0] s;
    repeat (8) @(negedge host_clk);
    do rd(7, s); while (!s[0]);
  endtask

  task automatic run(input mem_cmd_e c, input int addr, input int len, input mem_pat_e p);
    wr(1, addr); wr(2, len); wr(5, 32'(p));
    wait_ready();
    wr(0, 32'(c));
    wait_ready();
  endtask

  task automatic push_app(input int n, input longint base, input bit respect_stop);
    int i = 0;
    while (i < n) begin
      @(negedge app_clk);
      if (respect_stop && app_stop) begin app_dval = 0; continue; end
      app_dval = 1; app_data = 64'(base + i); i++;
    end
    @(negedge app_clk); app_dval = 0;
  endtask

  int n_rx;
  logic [63:0] rx [$];
  always @(posedge host_clk) if (host_rd_valid && host_rd_ready) rx.push_back(host_rd_data);
  // random host back-pressure unless disabled
  bit host_always_ready = 0;
  always @(negedge host_clk) host_rd_ready <= host_always_ready || ($urandom_range(3) != 0);

  initial begin
    logic [31:0] d;
    int w0;
    longint t0, t1;
    repeat (4) @(posedge mem_clk);
    app_rst = 0; host_rst = 0; mem_rst = 0;
    repeat (4) @(posedge host_clk);

    // 1: address pattern, 20 words -> 24 written
    run(MEM_WRITE, 'h100, 20, PAT_ADDRESS);
    check(u_mem.writes == 3, $sformatf("address pattern bursts %0d", u_mem.writes));
    for (int a = 'h100; a < 'h118; a++) check(u_mem.peek(a) == 64'(a), $sformatf("addr word %0h", a));

    // 2: application data through the FIFO (stop honoured), 64 words
    wr(1, 'h1000); wr(2, 64); wr(5, 32'(PAT_USER));
    wr(0, 32'(MEM_NOP));                 // cmd value change to NOP
    wait_ready();
    wr(0, 32'(MEM_WRITE));
    push_app(64, 64'h5000_0000, 1);
    wait_ready();
    check(u_mem.writes == 11, $sformatf("user bursts total %0d", u_mem.writes));
    for (int a = 0; a < 64; a++)
      check(u_mem.peek('h1000 + a) == 64'h5000_0000 + 64'(a), $sformatf("user word %0d", a));
    // repeated WRITE value is ignored
    w0 = u_mem.writes;
    wr(0, 32'(MEM_WRITE));
    repeat (40) @(negedge host_clk);
    check(u_mem.writes == w0, "repeated command ignored");

    // 3: read back 64 words to the host, random back-pressure
    rx.delete();
    run(MEM_READ, 'h1000, 64, PAT_USER);
    repeat (20) @(negedge host_clk);
    check(rx.size() == 64, $sformatf("read words %0d", rx.size()));
    foreach (rx[i]) check(rx[i] == 64'h5000_0000 + 64'(i), $sformatf("read word %0d", i));
    rd(3, d); check(d == 64, $sformatf("words-read register %0d", d));

    // 4: zero pattern over part of the user data (cmd changes READ -> WRITE)
    run(MEM_WRITE, 'h1008, 8, PAT_ZERO);
    check(u_mem.peek('h1008) == 0 && u_mem.peek('h100F) == 0, "zero pattern");
    check(u_mem.peek('h1010) == 64'h5000_0010, "zero pattern stays in its burst");

    // 5: read throughput, host always ready: 32 bursts
    host_always_ready = 1;
    rx.delete();
    wr(1, 'h100); wr(2, 256); wr(0, 32'(MEM_NOP)); wait_ready();
    t0 = longint'($time);
    wr(0, 32'(MEM_READ));
    wait_ready();
    t1 = longint'($time);
    check(rx.size() == 256, $sformatf("long read %0d", rx.size()));
    // host side: the synchronizer needs a few host clocks per word; bound
    // the run at 12 host clocks per word
    check((t1 - t0) < 256 * 12 * 8300, $sformatf("read throughput %0d ps", t1 - t0));
    host_always_ready = 0;

    // 6: overflow: no sequence running, push DEPTH+10 words ignoring stop
    wr(0, 32'(MEM_NOP)); wait_ready();
    push_app(FIFO_DEPTH + 10, 64'h7000, 0);
    check(app_stop == 1, "stop at full FIFO");
    repeat (10) @(negedge host_clk);
    rd(6, d); check(d == 10, $sformatf("overflow count %0d", d));
    // the first DEPTH words are intact
    w0 = u_mem.writes;
    run(MEM_WRITE, 'h2000, FIFO_DEPTH, PAT_USER);
    check(u_mem.writes == w0 + FIFO_DEPTH / 8, "drain bursts");
    for (int a = 0; a < FIFO_DEPTH; a++)
      check(u_mem.peek('h2000 + a) == 64'h7000 + 64'(a), $sformatf("kept word %0d", a));
    check(app_stop == 0, "stop released after drain");
    check(u_mem.bad_cmds == 0, "controller protocol");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
