// memc_ui_model: behavioural model of the user (app_*) interface of a DDR3
// memory controller, for simulation only. Memory is an associative array of
// 64-bit words indexed by word address. Write data beats (256 bits, four
// words) queue up on app_wdf_wren && app_wdf_rdy; a write command
// (app_cmd 0) consumes two beats and stores 8 words at app_addr. A read
// command (app_cmd 1) returns the 8 words as two beats on
// app_rd_data_valid after READ_LAT clocks, in command order. app_rdy and
// app_wdf_rdy are deasserted at random (STALL_PCT percent of clocks) to
// exercise the handshakes. Counters report the commands seen.
module memc_ui_model #(
  parameter int ADDR_W    = 28,
  parameter int READ_LAT  = 12,
  parameter int STALL_PCT = 25
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] app_addr,
  input  logic [2:0]        app_cmd,
  input  logic              app_en,
  output logic              app_rdy,
  input  logic [255:0]      app_wdf_data,
  input  logic              app_wdf_wren,
  input  logic              app_wdf_end,
  output logic              app_wdf_rdy,
  output logic [255:0]      app_rd_data,
  output logic              app_rd_data_valid
);
  logic [63:0] mem [longint];
  logic [255:0] wq [$];
  logic [255:0] rq [$];
  longint rq_time [$];
  longint now = 0;
  int writes = 0, reads = 0, bad_cmds = 0;

  function automatic logic [63:0] peek(input longint a);
    return mem.exists(a) ? mem[a] : 64'hDEAD_BEEF_DEAD_BEEF;
  endfunction

  initial begin
    app_rdy = 1; app_wdf_rdy = 1; app_rd_data_valid = 0; app_rd_data = '0;
  end

  always @(posedge clk) begin
    now++;
    if (app_wdf_wren && app_wdf_rdy) wq.push_back(app_wdf_data);
    if (app_en && app_rdy) begin
      if (app_cmd == 3'd0) begin
        if (wq.size() < 2) bad_cmds++;
        else begin
          logic [255:0] b0, b1;
          b0 = wq.pop_front(); b1 = wq.pop_front();
          for (int w = 0; w < 4; w++) begin
            mem[longint'(app_addr) + longint'(w)]     = b0[64*w +: 64];
            mem[longint'(app_addr) + longint'(4 + w)] = b1[64*w +: 64];
          end
          writes++;
        end
      end else if (app_cmd == 3'd1) begin
        logic [255:0] b;
        for (int h = 0; h < 2; h++) begin
          for (int w = 0; w < 4; w++) b[64*w +: 64] = peek(longint'(app_addr) + longint'(4*h + w));
          rq.push_back(b);
          rq_time.push_back(now + longint'(READ_LAT + h));
        end
        reads++;
      end else bad_cmds++;
    end
    app_rdy     <= ($urandom_range(99) >= STALL_PCT);
    app_wdf_rdy <= ($urandom_range(99) >= STALL_PCT);
    if (rq.size() > 0 && rq_time[0] <= now) begin
      app_rd_data_valid <= 1'b1;
      app_rd_data       <= rq.pop_front();
      void'(rq_time.pop_front());
    end else begin
      app_rd_data_valid <= 1'b0;
    end
  end
endmodule
