// sip_mem_if: moves data between the signal-processing application, the
// external DDR3 memory and the host link.
//
// Three clock domains meet here:
//   app  (125 MHz, locked to the ADC clock)  stream from the application
//   mem  (200 MHz, memory controller)        mem_if_memc burst sequencer
//   host (125 MHz, host link)                registers and read-out stream
// The application stream enters mem_if_fast_write_fifo (app -> mem); its
// almost-full flag is the `stop` returned to the application. Read words go
// through mem_if_read_data_sync (mem -> host). A command is carried to the
// mem side by a toggle synchronizer with its arguments held stable.
//
// Host registers (reg_req/reg_rsp, host clock; read data one cycle after rd):
//   0 command       mem_cmd_e: 0 NOP, 1 read sequence, 2 write sequence.
//                   Executed only if the value changes and the sequencer
//                   waits; NOP keeps it waiting.
//   1 start address (64-bit word address)
//   2 length        (words)
//   3 words read    words delivered to the host since the last read command
//   4 sync state    state of the read data synchronizer
//   5 pattern       mem_pat_e: 0 application data, 1 zeros, 2 addresses
//   6 overflows     writes into the full FIFO
//   7 status        bit0 sequencer waiting (this design's addition)
// Register numbers 0-6 and their meaning follow the source; the numeric
// command and pattern codes are this design's own.
module sip_mem_if
  import fmc110_pkg::*;
#(
  parameter int ADDR_W     = 28,
  parameter int FIFO_DEPTH = 512
) (
  // application side
  input  logic              app_clk,
  input  logic              app_rst,
  input  logic              app_dval,
  input  logic [63:0]       app_data,
  output logic              app_stop,
  // host side
  input  logic              host_clk,
  input  logic              host_rst,
  input  reg_req_t          reg_req,
  output reg_rsp_t          reg_rsp,
  output logic              host_rd_valid,
  input  logic              host_rd_ready,
  output logic [63:0]       host_rd_data,
  // memory controller side
  input  logic              mem_clk,
  input  logic              mem_rst,
  output logic [ADDR_W-1:0] app_addr,
  output logic [2:0]        app_cmd,
  output logic              app_en,
  input  logic              app_rdy,
  output logic [255:0]      app_wdf_data,
  output logic              app_wdf_wren,
  output logic              app_wdf_end,
  input  logic              app_wdf_rdy,
  input  logic [255:0]      app_rd_data,
  input  logic              app_rd_data_valid
);
  // ------------------------------------------------------------ write FIFO
  logic        f_full, f_rd, f_empty;
  logic [63:0] f_data;
  logic [31:0] overflows_app;

  mem_if_fast_write_fifo #(.DW(64), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(app_clk), .wr_rst(app_rst), .wr_en(app_dval), .wr_data(app_data),
    .full(f_full), .almost_full(app_stop), .overflows(overflows_app),
    .rd_clk(mem_clk), .rd_rst(mem_rst), .rd_en(f_rd), .rd_data(f_data), .empty(f_empty)
  );

  // overflow count to the host domain, Gray coded
  logic [31:0] ovf_gray_app, ovf_gray_h1, ovf_gray_h2, ovf_host;
  always_ff @(posedge app_clk) ovf_gray_app <= overflows_app ^ (overflows_app >> 1);
  always_ff @(posedge host_clk) begin
    ovf_gray_h1 <= ovf_gray_app;
    ovf_gray_h2 <= ovf_gray_h1;
  end
  always_comb
    for (int i = 0; i < 32; i++) ovf_host[i] = ^(ovf_gray_h2 >> i);

  // ---------------------------------------------------- host registers
  mem_cmd_e          cmd_q;
  logic [ADDR_W-1:0] addr_q;
  logic [31:0]       len_q;
  mem_pat_e          pat_q;
  logic [31:0]       words_read;
  logic [1:0]        sync_state;
  logic              req_t, ack_h1, ack_h2, idle_h1, idle_h2;
  logic              mem_ready_h;
  logic              ack_t, mem_idle;

  always_ff @(posedge host_clk) begin
    if (host_rst) begin
      ack_h1  <= 1'b0;
      ack_h2  <= 1'b0;
      idle_h1 <= 1'b0;
      idle_h2 <= 1'b0;
    end else begin
      ack_h1  <= ack_t;
      ack_h2  <= ack_h1;
      idle_h1 <= mem_idle;
      idle_h2 <= idle_h1;
    end
  end
  assign mem_ready_h = idle_h2 && (req_t == ack_h2);

  always_ff @(posedge host_clk) begin
    if (host_rst) begin
      cmd_q      <= MEM_NOP;
      addr_q     <= '0;
      len_q      <= '0;
      pat_q      <= PAT_USER;
      req_t      <= 1'b0;
      words_read <= '0;
      reg_rsp    <= '0;
    end else begin
      if (reg_req.wr) begin
        unique case (reg_req.addr)
          4'd0: if (mem_ready_h && mem_cmd_e'(reg_req.wdata[1:0]) != cmd_q) begin
                  cmd_q <= mem_cmd_e'(reg_req.wdata[1:0]);
                  if (mem_cmd_e'(reg_req.wdata[1:0]) != MEM_NOP) begin
                    req_t <= ~req_t;
                    if (mem_cmd_e'(reg_req.wdata[1:0]) == MEM_READ) words_read <= '0;
                  end
                end
          4'd1: addr_q <= reg_req.wdata[ADDR_W-1:0];
          4'd2: len_q  <= reg_req.wdata;
          4'd5: pat_q  <= mem_pat_e'(reg_req.wdata[1:0]);
          default: ;
        endcase
      end
      if (host_rd_valid && host_rd_ready) words_read <= words_read + 1;
      reg_rsp.rvalid <= reg_req.rd;
      unique case (reg_req.addr)
        4'd0:    reg_rsp.rdata <= 32'(cmd_q);
        4'd1:    reg_rsp.rdata <= 32'(addr_q);
        4'd2:    reg_rsp.rdata <= len_q;
        4'd3:    reg_rsp.rdata <= words_read;
        4'd4:    reg_rsp.rdata <= 32'(sync_state);
        4'd5:    reg_rsp.rdata <= 32'(pat_q);
        4'd6:    reg_rsp.rdata <= ovf_host;
        4'd7:    reg_rsp.rdata <= {31'd0, mem_ready_h};
        default: reg_rsp.rdata <= '0;
      endcase
    end
  end

  // ------------------------------------------------ command into mem domain
  logic req_m1, req_m2, go;
  always_ff @(posedge mem_clk) begin
    if (mem_rst) begin
      req_m1 <= 1'b0;
      req_m2 <= 1'b0;
      ack_t  <= 1'b0;
    end else begin
      req_m1 <= req_t;
      req_m2 <= req_m1;
      ack_t  <= req_m2;
    end
  end
  assign go = req_m2 != ack_t;

  logic        rd_valid_m, rd_ready_m;
  logic [63:0] rd_data_m;
  logic [31:0] words_done_m;

  mem_if_memc #(.ADDR_W(ADDR_W)) u_memc (
    .clk(mem_clk), .rst(mem_rst),
    .go, .cmd(cmd_q), .start_addr(addr_q), .length(len_q), .pattern(pat_q),
    .idle(mem_idle), .words_done(words_done_m),
    .fifo_data(f_data), .fifo_empty(f_empty), .fifo_rd(f_rd),
    .rd_valid(rd_valid_m), .rd_ready(rd_ready_m), .rd_data(rd_data_m),
    .app_addr, .app_cmd, .app_en, .app_rdy,
    .app_wdf_data, .app_wdf_wren, .app_wdf_end, .app_wdf_rdy,
    .app_rd_data, .app_rd_data_valid
  );

  // ------------------------------------------------- read data to the host
  mem_if_read_data_sync #(.DW(64)) u_sync (
    .src_clk(mem_clk), .src_rst(mem_rst),
    .in_valid(rd_valid_m), .in_ready(rd_ready_m), .in_data(rd_data_m),
    .dst_clk(host_clk), .dst_rst(host_rst),
    .out_valid(host_rd_valid), .out_ready(host_rd_ready), .out_data(host_rd_data),
    .state(sync_state)
  );
endmodule
