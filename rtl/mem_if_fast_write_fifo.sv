// mem_if_fast_write_fifo: dual-clock FIFO carrying the data stream of the
// signal-processing application (125 MHz) into the memory interface clock
// domain (200 MHz).
//
// Standard Gray-coded pointer FIFO: each side keeps a binary and a Gray
// pointer, the Gray pointer crosses to the other side through two flops,
// and full/empty are decided from the local pointer and the synchronized
// remote one, so both flags are conservative. DEPTH is a power of two.
// A write while full is dropped and counted in `overflows` (write side);
// `almost_full` rises with AF_SLACK or fewer free entries and serves as the
// stop signal to the writer, leaving room for words already in flight.
// Read side: rd_data shows the head word whenever !empty (first-word
// fall-through); rd_en pops it.
module mem_if_fast_write_fifo #(
  parameter int DW       = 64,
  parameter int DEPTH    = 512,
  parameter int AF_SLACK = 8
) (
  input  logic          wr_clk,
  input  logic          wr_rst,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,
  output logic          almost_full,
  output logic [31:0]   overflows,
  input  logic          rd_clk,
  input  logic          rd_rst,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty
);
  localparam int AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic [AW:0] wbin_nx, rbin_w;
  logic        do_wr;
  assign do_wr   = wr_en && !full;
  assign wbin_nx = wbin + (AW+1)'(do_wr);
  assign rbin_w  = gray2bin(rgray_w2);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin      <= '0;
      wgray     <= '0;
      rgray_w1  <= '0;
      rgray_w2  <= '0;
      overflows <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && full) overflows <= overflows + 1;
    end
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  logic [AW:0] used_w;
  assign used_w      = wbin - rbin_w;
  assign full        = used_w == (AW+1)'(DEPTH);
  assign almost_full = used_w >= (AW+1)'(DEPTH - AF_SLACK);

  // read side
  logic [AW:0] rbin_nx;
  logic        do_rd;
  assign do_rd   = rd_en && !empty;
  assign rbin_nx = rbin + (AW+1)'(do_rd);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty   = rgray == wgray_r2;
  assign rd_data = mem[rbin[AW-1:0]];
endmodule
