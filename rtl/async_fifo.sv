// async_fifo: dual-clock FIFO used wherever data crosses between the
// unrelated clock domains of the ROD FPGA (TTC 40 MHz, RODbus receive
// clocks, event builder clock, S-Link and VME link clocks).
//
// A memory of 2**AW words is written in the wr_clk domain and read in the
// rd_clk domain. Read and write pointers are kept in binary and Gray code;
// each Gray pointer is passed to the other side through a two-flop
// synchronizer, so full and empty are exact on their own side and
// pessimistic (late to clear) on the other. The read port is
// first-word-fall-through: rd_data shows the oldest word whenever rd_empty
// is low, and rd_en pops it. wr_en while wr_full, or rd_en while rd_empty,
// is ignored. wr_count is the fill level seen from the write side.
// The document asks only for FIFOs that decouple the clock domains; the
// Gray-pointer scheme, the fall-through read port and the depths are this
// design's choices.
module async_fifo #(
  parameter int unsigned W  = 32,  // word width
  parameter int unsigned AW = 4    // log2 of the depth
) (
  input  logic         wr_clk,
  input  logic         wr_rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_full,
  output logic [AW:0]  wr_count,
  input  logic         rd_clk,
  input  logic         rd_rst_n,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_empty
);
  logic [W-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic do_wr;
  assign do_wr = wr_en && !wr_full;

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  assign wr_full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wr_count = wbin - gray2bin(rgray_w2);

  // ---------------- read side ----------------
  logic do_rd;
  assign do_rd = rd_en && !rd_empty;

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];

  initial assert (AW >= 2) else $error("async_fifo: AW must be at least 2");

endmodule
