// async_fifo: dual-clock first-in first-out buffer.
//
// This is the design's clock-domain crossing for anything wider than a bit:
// commands go from the 100 MHz bus domain to the 40 MHz system domain and on to
// the 160 MHz chip domain through one of these, and pixel data goes from
// 160 MHz back to 100 MHz for the DMA engines. The document states the purpose
// (a FIFO that also solves the clock-domain crossing); the structure is the
// usual one: a 2**AW-entry memory, binary pointers with one extra wrap bit,
// Gray-coded copies passed through two flip-flops into the other domain, full
// and empty computed from the local pointer and the synchronized remote one.
//
// Interface: write side (wclk) pushes wdata when wr_en and !full. The read side
// (rclk) is first-word fall-through: rdata shows the oldest word whenever
// !empty, and rd_en pops it. A push is seen by the reader 2-3 read clocks
// later; a pop frees its slot for the writer 2-3 write clocks later. Pushing
// when full and popping when empty are ignored (and flagged by assertions).
module async_fifo #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 4
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray;  // read pointer seen in write domain
  logic [AW:0] rq1_wgray, rq2_wgray;  // write pointer seen in read domain
  logic [AW:0] wbin_next, rbin_next;
  logic        do_wr, do_rd;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign do_wr     = wr_en && !full;
  assign do_rd     = rd_en && !empty;
  assign wbin_next = wbin + (AW+1)'(do_wr);
  assign rbin_next = rbin + (AW+1)'(do_rd);

  // Write domain.
  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin      <= '0;
      wgray     <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wbin      <= wbin_next;
      wgray     <= bin2gray(wbin_next);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end

  // Full: the Gray pointers differ only in their two top bits.
  assign full = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});

  // Read domain.
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin      <= '0;
      rgray     <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
    end else begin
      rbin      <= rbin_next;
      rgray     <= bin2gray(rbin_next);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end

  assign empty = (rgray == rq2_wgray);
  assign rdata = mem[rbin[AW-1:0]];

  initial begin
    assert (AW >= 2) else $error("async_fifo: AW must be at least 2");
  end
  a_no_push_full: assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full))
    else $warning("async_fifo: push while full ignored");
  a_no_pop_empty: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd_en && empty))
    else $warning("async_fifo: pop while empty ignored");
endmodule
