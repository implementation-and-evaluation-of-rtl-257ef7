// y_buffer: first-in first-out delay buffer for the received data symbols.
//
// The decoder-based channel estimate needs the received bin Y(n,i) at the
// moment the constellation mapper returns the reconstructed point X~(n,i),
// several OFDM symbols later (up to 6 symbols, at the lowest rate). Every
// received data bin is written as it leaves the FFT; the buffer controller
// reads one bin each time the mapper delivers a reconstructed bin. Since both
// streams carry the bins of each symbol in the same order, a FIFO keeps them
// aligned. DEPTH = 512 covers (6 + 1) symbols of 64 bins; the depth is this
// design's own choice, derived from the largest feedback delay.
// Timing: synchronous-read RAM, rd_data/rd_valid one cycle after rd_en.
// overflow/underflow are sticky error flags (write when full / read when
// empty); the offending access is dropped. clear empties the buffer (used at
// the start of each packet so that bins of an aborted packet cannot pair with
// the next packet's reconstructed points); it takes priority over a write or
// read in the same cycle.
module y_buffer
  import chest_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   wr_en,
  input  cpx_t                   wr_data,
  input  logic                   rd_en,
  output logic                   rd_valid,
  output cpx_t                   rd_data,
  output logic [$clog2(DEPTH):0] count,
  output logic                   overflow,
  output logic                   underflow
);

  localparam int AW = $clog2(DEPTH);

  cpx_t          mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && (count != (AW+1)'(DEPTH) || do_rd);
  assign do_rd = rd_en && count != 0;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
    if (do_rd) rd_data   <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      rd_valid  <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      rd_valid <= do_rd && !clear;
      if (clear) begin
        wptr  <= '0;
        rptr  <= '0;
        count <= '0;
      end else begin
        if (do_wr) wptr <= AW'((int'(wptr) + 1) % DEPTH);
        if (do_rd) rptr <= AW'((int'(rptr) + 1) % DEPTH);
        count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      end
      if (wr_en && !do_wr && !clear) overflow  <= 1'b1;
      if (rd_en && !do_rd && !clear) underflow <= 1'b1;
    end
  end

endmodule
