// dpram: simple dual-port RAM of complex samples, one write port and one
// synchronous read port (read data one cycle after the address). Used to
// hold the per-sub-carrier channel estimate. A read of the address being
// written in the same cycle returns the old content.
module dpram
  import chest_pkg::*;
#(
  parameter int DEPTH = NSC
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  cpx_t                     wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output cpx_t                     rd_data
);

  cpx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
