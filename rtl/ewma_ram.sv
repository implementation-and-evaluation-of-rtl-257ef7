// ewma_ram: channel estimate memory with exponentially weighted moving
// average update, one word per sub-carrier.
//
// A stream of filtered channel estimates enters one bin per valid cycle. For
// the initial (long-preamble) estimate, in_init = 1, the word is written as
// it is. For a decoder-based estimate H(n,i) the RAM controller reads the
// stored H(n) on one port of a dual-port RAM, forms
//     H(n) <= alpha * H(n) + (1 - alpha) * H(n,i)
// and writes the result back on the other port, as in the document's
// circuit. alpha = alpha_i / 2^AL is configured at run time (the document
// only says it is configurable; AL = 8 fraction bits and truncation are this
// design's choices). The equalizer needs to read the estimate while the
// controller owns both RAM ports, so every write also goes to a second
// dual-port RAM whose read port serves the equalizer (eq_rd_addr ->
// eq_rd_data one cycle later); this copy is this design's own choice.
// Timing: read (1 cycle), weighted sum (1 cycle, registered as the Z^-1 of
// the circuit), write; out_* shows each written word as it is written, two
// cycles after in_valid. One bin per cycle sustained.
module ewma_ram
  import chest_pkg::*;
#(
  parameter int AL = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AL-1:0] alpha_i,
  input  logic          in_valid,
  input  logic [BW-1:0] in_bin,
  input  logic          in_init,
  input  cpx_t          in_data,
  input  logic [BW-1:0] eq_rd_addr,
  output cpx_t          eq_rd_data,
  output logic          out_valid,
  output logic [BW-1:0] out_bin,
  output cpx_t          out_data
);

  cpx_t          old_h;
  logic          s1_valid, s1_init;
  logic [BW-1:0] s1_bin;
  cpx_t          s1_h;

  dpram #(.DEPTH(NSC)) u_ram (
    .clk     (clk),
    .wr_en   (out_valid),
    .wr_addr (out_bin),
    .wr_data (out_data),
    .rd_addr (in_bin),
    .rd_data (old_h)
  );

  dpram #(.DEPTH(NSC)) u_ram_eq (
    .clk     (clk),
    .wr_en   (out_valid),
    .wr_addr (out_bin),
    .wr_data (out_data),
    .rd_addr (eq_rd_addr),
    .rd_data (eq_rd_data)
  );

  localparam int MW = W + AL + 2;
  logic signed [MW-1:0] a, b;
  logic signed [MW-1:0] w_re, w_im;
  assign a    = MW'($signed({1'b0, alpha_i}));
  assign b    = MW'(2**AL) - a;
  assign w_re = a * MW'(old_h.re) + b * MW'(s1_h.re);
  assign w_im = a * MW'(old_h.im) + b * MW'(s1_h.im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_init   <= 1'b0;
      s1_bin    <= '0;
      s1_h      <= '0;
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_data  <= '0;
    end else begin
      s1_valid  <= in_valid;
      s1_init   <= in_init;
      s1_bin    <= in_bin;
      s1_h      <= in_data;
      out_valid <= s1_valid;
      out_bin   <= s1_bin;
      if (s1_init) out_data <= s1_h;
      else         out_data <= '{re: sat(64'(w_re >>> AL)), im: sat(64'(w_im >>> AL))};
    end
  end

endmodule
