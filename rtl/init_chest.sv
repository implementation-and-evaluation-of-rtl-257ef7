// init_chest: initial least-squares channel estimate from the long preamble.
//
// The two long-training symbols arrive from the FFT one bin per valid cycle.
// Bins of the first symbol (SYM_LTS1) are stored in a NSC-entry buffer. When
// the same bin of the second symbol (SYM_LTS2) arrives, the two received
// values are averaged and divided by the known training value X = +-1, which
// is a sign change (zero on unused bins):
//     H_I(n) = (Y_L1(n) + Y_L2(n)) / 2 * L(n)
// The average follows the document's LS estimate; the bin-indexed buffer and
// the round-toward-minus-infinity halving are this design's own choices.
// Timing: one output per LTS2 input, registered, one cycle latency. Output
// bins come in the order the LTS2 bins arrive; out_last marks bin NSC-1.
module init_chest
  import chest_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  sym_t          in_type,
  input  logic [BW-1:0] in_bin,
  input  cpx_t          in_data,
  output logic          out_valid,
  output logic [BW-1:0] out_bin,
  output logic          out_last,
  output cpx_t          out_data
);

  cpx_t lts1_buf [NSC];

  // Sign table of the training sequence in FFT bin order.
  function automatic logic [1:0] lts_code(input logic [BW-1:0] b);
    int v;
    v = lts_value(int'(b));
    if (v > 0) return 2'b01;
    if (v < 0) return 2'b11;
    return 2'b00;
  endfunction

  logic signed [W:0] sum_re, sum_im;
  smp_t              avg_re, avg_im;
  logic [1:0]        code;

  always_comb begin
    sum_re = (W+1)'(lts1_buf[in_bin].re) + (W+1)'(in_data.re);
    sum_im = (W+1)'(lts1_buf[in_bin].im) + (W+1)'(in_data.im);
    avg_re = smp_t'(sum_re >>> 1);
    avg_im = smp_t'(sum_im >>> 1);
    code   = lts_code(in_bin);
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_type == SYM_LTS1) lts1_buf[in_bin] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && in_type == SYM_LTS2;
      out_bin   <= in_bin;
      out_last  <= in_bin == BW'(NSC-1);
      case (code)
        2'b01:   out_data <= '{re: avg_re, im: avg_im};
        2'b11:   out_data <= '{re: sat(-64'(avg_re)), im: sat(-64'(avg_im))};
        default: out_data <= '0;
      endcase
    end
  end

endmodule
