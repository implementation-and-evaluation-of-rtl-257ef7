// equalizer: one-tap frequency-domain equalizer X'(n,k) = Y(n,k) / H(n).
//
// Each received data bin is divided by the current channel estimate of its
// sub-carrier. The division is written as Y * conj(H) / |H|^2 with a
// general divider, because H takes arbitrary values (the document gives the
// operation, not its circuit). |H|^2 = 0 gives an output of 0.
// The common phase error is removed afterwards by phase_track.
// Interface: h_rd_addr/h_rd_data is a synchronous read port of the channel
// estimate RAM (data one cycle after the address).
// Timing: three pipeline stages (RAM read, conjugate product and |H|^2,
// division); out_* valid three cycles after in_valid, one bin per cycle.
module equalizer
  import chest_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [BW-1:0] in_bin,
  input  cpx_t          in_y,
  output logic [BW-1:0] h_rd_addr,
  input  cpx_t          h_rd_data,
  output logic          out_valid,
  output logic [BW-1:0] out_bin,
  output cpx_t          out_x
);

  localparam int PWD = 2*W + 1;
  localparam int NW  = PWD + F + 1;

  logic          s1_valid, s2_valid;
  logic [BW-1:0] s1_bin, s2_bin;
  cpx_t          s1_y;
  cpx_prod_t     s2_num;
  logic [PWD-1:0] s2_den;

  assign h_rd_addr = in_bin;

  logic signed [NW-1:0] q_re, q_im, n_re, n_im, den_s;
  always_comb begin
    n_re  = NW'(s2_num.re) <<< F;
    n_im  = NW'(s2_num.im) <<< F;
    den_s = NW'(s2_den);
    if (s2_den == 0) begin
      q_re = '0;
      q_im = '0;
    end else begin
      q_re = n_re / den_s;
      q_im = n_im / den_s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_bin    <= '0;
      s1_y      <= '0;
      s2_valid  <= 1'b0;
      s2_bin    <= '0;
      s2_num    <= '0;
      s2_den    <= '0;
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_x     <= '0;
    end else begin
      s1_valid  <= in_valid;
      s1_bin    <= in_bin;
      s1_y      <= in_y;
      s2_valid  <= s1_valid;
      s2_bin    <= s1_bin;
      s2_num    <= cmul_conj(s1_y, h_rd_data);
      s2_den    <= PWD'(h_rd_data.re * h_rd_data.re) + PWD'(h_rd_data.im * h_rd_data.im);
      out_valid <= s2_valid;
      out_bin   <= s2_bin;
      out_x     <= '{re: sat(64'(q_re)), im: sat(64'(q_im))};
    end
  end

endmodule
