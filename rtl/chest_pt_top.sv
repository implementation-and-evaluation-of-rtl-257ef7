// chest_pt_top: decoder-based channel estimation and channel-estimate-based
// phase tracking for an IEEE 802.11p OFDM receiver.
//
// The block sits between the receiver's FFT and its de-mapper. Data path:
//   FFT bins Y(n,k) -> equalizer (Y / H(n)) -> phase_track (* exp(-j*phi))
//                   -> X(n,k) to the de-mapper / de-interleaver / decoder.
// Channel estimation:
//   long preamble  -> init_chest (LS average) -> lpf -> ewma_ram (written)
//   data symbols   -> y_buffer, held until the constellation mapper returns
//                     the rebuilt point X~(n,i) of the same bin
//                  -> ce_divider (Y / X~) -> lpf -> ewma_ram (alpha-average)
//   every filtered estimate also feeds phase_track, which measures the phase
//   change between consecutive estimates and predicts the rotation D symbols
//   ahead (D from the rate index).
// The de-mapper, de-interleaver, Viterbi decoder, re-encoder, re-interleaver
// and constellation mapper that close the loop are outside this block: the
// equalized stream leaves through x_*, and the rebuilt points come back
// through xt_*, in the same bin order as the FFT delivered them. The first
// bin of a long preamble empties the received-symbol buffer, so a packet
// whose tail is never returned does not disturb the next one.
//
// Interface: streams of one complex bin per valid cycle with its FFT bin
// index. y_type says whether an FFT symbol is the first or second long
// training symbol or a header/data symbol. rate (0..7) and alpha_i
// (alpha = alpha_i/256) are configuration inputs.
// Timing: x_* follows y_* by 4 cycles. A symbol's estimate needs about 530
// cycles after its last rebuilt bin (the low-pass filter dominates), so the
// FFT symbol spacing must be at least that (an 8 us symbol is 800 cycles at
// 100 MHz). Error flags are sticky.
module chest_pt_top
  import chest_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    rate,
  input  logic [7:0]    alpha_i,
  // FFT output
  input  logic          y_valid,
  input  sym_t          y_type,
  input  logic [BW-1:0] y_bin,
  input  cpx_t          y_data,
  // reconstructed symbols from the constellation mapper
  input  logic          xt_valid,
  input  logic [BW-1:0] xt_bin,
  input  cpx_t          xt_data,
  // equalized, phase-corrected symbols to the de-mapper
  output logic          x_valid,
  output logic [BW-1:0] x_bin,
  output cpx_t          x_data,
  // channel estimate as written to the estimate RAM
  output logic          h_valid,
  output logic [BW-1:0] h_bin,
  output cpx_t          h_data,
  // phase tracking status
  output logic          cpe_update,
  output logic [PW-1:0] cpe_theta,
  output logic [PW-1:0] cpe_phi,
  // errors
  output logic          ybuf_overflow,
  output logic          ybuf_underflow,
  output logic          lpf_overrun
);

  // ------------------------------------------------ initial estimate
  logic          ini_valid;
  logic [BW-1:0] ini_bin;
  cpx_t          ini_data;

  init_chest u_init (
    .clk, .rst_n,
    .in_valid  (y_valid),
    .in_type   (y_type),
    .in_bin    (y_bin),
    .in_data   (y_data),
    .out_valid (ini_valid),
    .out_bin   (ini_bin),
    .out_last  (),
    .out_data  (ini_data)
  );

  // ------------------------------------------------ decoder-based estimate
  logic          yb_valid;
  cpx_t          yb_data;
  logic          xt_valid_d;
  logic [BW-1:0] xt_bin_d;
  cpx_t          xt_data_d;

  y_buffer #(.DEPTH(512)) u_ybuf (
    .clk, .rst_n,
    .clear     (y_valid && y_type == SYM_LTS1 && y_bin == '0),
    .wr_en     (y_valid && y_type == SYM_DATA),
    .wr_data   (y_data),
    .rd_en     (xt_valid),
    .rd_valid  (yb_valid),
    .rd_data   (yb_data),
    .count     (),
    .overflow  (ybuf_overflow),
    .underflow (ybuf_underflow)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xt_valid_d <= 1'b0;
      xt_bin_d   <= '0;
      xt_data_d  <= '0;
    end else begin
      xt_valid_d <= xt_valid;
      xt_bin_d   <= xt_bin;
      xt_data_d  <= xt_data;
    end
  end

  logic          dec_valid;
  logic [BW-1:0] dec_bin;
  cpx_t          dec_h;

  ce_divider u_div (
    .clk, .rst_n,
    .in_valid  (yb_valid && xt_valid_d),
    .in_bin    (xt_bin_d),
    .in_y      (yb_data),
    .in_xt     (xt_data_d),
    .out_valid (dec_valid),
    .out_bin   (dec_bin),
    .out_h     (dec_h)
  );

  // ------------------------------------------------ low-pass filter (shared)
  logic          f_valid, f_last, f_tag;
  logic [BW-1:0] f_bin;
  cpx_t          f_data;

  lpf u_lpf (
    .clk, .rst_n,
    .in_valid  (ini_valid || dec_valid),
    .in_bin    (ini_valid ? ini_bin  : dec_bin),
    .in_data   (ini_valid ? ini_data : dec_h),
    .in_tag    (ini_valid),
    .out_valid (f_valid),
    .out_bin   (f_bin),
    .out_last  (f_last),
    .out_data  (f_data),
    .out_tag   (f_tag),
    .overrun   (lpf_overrun)
  );

  // ------------------------------------------------ estimate RAM with EWMA
  logic [BW-1:0] eq_addr;
  cpx_t          eq_h;

  ewma_ram u_ewma (
    .clk, .rst_n,
    .alpha_i    (alpha_i),
    .in_valid   (f_valid),
    .in_bin     (f_bin),
    .in_init    (f_tag),
    .in_data    (f_data),
    .eq_rd_addr (eq_addr),
    .eq_rd_data (eq_h),
    .out_valid  (h_valid),
    .out_bin    (h_bin),
    .out_data   (h_data)
  );

  // ------------------------------------------------ equalization
  logic          e_valid;
  logic [BW-1:0] e_bin;
  cpx_t          e_x;

  equalizer u_eq (
    .clk, .rst_n,
    .in_valid  (y_valid && y_type == SYM_DATA),
    .in_bin    (y_bin),
    .in_y      (y_data),
    .h_rd_addr (eq_addr),
    .h_rd_data (eq_h),
    .out_valid (e_valid),
    .out_bin   (e_bin),
    .out_x     (e_x)
  );

  phase_track u_pt (
    .clk, .rst_n,
    .rate       (rate),
    .h_valid    (f_valid),
    .h_bin      (f_bin),
    .h_init     (f_tag),
    .h_data     (f_data),
    .x_valid    (e_valid),
    .x_bin      (e_bin),
    .x_data     (e_x),
    .out_valid  (x_valid),
    .out_bin    (x_bin),
    .out_data   (x_data),
    .cpe_update (cpe_update),
    .cpe_theta  (cpe_theta),
    .cpe_phi    (cpe_phi)
  );

  // The two estimate sources never overlap: the preamble precedes every
  // rebuilt data symbol.
  assert property (@(posedge clk) disable iff (!rst_n) !(ini_valid && dec_valid));
  // Rebuilt bins are only returned for buffered received bins.
  assert property (@(posedge clk) disable iff (!rst_n) xt_valid_d |-> yb_valid);

endmodule
