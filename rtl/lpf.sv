// lpf: frequency-domain complex-factor low-pass filter over the sub-carriers
// of one OFDM symbol of channel estimates.
//
// The filter keeps the part of the channel impulse response that lies inside
// the guard interval (TAPS = 16 samples = 1.6 us at 10 MHz) and removes the
// noise beyond it. Done in the frequency domain this is a circular
// convolution across the NSC bins with complex coefficients
//     Hf(n) = sum_m H(m) * K((n - m) mod NSC),
//     K(d)  = (1/NSC) * sum_{t=0}^{TAPS-1} exp(-j*2*pi*d*t/NSC),
// i.e. the DFT of a rectangular time window of TAPS ones followed by zeros.
// The window follows the document; computing it as a direct convolution with
// LANES parallel complex multiply-accumulate lanes is this design's own
// choice (the document does not say how the filter is built).
//
// Operation: a symbol is written bin by bin (any order, in_bin addresses it)
// into one of two input banks; when bin NSC-1 is written the bank is queued.
// A queued bank is filtered in NSC/LANES passes of NSC cycles; in each pass
// every lane accumulates one output bin. The LANES results of a pass are
// then streamed out in bin order, one per cycle, while the next pass runs.
// A symbol therefore takes NSC*NSC/LANES + LANES + 2 cycles (520 at the
// defaults), well inside the 8 us symbol time at 100 MHz. in_tag travels with
// the symbol to the output. overrun is set (sticky) when a bank is written
// while it still waits or is being filtered.
// Coefficients have CF = W+3 fraction bits; results are truncated back to
// F fraction bits and saturated.
// Null sub-carriers: an IEEE 802.11p symbol uses 52 of the 64 bins; the
// others (DC and the band edges, sub-carriers 27..37 and 0) carry no signal,
// so their estimates are 0. Filtering that notched response as it is smears
// the notch over the whole band (about 18 % error vector magnitude for a
// noise-free three-path channel). With NULL_FILL = 1 (default, this design's
// own choice) the filter reads each null bin as the nearest used bin
// (0 -> 1, 27..31 -> 26, 32..37 -> 38), which removes most of that error at
// no cost beyond an address remap. NULL_FILL = 0 filters the bins unchanged.
module lpf
  import chest_pkg::*;
#(
  parameter int TAPS      = 16,
  parameter int LANES     = 8,
  parameter bit NULL_FILL = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [BW-1:0] in_bin,
  input  cpx_t          in_data,
  input  logic          in_tag,
  output logic          out_valid,
  output logic [BW-1:0] out_bin,
  output logic          out_last,
  output cpx_t          out_data,
  output logic          out_tag,
  output logic          overrun
);

  localparam int CW     = W + 3;
  localparam int CF     = W + 3;
  localparam int NPASS  = NSC / LANES;
  localparam int AW     = 2*W + 4 + BW;   // accumulator width
  localparam real PI    = 3.14159265358979323846;

  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t coef_tab_t [NSC];
  typedef logic signed [AW-1:0] acc_t;

  function automatic coef_tab_t make_coef(input bit imag);
    coef_tab_t tab;
    for (int d = 0; d < NSC; d++) begin
      real s;
      s = 0.0;
      for (int t = 0; t < TAPS; t++) begin
        if (imag) s = s - $sin(2.0 * PI * d * t / NSC);
        else      s = s + $cos(2.0 * PI * d * t / NSC);
      end
      s = s / NSC * (2.0 ** CF);
      tab[d] = coef_t'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
    end
    return tab;
  endfunction

  localparam coef_tab_t K_RE = make_coef(1'b0);
  localparam coef_tab_t K_IM = make_coef(1'b1);

  // ---------------------------------------------------------------- input banks
  cpx_t       bank [2][NSC];
  logic       wr_bank;
  logic [1:0] queued;      // bank holds a complete symbol awaiting or in filtering
  logic [1:0] bank_tag;

  // ---------------------------------------------------------------- filter state
  logic                     running;
  logic                     rd_bank;
  logic [$clog2(NPASS)-1:0] pass;
  logic [BW-1:0]            cyc;
  acc_t                     acc_re [LANES];
  acc_t                     acc_im [LANES];
  cpx_t                     res    [LANES];
  logic                     res_tag;
  logic                     res_last_pass;
  logic [$clog2(NPASS)-1:0] res_pass;
  logic [$clog2(LANES):0]   out_cnt;   // results left to stream

  logic last_step;
  assign last_step = running && cyc == BW'(NSC-1);

  // bin read for convolution input m: itself, or its nearest used bin
  function automatic logic [BW-1:0] src_bin(input logic [BW-1:0] m);
    int sc;
    if (!NULL_FILL) return m;
    sc = (int'(m) < NSC/2) ? int'(m) : int'(m) - NSC;
    if (sc == 0)  return BW'(1);
    if (sc > 26)  return BW'(26);
    if (sc < -26) return BW'(NSC - 26);
    return m;
  endfunction

  // per-lane products of this cycle
  acc_t prod_re [LANES];
  acc_t prod_im [LANES];
  acc_t sum_re  [LANES];
  acc_t sum_im  [LANES];
  always_comb begin
    cpx_t x;
    x = bank[rd_bank][src_bin(cyc)];
    for (int l = 0; l < LANES; l++) begin
      logic [BW-1:0] n, d;
      n = BW'(int'(pass) * LANES + l);
      d = n - cyc;                       // wraps modulo NSC
      prod_re[l] = AW'(x.re * K_RE[d]) - AW'(x.im * K_IM[d]);
      prod_im[l] = AW'(x.re * K_IM[d]) + AW'(x.im * K_RE[d]);
      sum_re[l]  = acc_re[l] + prod_re[l];
      sum_im[l]  = acc_im[l] + prod_im[l];
    end
  end

  // queue of complete banks: set when a bank's last bin is written, cleared
  // when its last pass ends
  logic [1:0] queued_nxt;
  always_comb begin
    queued_nxt = queued;
    if (in_valid && in_bin == BW'(NSC-1)) queued_nxt[wr_bank] = 1'b1;
    if (last_step && pass == ($clog2(NPASS))'(NPASS-1)) queued_nxt[rd_bank] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (in_valid) bank[wr_bank][in_bin] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank       <= 1'b0;
      queued        <= '0;
      bank_tag      <= '0;
      overrun       <= 1'b0;
      running       <= 1'b0;
      rd_bank       <= 1'b0;
      pass          <= '0;
      cyc           <= '0;
      res_tag       <= 1'b0;
      res_last_pass <= 1'b0;
      res_pass      <= '0;
      out_cnt       <= '0;
      for (int l = 0; l < LANES; l++) begin
        acc_re[l] <= '0;
        acc_im[l] <= '0;
        res[l]    <= '0;
      end
    end else begin
      // input side
      if (in_valid) begin
        if (queued[wr_bank]) overrun <= 1'b1;
        if (in_bin == BW'(NSC-1)) begin
          bank_tag[wr_bank] <= in_tag;
          wr_bank           <= ~wr_bank;
        end
      end
      // filter side
      if (!running) begin
        if (queued[0] || queued[1]) begin
          running <= 1'b1;
          rd_bank <= queued[rd_bank] ? rd_bank : ~rd_bank;
          pass    <= '0;
          cyc     <= '0;
        end
      end else begin
        cyc <= cyc + 1'b1;
        for (int l = 0; l < LANES; l++) begin
          if (last_step) begin
            acc_re[l] <= '0;
            acc_im[l] <= '0;
            res[l]    <= '{re: sat(64'(sum_re[l] >>> CF)), im: sat(64'(sum_im[l] >>> CF))};
          end else begin
            acc_re[l] <= acc_re[l] + prod_re[l];
            acc_im[l] <= acc_im[l] + prod_im[l];
          end
        end
        if (last_step) begin
          res_tag       <= bank_tag[rd_bank];
          res_pass      <= pass;
          res_last_pass <= pass == ($clog2(NPASS))'(NPASS-1);
          pass          <= pass + 1'b1;
          if (pass == ($clog2(NPASS))'(NPASS-1)) begin
            running    <= 1'b0;
            rd_bank    <= ~rd_bank;
          end
        end
      end
      queued <= queued_nxt;
      // output side
      if (last_step) out_cnt <= ($clog2(LANES)+1)'(LANES);
      else if (out_cnt != 0) out_cnt <= out_cnt - 1'b1;
    end
  end

  // output serializer: result index = LANES - out_cnt
  logic [$clog2(LANES)-1:0] oidx;
  assign oidx = ($clog2(LANES))'(LANES - int'(out_cnt));

  always_comb begin
    out_valid = out_cnt != 0;
    out_bin   = BW'(int'(res_pass) * LANES + int'(oidx));
    out_last  = out_valid && res_last_pass && out_cnt == 1;
    out_data  = res[oidx];
    out_tag   = res_tag;
  end

endmodule
