// tb_chest_pt_top: end-to-end testbench of the channel estimation and phase
// tracking pipeline, at the design's default sizes.
//
// A behavioural transmitter and channel produce the FFT output of whole
// IEEE 802.11p packets: two long-training symbols and the data symbols of a
// 1600-byte packet, through a three-path channel (all paths inside the
// guard interval) with a common phase error that grows by a fixed step every
// symbol. The decoder loop is modelled as ideal: D symbols after a data
// symbol was equalized (D = 6,5,5,4,4,4,4,4 by rate index) its transmitted
// constellation points come back as the reconstructed symbol. One OFDM
// symbol lasts 800 clock cycles (8 us at 100 MHz).
//
// Packets: rate 0 (BPSK, 20 symbols, its tail never returned), then the
// 1600-byte packets at rate 2 (QPSK 1/2), rate 4 (16-QAM 1/2) and rate 6
// (64-QAM 2/3). Checks: once tracking has settled (symbol index >= D + 2)
// every equalized bin of a used sub-carrier decides to the transmitted
// point (for 64-QAM at most 0.2 % may not, see the low-pass filter), the
// error vector magnitude per packet stays below 6.5 %, the measured phase
// step matches the applied one within 0.3 degrees, no buffer
// error occurs, and each mechanism happened: initial estimate, decoder-based
// EWMA update, phase update with a non-zero rotation, the feedback delays
// 6, 5 and 4, and the buffer flush at a new preamble.
module tb_chest_pt_top;
  import chest_pkg::*;

  localparam real   PI     = 3.14159265358979323846;
  localparam int    PERIOD = 800;
  localparam int    MAXSYM = 270;
  localparam string LTS    = "++--++-+-++++++--++-+-++++0+--++-+-+-----++--+-+-++++";

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]    rate = '0;
  logic [7:0]    alpha_i = '0;
  logic          y_valid = 0, xt_valid = 0;
  sym_t          y_type = SYM_DATA;
  logic [BW-1:0] y_bin = '0, xt_bin = '0;
  cpx_t          y_data = '0, xt_data = '0;
  logic          x_valid, h_valid, cpe_update;
  logic [BW-1:0] x_bin, h_bin;
  cpx_t          x_data, h_data;
  logic [PW-1:0] cpe_theta, cpe_phi;
  logic          ybuf_overflow, ybuf_underflow, lpf_overrun;

  chest_pt_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (600 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- models
  int  delays[8] = '{6, 5, 5, 4, 4, 4, 4, 4};
  int  rbits[8]  = '{24, 36, 48, 72, 96, 144, 192, 216};
  real hre[NSC], him[NSC];                  // channel frequency response
  real txr[MAXSYM][NSC], txi[MAXSYM][NSC];  // transmitted points
  int  cur_mod;                              // 0 BPSK, 1 QPSK, 2 16QAM, 3 64QAM
  real cur_theta;                            // phase step per symbol

  function automatic int q(real v);
    return $rtoi(v * (2.0 ** F) + (v < 0 ? -0.5 : 0.5));
  endfunction

  function automatic bit used(int b);
    int sc;
    sc = b < 32 ? b : b - 64;
    return sc != 0 && sc >= -26 && sc <= 26;
  endfunction

  function automatic real train(int b);
    int sc;
    byte c;
    sc = b < 32 ? b : b - 64;
    if (sc < -26 || sc > 26) return 0.0;
    c = LTS[sc + 26];
    return c == "+" ? 1.0 : (c == "-" ? -1.0 : 0.0);
  endfunction

  function automatic int nlev(int m);
    return m == 0 ? 1 : (m == 1 ? 1 : (m == 2 ? 2 : 4));
  endfunction

  function automatic real kmod(int m);
    return m == 0 ? 1.0 : (m == 1 ? $sqrt(2.0) : (m == 2 ? $sqrt(10.0) : $sqrt(42.0)));
  endfunction

  // nearest amplitude level (per axis) of modulation m
  function automatic real slice(int m, real v);
    real best, bd;
    best = 0; bd = 1e9;
    for (int l = -(2 * nlev(m) - 1); l <= 2 * nlev(m) - 1; l += 2) begin
      real c, d;
      c = l / kmod(m);
      d = (v - c) * (v - c);
      if (d < bd) begin bd = d; best = c; end
    end
    return best;
  endfunction

  function automatic real rnd_level(int m);
    int l;
    l = 2 * $urandom_range(0, 2 * nlev(m) - 1) - (2 * nlev(m) - 1);
    return l / kmod(m);
  endfunction

  task automatic make_channel();
    real ar[3], ai[3];
    int  dl[3];
    ar = '{0.6, 0.25, 0.0}; ai = '{0.0, 0.15, -0.1}; dl = '{0, 3, 5};
    for (int n = 0; n < NSC; n++) begin
      hre[n] = 0; him[n] = 0;
      for (int p = 0; p < 3; p++) begin
        hre[n] += ar[p] * $cos(2*PI*n*dl[p]/NSC) + ai[p] * $sin(2*PI*n*dl[p]/NSC);
        him[n] += ai[p] * $cos(2*PI*n*dl[p]/NSC) - ar[p] * $sin(2*PI*n*dl[p]/NSC);
      end
    end
  endtask

  // ---------------------------------------------------------------- drivers
  // received bin n of symbol slot s (slot 0, 1 = long preamble)
  task automatic send_y(sym_t t, int s, int k);
    for (int n = 0; n < NSC; n++) begin
      real xr, xi, yr, yi, cr, ci, ph;
      if (t == SYM_DATA) begin xr = txr[k][n]; xi = txi[k][n]; end
      else begin xr = train(n); xi = 0.0; end
      ph = cur_theta * s;
      cr = hre[n] * $cos(ph) - him[n] * $sin(ph);
      ci = hre[n] * $sin(ph) + him[n] * $cos(ph);
      yr = cr * xr - ci * xi;
      yi = cr * xi + ci * xr;
      y_valid <= 1; y_type <= t; y_bin <= BW'(n);
      y_data <= '{re: smp_t'(q(yr)), im: smp_t'(q(yi))};
      @(posedge clk);
    end
    y_valid <= 0;
  endtask

  task automatic send_xt(int k);
    for (int n = 0; n < NSC; n++) begin
      xt_valid <= 1; xt_bin <= BW'(n);
      xt_data <= '{re: smp_t'(q(txr[k][n])), im: smp_t'(q(txi[k][n]))};
      @(posedge clk);
    end
    xt_valid <= 0;
  endtask

  // ---------------------------------------------------------------- monitor
  int  out_sym, out_n, mon_d, dec_err, evm_cnt;
  real evm_acc;
  bit  in_packet;
  always @(negedge clk) begin
    if (x_valid && in_packet) begin
      int  b, gr, gi;
      real er, ei, xr, xi;
      b  = int'(x_bin);
      gr = x_data.re; gi = x_data.im;
      xr = gr / (2.0 ** F); xi = gi / (2.0 ** F);
      if (used(b) && out_sym >= mon_d + 2) begin
        er = xr - txr[out_sym][b];
        ei = xi - txi[out_sym][b];
        evm_acc += er * er + ei * ei;
        evm_cnt++;
        checks++;
        if (slice(cur_mod, xr) != txr[out_sym][b] ||
            (cur_mod != 0 && slice(cur_mod, xi) != txi[out_sym][b])) begin
          dec_err++;
          if (cur_mod < 3) failures++;
          if (dec_err < 10)
            $display("symbol %0d bin %0d: got %f,%f sent %f,%f", out_sym, b, xr, xi, txr[out_sym][b], txi[out_sym][b]);
        end
      end
      if (b == NSC - 1) out_sym++;
    end
  end

  // mechanism counters
  int n_init_bins, n_upd_bins, n_cpe_nonzero, n_flush, n_delay[8];
  always @(negedge clk) begin
    if (dut.u_ewma.in_valid && dut.u_ewma.in_init) n_init_bins++;
    if (dut.u_ewma.in_valid && !dut.u_ewma.in_init) n_upd_bins++;
    if (cpe_update && cpe_phi != 0) begin
      n_cpe_nonzero++;
      n_delay[rate]++;
    end
  end

  // ---------------------------------------------------------------- packets
  task automatic run_packet(int r, int nsym, int a, real theta_deg, bit return_tail);
    int  d;
    real th_meas;
    d = delays[r];
    cur_mod = r / 2;
    cur_theta = theta_deg * PI / 180.0;
    for (int k = 0; k < nsym; k++)
      for (int n = 0; n < NSC; n++) begin
        txr[k][n] = used(n) ? rnd_level(cur_mod) : 0.0;
        txi[k][n] = (used(n) && cur_mod != 0) ? rnd_level(cur_mod) : 0.0;
      end
    rate <= 3'(r); alpha_i <= 8'(a);
    out_sym = 0; mon_d = d; dec_err = 0; evm_acc = 0; evm_cnt = 0; in_packet = 1;
    @(posedge clk);
    if (dut.u_ybuf.count != 0) n_flush++;
    send_y(SYM_LTS1, 0, 0);
    repeat (PERIOD - NSC) @(posedge clk);
    send_y(SYM_LTS2, 1, 0);
    repeat (PERIOD - NSC) @(posedge clk);
    for (int k = 0; k < nsym + d - 1; k++) begin
      int j;
      if (k < nsym) send_y(SYM_DATA, k + 2, k);
      else repeat (NSC) @(posedge clk);
      repeat (36) @(posedge clk);
      j = k - d + 1;                         // symbol whose decoding just finished
      if (j >= 0 && (return_tail || k < nsym)) send_xt(j);
      else repeat (NSC) @(posedge clk);
      repeat (PERIOD - 3 * NSC - 36) @(posedge clk);
      if (!return_tail && k >= nsym) break;
    end
    repeat (10) @(posedge clk);
    in_packet = 0;
    checks++;
    if (out_sym != nsym) begin failures++; $display("rate %0d: %0d symbols out of %0d", r, out_sym, nsym); end
    th_meas = real'(cpe_theta) / (2.0 ** PW) * 360.0;
    if (th_meas > 180.0) th_meas -= 360.0;
    $display("rate %0d: %0d symbols, alpha %0d/256, phase step %0.2f deg (measured %0.2f), EVM %0.2f%%, decision errors %0d",
             r, nsym, a, theta_deg, th_meas, 100.0 * $sqrt(evm_acc / (evm_cnt > 0 ? evm_cnt : 1)), dec_err);
    checks++;
    if (th_meas - theta_deg > 0.3 || theta_deg - th_meas > 0.3) begin
      failures++; $display("phase step not tracked");
    end
    checks++;
    if (evm_acc / (evm_cnt > 0 ? evm_cnt : 1) > 0.065 * 0.065) begin failures++; $display("EVM too large"); end
    // 64-QAM: the filter's residual ripple allows a rare wrong decision
    checks++;
    if (dec_err * 500 > evm_cnt) begin failures++; $display("too many decision errors"); end
  endtask

  function automatic int packet_symbols(int r, int bytes);
    // SERVICE (16) + payload + tail (6) bits, rounded up to whole symbols
    return (16 + 8 * bytes + 6 + rbits[r] - 1) / rbits[r];
  endfunction

  initial begin
    make_channel();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    run_packet(0, 20, 64, 3.0, 0);                      // tail never returned
    run_packet(2, packet_symbols(2, 1600), 64, 3.0, 1);
    run_packet(4, packet_symbols(4, 1600), 32, -2.5, 1);
    run_packet(6, packet_symbols(6, 1600), 0, 1.5, 1);
    checks++;
    if (ybuf_overflow || ybuf_underflow || lpf_overrun) begin
      failures++; $display("buffer error flags %b%b%b", ybuf_overflow, ybuf_underflow, lpf_overrun);
    end
    $display("mechanisms: initial-estimate bins %0d, EWMA update bins %0d, phase updates %0d, delay 6/5/4 used %0d/%0d/%0d, buffer flushes %0d",
             n_init_bins, n_upd_bins, n_cpe_nonzero, n_delay[0], n_delay[2], n_delay[4] + n_delay[6], n_flush);
    checks++; if (n_init_bins == 0)   begin failures++; $display("no initial estimate"); end
    checks++; if (n_upd_bins == 0)    begin failures++; $display("no EWMA update"); end
    checks++; if (n_cpe_nonzero == 0) begin failures++; $display("no phase update"); end
    checks++; if (n_delay[0] == 0 || n_delay[2] == 0 || n_delay[4] + n_delay[6] == 0) begin
      failures++; $display("a feedback delay was not exercised");
    end
    checks++; if (n_flush == 0)       begin failures++; $display("no buffer flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
