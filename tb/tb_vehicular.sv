// tb_vehicular: the evaluation scenario of the design, without noise: a
// two-path Rayleigh-like highway channel (both paths at 0 dB, 0.5 us = 5
// samples apart at 10 MHz) whose paths turn at different Doppler
// frequencies, for a 5.62 GHz carrier at 40 and 80 MPH, plus a residual
// common phase error of 0.5 degrees per symbol. 1600-byte packets at
// QPSK 1/2, 16-QAM 1/2 and 64-QAM 2/3.
// Doppler per path: f = v / lambda * cos(angle), with angles of 0 and 120
// degrees; one OFDM symbol lasts 8 us.
// For every packet the error vector magnitude (EVM) of the design's output is
// compared with the EVM a preamble-only receiver would reach (the same
// received symbols divided by the exact long-preamble channel, computed
// here). Both paths have equal strength, so the channel has true nulls
// that sweep across the band; bins in a null are lost by any receiver and
// dominate both EVMs. Checks: on every packet the design has a lower EVM
// and fewer wrong hard decisions than the preamble-only receiver, and no
// buffer error occurs. The EVMs and decision error counts are printed.
module tb_vehicular;
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
    repeat (1000 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- models
  int  delays[8] = '{6, 5, 5, 4, 4, 4, 4, 4};
  int  rbits[8]  = '{24, 36, 48, 72, 96, 144, 192, 216};
  real w1, w2;                               // Doppler phase step per symbol of each path
  real pp_acc;                               // preamble-only EVM accumulator
  int  pp_cnt, pp_err;
  localparam real GAIN = 0.45;               // per-path amplitude
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

  // channel of bin n in symbol slot s, including the common phase error
  task automatic chan(int n, int s, output real cr, output real ci);
    real p1, p2, ph;
    p1 = w1 * s + cur_theta * s;
    p2 = w2 * s + cur_theta * s - 2.0 * PI * n * 5 / NSC + 1.0;
    cr = GAIN * ($cos(p1) + $cos(p2));
    ci = GAIN * ($sin(p1) + $sin(p2));
  endtask

  // ---------------------------------------------------------------- drivers
  // received bin n of symbol slot s (slot 0, 1 = long preamble)
  task automatic send_y(sym_t t, int s, int k);
    for (int n = 0; n < NSC; n++) begin
      real xr, xi, yr, yi, cr, ci;
      if (t == SYM_DATA) begin xr = txr[k][n]; xi = txi[k][n]; end
      else begin xr = train(n); xi = 0.0; end
      chan(n, s, cr, ci);
      yr = cr * xr - ci * xi;
      yi = cr * xi + ci * xr;
      if (t == SYM_DATA && used(n) && k >= mon_d + 2) begin
        // preamble-only receiver: divide by the mean channel of the two LTS
        real ar, ai, br, bi, hr, hi, d, zr, zi, er, ei;
        chan(n, 0, ar, ai);
        chan(n, 1, br, bi);
        hr = (ar + br) / 2; hi = (ai + bi) / 2;
        d  = hr * hr + hi * hi;
        zr = (yr * hr + yi * hi) / d;
        zi = (yi * hr - yr * hi) / d;
        er = zr - xr; ei = zi - xi;
        pp_acc += er * er + ei * ei;
        pp_cnt++;
        if (slice(cur_mod, zr) != xr || (cur_mod != 0 && slice(cur_mod, zi) != xi)) pp_err++;
      end
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
        end
      end
      if (b == NSC - 1) out_sym++;
    end
  end

  real speeds[2] = '{40.0, 80.0};
  int  rates[3]  = '{2, 4, 6};

  // ---------------------------------------------------------------- packets
  task automatic run_packet(int r, int nsym, int a, real mph);
    int  d;
    real fd, evm, evm_pp;
    bit  return_tail;
    real theta_deg;
    return_tail = 1;
    theta_deg = 0.5;
    fd = mph * 0.44704 / (299792458.0 / 5.62e9);   // maximum Doppler frequency
    w1 = 2.0 * PI * fd * 8.0e-6;                   // path at 0 degrees
    w2 = 2.0 * PI * fd * 8.0e-6 * (-0.5);          // path at 120 degrees
    pp_acc = 0; pp_cnt = 0; pp_err = 0;
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
    evm    = 100.0 * $sqrt(evm_acc / (evm_cnt > 0 ? evm_cnt : 1));
    evm_pp = 100.0 * $sqrt(pp_acc / (pp_cnt > 0 ? pp_cnt : 1));
    $display("%0.0f MPH (Doppler %0.0f Hz), rate %0d, %0d symbols: EVM %0.2f%% with decoder-based tracking, %0.2f%% preamble-only; wrong decisions %0d vs %0d of %0d",
             mph, fd, r, nsym, evm, evm_pp, dec_err, pp_err, evm_cnt);
    checks++;
    if (evm >= evm_pp) begin failures++; $display("no improvement over the preamble-only estimate"); end
    checks++;
    if (dec_err >= pp_err) begin failures++; $display("no fewer wrong decisions than preamble-only"); end
    checks++;
    if (pp_cnt != evm_cnt) begin failures++; $display("bin count mismatch %0d %0d", pp_cnt, evm_cnt); end
  endtask

  function automatic int packet_symbols(int r, int bytes);
    // SERVICE (16) + payload + tail (6) bits, rounded up to whole symbols
    return (16 + 8 * bytes + 6 + rbits[r] - 1) / rbits[r];
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    foreach (speeds[sp])
      foreach (rates[ri])
        run_packet(rates[ri], packet_symbols(rates[ri], 1600), 64, speeds[sp]);
    checks++;
    if (ybuf_overflow || ybuf_underflow || lpf_overrun) begin
      failures++; $display("buffer error flags %b%b%b", ybuf_overflow, ybuf_underflow, lpf_overrun);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
