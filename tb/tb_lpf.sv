// tb_lpf: self-checking testbench of the frequency-domain low-pass filter.
// Symbols built from a channel impulse response inside the 16-sample window
// must pass unchanged; responses outside it must be removed; random symbols
// are compared with a real-valued circular convolution. Also checks bin
// order, tag, last flag, the per-symbol processing time, double buffering of
// two back-to-back symbols and the overrun flag on a third. A second
// instance with null-sub-carrier filling is checked against the same
// convolution applied to the input with each null bin replaced by its
// nearest used bin.
module tb_lpf;
  import chest_pkg::*;

  localparam real PI   = 3.14159265358979323846;
  localparam int  TAPS = 16;
  localparam int  LANES = 8;
  localparam int  NSYM = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0, in_tag = 0;
  logic [BW-1:0] in_bin = '0;
  cpx_t          in_data = '0;
  logic          out_valid, out_last, out_tag, overrun;
  logic [BW-1:0] out_bin;
  cpx_t          out_data;

  lpf #(.TAPS(TAPS), .LANES(LANES), .NULL_FILL(1'b0)) dut (.*);

  // second instance that fills the null sub-carriers before filtering
  logic          f_valid, f_last, f_tag, f_overrun;
  logic [BW-1:0] f_bin;
  cpx_t          f_data;
  lpf #(.TAPS(TAPS), .LANES(LANES), .NULL_FILL(1'b1)) dut_fill (
    .clk, .rst_n, .in_valid, .in_bin, .in_data, .in_tag,
    .out_valid (f_valid), .out_bin (f_bin), .out_last (f_last), .out_data (f_data),
    .out_tag (f_tag), .overrun (f_overrun));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus and expected values per symbol
  int  sre [NSYM][NSC];
  int  sim [NSYM][NSC];
  real ere [NSYM][NSC];
  real eim [NSYM][NSC];
  real fre [NSYM][NSC];
  real fim [NSYM][NSC];
  int  last_in_cycle [NSYM];

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int q(real v);
    return $rtoi(v * (2.0 ** F) + (v < 0 ? -0.5 : 0.5));
  endfunction

  // build symbol s from taps at the given delays
  task automatic make_from_taps(int s, int t0, int ntap);
    real hr[64], hi[64];
    for (int t = 0; t < 64; t++) begin hr[t] = 0; hi[t] = 0; end
    for (int k = 0; k < ntap; k++) begin
      int rr, ri;
      rr = $urandom_range(0, 200);
      ri = $urandom_range(0, 200);
      hr[t0 + k] = (rr - 100) / 400.0;
      hi[t0 + k] = (ri - 100) / 400.0;
    end
    for (int n = 0; n < NSC; n++) begin
      real ar = 0, ai = 0;
      for (int t = 0; t < 64; t++) begin
        ar += hr[t] * $cos(2*PI*n*t/NSC) + hi[t] * $sin(2*PI*n*t/NSC);
        ai += hi[t] * $cos(2*PI*n*t/NSC) - hr[t] * $sin(2*PI*n*t/NSC);
      end
      sre[s][n] = q(ar / 4.0);
      sim[s][n] = q(ai / 4.0);
    end
  endtask

  // expected output: keep time samples 0..TAPS-1 of the inverse DFT
  // nearest used sub-carrier of bin m (802.11p uses sub-carriers -26..26 but 0)
  function automatic int fill_src(int m);
    int sc;
    sc = m < 32 ? m : m - 64;
    if (sc == 0) return 1;
    if (sc > 26) return 26;
    if (sc < -26) return 38;
    return m;
  endfunction

  task automatic reference(int s, bit fill);
    real tr[NSC], ti[NSC];
    for (int t = 0; t < NSC; t++) begin
      tr[t] = 0; ti[t] = 0;
      for (int m = 0; m < NSC; m++) begin
        int src;
        src = fill ? fill_src(m) : m;
        tr[t] += sre[s][src] * $cos(2*PI*m*t/NSC) - sim[s][src] * $sin(2*PI*m*t/NSC);
        ti[t] += sim[s][src] * $cos(2*PI*m*t/NSC) + sre[s][src] * $sin(2*PI*m*t/NSC);
      end
      tr[t] /= NSC; ti[t] /= NSC;
    end
    for (int n = 0; n < NSC; n++) begin
      real ar, ai;
      ar = 0; ai = 0;
      for (int t = 0; t < TAPS; t++) begin
        ar += tr[t] * $cos(2*PI*n*t/NSC) + ti[t] * $sin(2*PI*n*t/NSC);
        ai += ti[t] * $cos(2*PI*n*t/NSC) - tr[t] * $sin(2*PI*n*t/NSC);
      end
      if (fill) begin fre[s][n] = ar; fim[s][n] = ai; end
      else      begin ere[s][n] = ar; eim[s][n] = ai; end
    end
  endtask

  // monitor of the filling instance
  int fsym = 0, fbin = 0;
  always @(negedge clk) begin
    if (f_valid && fsym < 4) begin
      real dr, di;
      int  gr, gi;
      gr = f_data.re; gi = f_data.im;
      dr = gr - fre[fsym][fbin];
      di = gi - fim[fsym][fbin];
      checks++;
      if (f_bin != BW'(fbin) || dr > 3.0 || dr < -3.0 || di > 3.0 || di < -3.0) begin
        failures++;
        if (failures < 10) $display("fill: sym %0d bin %0d: got %0d,%0d expected %f,%f", fsym, fbin, gr, gi, fre[fsym][fbin], fim[fsym][fbin]);
      end
      if (fbin == NSC-1) begin fsym++; fbin = 0; end else fbin++;
    end
  end

  task automatic send(int s, bit tag);
    for (int n = 0; n < NSC; n++) begin
      in_valid <= 1; in_bin <= BW'(n); in_tag <= tag;
      in_data  <= '{re: smp_t'(sre[s][n]), im: smp_t'(sim[s][n])};
      @(posedge clk);
    end
    last_in_cycle[s] = cycle;
    in_valid <= 0;
  endtask

  // output monitor
  int osym = 0, obin = 0;
  always @(negedge clk) begin
    if (out_valid && osym < 4) begin
      real dr, di;
      dr = real'(out_data.re) - ere[osym][obin];
      di = real'(out_data.im) - eim[osym][obin];
      checks++;
      if (out_bin != BW'(obin) || out_tag != osym[0] || dr > 3.0 || dr < -3.0 || di > 3.0 || di < -3.0) begin
        failures++;
        if (failures < 10)
          $display("sym %0d bin %0d (got bin %0d tag %0d): got %0d,%0d expected %f,%f",
                   osym, obin, out_bin, out_tag, out_data.re, out_data.im, ere[osym][obin], eim[osym][obin]);
      end
      if (out_last != (obin == NSC-1)) begin failures++; $display("bad out_last"); end
      if (obin == NSC-1) begin
        // a symbol may wait for the one before it, so allow two processing times
        checks++;
        if (cycle - last_in_cycle[osym] > (osym == 2 ? 2 : 1) * (NSC*NSC/LANES + LANES + 4)) begin
          failures++;
          $display("symbol %0d took %0d cycles", osym, cycle - last_in_cycle[osym]);
        end
        osym++; obin = 0;
      end else obin++;
    end
  end

  initial begin
    make_from_taps(0, 0, 16);     // inside the window: passes
    make_from_taps(1, 20, 30);    // outside the window: removed
    for (int n = 0; n < NSC; n++) begin
      sre[2][n] = $urandom_range(0, 1600) - 800;
      sim[2][n] = $urandom_range(0, 1600) - 800;
      sre[3][n] = $urandom_range(0, 1600) - 800;
      sim[3][n] = $urandom_range(0, 1600) - 800;
      sre[4][n] = 0; sim[4][n] = 0;
    end
    for (int s = 0; s < 4; s++) begin reference(s, 0); reference(s, 1); end
    // the pass-through and stop-band properties themselves
    for (int n = 0; n < NSC; n++) begin
      checks++;
      if (rabs(ere[0][n] - sre[0][n]) > 2.0 || rabs(ere[1][n]) > 2.0) failures++;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    send(0, 0);
    repeat (600) @(posedge clk);
    send(1, 1);
    repeat (20) @(posedge clk);
    send(2, 0);                    // second bank while symbol 1 is filtered
    repeat (1200) @(posedge clk);
    checks++;
    if (overrun) begin failures++; $display("unexpected overrun"); end
    send(3, 1);
    repeat (800) @(posedge clk);
    checks++;
    if (osym != 4 || fsym != 4) begin failures++; $display("only %0d/%0d symbols out", osym, fsym); end
    // three symbols in a row: the third lands in a busy bank
    send(4, 0); send(4, 0); send(4, 0);
    @(posedge clk);
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
