// tb_equalizer: self-checking testbench of the one-tap equalizer.
// A behavioural channel-estimate RAM (synchronous read) answers the
// equalizer's read port. Random received bins are divided by random
// estimates; each output must match the real-valued quotient Y/H, clipped to
// the sample range, within 1.5 LSB, appear three cycles after its input, and
// be 0 when the estimate is 0.
module tb_equalizer;
  import chest_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0;
  logic [BW-1:0] in_bin = '0, h_rd_addr, out_bin;
  cpx_t          in_y = '0, h_rd_data, out_x;
  logic          out_valid;

  equalizer dut (.*);

  // channel estimate memory model
  int hre[NSC], him[NSC];
  always_ff @(posedge clk) h_rd_data <= '{re: smp_t'(hre[h_rd_addr]), im: smp_t'(him[h_rd_addr])};

  int checks = 0, failures = 0;
  real exp_re[$], exp_im[$];
  int  exp_bin[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic v_d1 = 0, v_d2 = 0, v_d3 = 0;
  always_ff @(posedge clk) begin
    v_d1 <= in_valid; v_d2 <= v_d1; v_d3 <= v_d2;
  end

  function automatic real clip(real v);
    if (v > 2047.0) return 2047.0;
    if (v < -2048.0) return -2048.0;
    return v;
  endfunction

  always @(negedge clk) begin
    checks++;
    if (out_valid != v_d3) begin failures++; $display("output timing"); end
    if (out_valid) begin
      real er, ei;
      int  gr, gi, eb;
      gr = out_x.re; gi = out_x.im;
      er = exp_re.pop_front(); ei = exp_im.pop_front(); eb = exp_bin.pop_front();
      checks++;
      if (gr - er > 1.5 || er - gr > 1.5 || gi - ei > 1.5 || ei - gi > 1.5 || int'(out_bin) != eb) begin
        failures++;
        if (failures < 10) $display("bin %0d: got %0d,%0d expected %f,%f", eb, gr, gi, er, ei);
      end
    end
  end

  initial begin
    for (int n = 0; n < NSC; n++) begin
      hre[n] = $urandom_range(0, 3000); hre[n] -= 1500;
      him[n] = $urandom_range(0, 3000); him[n] -= 1500;
    end
    hre[0] = 0; him[0] = 0;                  // null sub-carrier
    hre[1] = 3; him[1] = -2;                 // tiny estimate: the result saturates
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      int  n, yr, yi;
      real d;
      n  = $urandom_range(0, NSC-1);
      yr = $urandom_range(0, 4095); yr -= 2048;
      yi = $urandom_range(0, 4095); yi -= 2048;
      d  = real'(hre[n]) * hre[n] + real'(him[n]) * him[n];
      if (d == 0.0) begin
        exp_re.push_back(0.0); exp_im.push_back(0.0);
      end else begin
        exp_re.push_back(clip((real'(yr) * hre[n] + real'(yi) * him[n]) / d * (2.0 ** F)));
        exp_im.push_back(clip((real'(yi) * hre[n] - real'(yr) * him[n]) / d * (2.0 ** F)));
      end
      exp_bin.push_back(n);
      in_valid <= ($urandom_range(0, 3) != 0);
      in_bin <= BW'(n); in_y <= '{re: smp_t'(yr), im: smp_t'(yi)};
      @(posedge clk);
      if (!in_valid) begin
        // this one was not sent: drop its expectation
        void'(exp_re.pop_back()); void'(exp_im.pop_back()); void'(exp_bin.pop_back());
      end
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
