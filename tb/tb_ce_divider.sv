// tb_ce_divider: self-checking testbench of the decoder-based channel
// estimate H = Y / X~. X~ is drawn from BPSK, QPSK, 16-QAM and 64-QAM
// constellation points (unit average energy), Y = H * X~ for a random H.
// The output must match H to within 1.5 % of full scale plus 2 LSB, must be
// 0 when X~ is 0, and must appear two cycles after the input.
module tb_ce_divider;
  import chest_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0;
  logic [BW-1:0] in_bin = '0;
  cpx_t          in_y = '0, in_xt = '0;
  logic          out_valid;
  logic [BW-1:0] out_bin;
  cpx_t          out_h;

  ce_divider dut (.*);

  int checks = 0, failures = 0;
  real exp_r[$], exp_i[$];
  int  exp_b[$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q(real v);
    return $rtoi(v * (2.0 ** F) + (v < 0 ? -0.5 : 0.5));
  endfunction

  function automatic real level(int m, int idx);
    // idx selects one of the amplitude levels of modulation m
    case (m)
      0: return 1.0;
      1: return 1.0 / $sqrt(2.0);
      2: return (2 * (idx % 2) + 1) / $sqrt(10.0);
      default: return (2 * (idx % 4) + 1) / $sqrt(42.0);
    endcase
  endfunction

  // expected output timing: the input valid delayed by two clock edges
  logic v_d1 = 0, v_d2 = 0;
  always_ff @(posedge clk) begin
    v_d1 <= in_valid;
    v_d2 <= v_d1;
  end

  always @(negedge clk) begin
    checks++;
    if (out_valid != v_d2) begin failures++; $display("output timing"); end
    if (out_valid) begin
      real er, ei, dr, di, tol;
      int  hr, hi;
      hr = out_h.re; hi = out_h.im;
      er = exp_r.pop_front(); ei = exp_i.pop_front();
      dr = hr - er; di = hi - ei;
      tol = 2.0 + 0.015 * (2.0 ** F);
      checks++;
      if (dr > tol || dr < -tol || di > tol || di < -tol || int'(out_bin) != exp_b.pop_front()) begin
        failures++;
        if (failures < 10) $display("got %0d,%0d expected %f,%f", hr, hi, er, ei);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      int  m, ir, ii;
      real xr, xi, hr, hi, yr, yi;
      int  hri, hii;
      m  = $urandom_range(0, 3);
      xr = level(m, $urandom_range(0, 3)) * ($urandom_range(0, 1) ? 1.0 : -1.0);
      xi = (m == 0) ? 0.0 : level(m, $urandom_range(0, 3)) * ($urandom_range(0, 1) ? 1.0 : -1.0);
      hri = $urandom_range(0, 1200); hii = $urandom_range(0, 1200);
      hr = (hri - 600) / 1000.0;  hi = (hii - 600) / 1000.0;
      yr = hr * xr - hi * xi;     yi = hr * xi + hi * xr;
      ir = q(xr); ii = q(xi);
      if (i % 97 == 5) begin ir = 0; ii = 0; hr = 0; hi = 0; end   // null sub-carrier
      in_valid <= 1; in_bin <= BW'(i);
      in_xt <= '{re: smp_t'(ir), im: smp_t'(ii)};
      in_y  <= '{re: smp_t'(q(yr)), im: smp_t'(q(yi))};
      exp_r.push_back(hr * (2.0 ** F)); exp_i.push_back(hi * (2.0 ** F));
      exp_b.push_back(i % NSC);
      @(posedge clk);
      if (i % 7 == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_r.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
