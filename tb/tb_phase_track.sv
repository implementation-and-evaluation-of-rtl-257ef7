// tb_phase_track: self-checking testbench of the channel-estimate-based
// phase tracker. An initial estimate H0 is loaded, then estimates
// H0 * exp(j*theta) with known per-symbol phase steps theta (all four
// quadrants) are sent at different rate indices. The tracker must report
// theta, predict phi = D(rate) * theta with D = 6,5,5,4,4,4,4,4, publish the
// new rotation within CORDIC_IT + 6 cycles of the last bin, and rotate
// equalized samples by exp(-j*phi). After an initial estimate the rotation
// must be the identity again.
module tb_phase_track;
  import chest_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  IT = 14;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]    rate = '0;
  logic          h_valid = 0, h_init = 0, x_valid = 0;
  logic [BW-1:0] h_bin = '0, x_bin = '0, out_bin;
  cpx_t          h_data = '0, x_data = '0, out_data;
  logic          out_valid, cpe_update;
  logic [PW-1:0] cpe_theta, cpe_phi;

  phase_track #(.CORDIC_IT(IT), .SCA(10)) dut (.*);

  int checks = 0, failures = 0;
  real h0r[NSC], h0i[NSC];
  int  delays[8] = '{6, 5, 5, 4, 4, 4, 4, 4};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q(real v);
    return $rtoi(v * (2.0 ** F) + (v < 0 ? -0.5 : 0.5));
  endfunction

  // wrap an angle difference (in phase units) to [-2^(PW-1), 2^(PW-1))
  function automatic int wrapd(int d);
    d = d % (2**PW);
    if (d >= 2**(PW-1)) d -= 2**PW;
    if (d < -(2**(PW-1))) d += 2**PW;
    return d;
  endfunction

  task automatic send_h(real th, bit init);
    for (int n = 0; n < NSC; n++) begin
      real r, i;
      r = h0r[n] * $cos(th) - h0i[n] * $sin(th);
      i = h0r[n] * $sin(th) + h0i[n] * $cos(th);
      h_valid <= 1; h_init <= init; h_bin <= BW'(n);
      h_data <= '{re: smp_t'(q(r)), im: smp_t'(q(i))};
      @(posedge clk);
    end
    h_valid <= 0;
  endtask

  // rotate random samples and compare with exp(-j*phi)
  task automatic check_rotation(real phi, string what);
    for (int k = 0; k < 40; k++) begin
      int  xr, xi, gr, gi;
      real er, ei;
      xr = $urandom_range(0, 3000); xr -= 1500;
      xi = $urandom_range(0, 3000); xi -= 1500;
      x_valid <= 1; x_bin <= BW'(k); x_data <= '{re: smp_t'(xr), im: smp_t'(xi)};
      @(posedge clk);
      x_valid <= 0;
      @(negedge clk);
      gr = out_data.re; gi = out_data.im;
      er = xr * $cos(phi) + xi * $sin(phi);
      ei = xi * $cos(phi) - xr * $sin(phi);
      checks++;
      if (!out_valid || out_bin != BW'(k) || gr - er > 14 || er - gr > 14 || gi - ei > 14 || ei - gi > 14) begin
        failures++;
        if (failures < 10) $display("%s: got %0d,%0d expected %f,%f", what, gr, gi, er, ei);
      end
    end
  endtask

  task automatic wait_update(output int cycles);
    cycles = 0;
    while (!cpe_update && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  real thetas[6] = '{10.0, 135.0, -100.0, -3.0, 60.0, 179.0};

  initial begin
    int cyc;
    for (int n = 0; n < NSC; n++) begin
      int rr, ri;
      rr = $urandom_range(0, 1000);
      ri = $urandom_range(0, 1000);
      h0r[n] = (rr - 500) / 700.0;
      h0i[n] = (ri - 500) / 700.0;
      if (n >= 27 && n <= 37) begin h0r[n] = 0; h0i[n] = 0; end   // null sub-carriers
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_h(0.3, 1);                  // initial estimate: no phase step yet
    wait_update(cyc);
    checks++;
    if (!cpe_update || cpe_phi != 0) begin failures++; $display("initial estimate: no reset"); end
    @(negedge clk);
    check_rotation(0.0, "identity");
    for (int s = 0; s < 6; s++) begin
      real th, acc_th;
      int  ethe, ephi;
      rate   <= 3'(s + 2 * (s % 2));
      @(posedge clk);
      th     = thetas[s] * PI / 180.0;
      acc_th = 0.3 + (s + 1) * th;   // estimate s+1 advances by theta over the previous
      // re-load the previous estimate's phase first so each step is exactly theta
      send_h(acc_th - th, 1);
      wait_update(cyc);
      @(negedge clk);
      send_h(acc_th, 0);
      wait_update(cyc);
      checks++;
      if (cyc > IT + 6) begin failures++; $display("update took %0d cycles", cyc); end
      ethe = $rtoi(th / (2 * PI) * (2.0 ** PW));
      ephi = ethe * delays[rate];
      checks++;
      if (wrapd(int'(cpe_theta) - ethe) > 40 || wrapd(int'(cpe_theta) - ethe) < -40) begin
        failures++; $display("theta %f deg: got %0d expected %0d", thetas[s], cpe_theta, ethe);
      end
      checks++;
      if (wrapd(int'(cpe_phi) - ephi) > 240 || wrapd(int'(cpe_phi) - ephi) < -240) begin
        failures++; $display("phi rate %0d: got %0d expected %0d", rate, cpe_phi, wrapd(ephi));
      end
      @(negedge clk);
      check_rotation(th * delays[rate], "rotation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
