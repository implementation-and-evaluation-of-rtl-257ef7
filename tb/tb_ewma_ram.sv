// tb_ewma_ram: self-checking testbench of the channel estimate RAM with
// exponentially weighted moving average. An initial estimate is written
// as is; then several estimate symbols with different alpha values are
// averaged in. Every written word is compared with
// floor((alpha*H_old + (256 - alpha)*H_new) / 256), the output timing is
// checked (two cycles after the input), and the equalizer read port is
// checked against the reference memory after each symbol.
module tb_ewma_ram;
  import chest_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]    alpha_i = '0;
  logic          in_valid = 0, in_init = 0;
  logic [BW-1:0] in_bin = '0, eq_rd_addr = '0, out_bin;
  cpx_t          in_data = '0, eq_rd_data, out_data;
  logic          out_valid;

  ewma_ram #(.AL(8)) dut (.*);

  int checks = 0, failures = 0;
  int ref_re[NSC], ref_im[NSC];
  int exp_re[$], exp_im[$], exp_bin[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv256(int v);
    return v >= 0 ? v / 256 : -((-v + 255) / 256);
  endfunction

  logic v_d1 = 0, v_d2 = 0;
  always_ff @(posedge clk) begin
    v_d1 <= in_valid;
    v_d2 <= v_d1;
  end

  always @(negedge clk) begin
    checks++;
    if (out_valid != v_d2) begin failures++; $display("output timing"); end
    if (out_valid) begin
      int gr, gi, er, ei, eb;
      gr = out_data.re; gi = out_data.im;
      er = exp_re.pop_front(); ei = exp_im.pop_front(); eb = exp_bin.pop_front();
      checks++;
      if (gr != er || gi != ei || int'(out_bin) != eb) begin
        failures++;
        if (failures < 10) $display("bin %0d: got %0d,%0d expected %0d,%0d", eb, gr, gi, er, ei);
      end
    end
  end

  task automatic send_symbol(bit init, int a);
    int order[NSC];
    for (int n = 0; n < NSC; n++) order[n] = n;
    order.shuffle();
    for (int k = 0; k < NSC; k++) begin
      int n, hr, hi;
      n = order[k];
      hr = $urandom_range(0, 4095); hr -= 2048;
      hi = $urandom_range(0, 4095); hi -= 2048;
      if (!init) begin
        ref_re[n] = fdiv256(a * ref_re[n] + (256 - a) * hr);
        ref_im[n] = fdiv256(a * ref_im[n] + (256 - a) * hi);
      end else begin
        ref_re[n] = hr;
        ref_im[n] = hi;
      end
      exp_re.push_back(ref_re[n]); exp_im.push_back(ref_im[n]); exp_bin.push_back(n);
      in_valid <= 1; in_init <= init; in_bin <= BW'(n); alpha_i <= 8'(a);
      in_data <= '{re: smp_t'(hr), im: smp_t'(hi)};
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    // read back through the equalizer port
    for (int n = 0; n < NSC; n++) begin
      int gr, gi;
      eq_rd_addr <= BW'(n);
      @(posedge clk);
      @(negedge clk);
      gr = eq_rd_data.re; gi = eq_rd_data.im;
      checks++;
      if (gr != ref_re[n] || gi != ref_im[n]) begin
        failures++;
        if (failures < 10) $display("read port bin %0d: got %0d,%0d expected %0d,%0d", n, gr, gi, ref_re[n], ref_im[n]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_symbol(1, 0);
    send_symbol(0, 128);
    send_symbol(0, 200);
    send_symbol(0, 17);
    send_symbol(0, 0);
    send_symbol(1, 99);     // a new initial estimate overwrites
    send_symbol(0, 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
