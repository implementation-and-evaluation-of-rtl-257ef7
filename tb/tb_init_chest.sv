// tb_init_chest: self-checking testbench of the long-preamble LS estimator.
// Random received long-training symbols are sent in a shuffled bin order;
// each output must equal floor((Y1 + Y2) / 2) times the training value of
// its bin (+1, -1, or 0 on unused bins), one cycle after the LTS2 bin.
module tb_init_chest;
  import chest_pkg::*;

  // L(-26..26) written out as characters, '+' = +1, '-' = -1, '0' = 0
  localparam string LTS = "++--++-+-++++++--++-+-++++0+--++-+-+-----++--+-+-++++";

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0;
  sym_t          in_type = SYM_DATA;
  logic [BW-1:0] in_bin = '0;
  cpx_t          in_data = '0;
  logic          out_valid, out_last;
  logic [BW-1:0] out_bin;
  cpx_t          out_data;

  init_chest dut (.*);

  int checks = 0, failures = 0;
  int y1r[NSC], y1i[NSC], y2r[NSC], y2i[NSC];
  int order[NSC];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int train(int b);
    int sc;
    byte c;
    sc = b < 32 ? b : b - 64;
    if (sc < -26 || sc > 26) return 0;
    c = LTS[sc + 26];
    return c == "+" ? 1 : (c == "-" ? -1 : 0);
  endfunction

  function automatic int floordiv2(int v);
    return v >= 0 ? v / 2 : -((-v + 1) / 2);
  endfunction

  int expect_bin = -1;
  always @(negedge clk) begin
    if (out_valid) begin
      int er, ei, b;
      b  = int'(out_bin);
      er = floordiv2(y1r[b] + y2r[b]) * train(b);
      ei = floordiv2(y1i[b] + y2i[b]) * train(b);
      checks++;
      if (b != expect_bin || out_data.re != smp_t'(er) || out_data.im != smp_t'(ei) ||
          out_last != (b == NSC-1)) begin
        failures++;
        $display("bin %0d: got %0d,%0d expected %0d,%0d", b, out_data.re, out_data.im, er, ei);
      end
    end
  end

  initial begin
    int nout;
    for (int n = 0; n < NSC; n++) begin
      y1r[n] = $urandom_range(0, 2047) - 1024; y1i[n] = $urandom_range(0, 2047) - 1024;
      y2r[n] = $urandom_range(0, 2047) - 1024; y2i[n] = $urandom_range(0, 2047) - 1024;
      order[n] = n;
    end
    y1r[5] = -2048; y2r[5] = -2048;        // extreme values
    y1i[7] = 2047;  y2i[7] = 2047;
    order.shuffle();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // count of the training values: 52 used sub-carriers
    nout = 0;
    for (int n = 0; n < NSC; n++) if (train(n) != 0) nout++;
    checks++;
    if (nout != 52) failures++;
    for (int n = 0; n < NSC; n++) begin
      in_valid <= 1; in_type <= SYM_LTS1; in_bin <= BW'(n);
      in_data <= '{re: smp_t'(y1r[n]), im: smp_t'(y1i[n])};
      @(posedge clk);
    end
    in_valid <= 0;
    checks++;
    repeat (2) @(negedge clk) if (out_valid) failures++;   // LTS1 gives no output
    for (int k = 0; k < NSC; k++) begin
      int n;
      n = order[k];
      in_valid <= 1; in_type <= SYM_LTS2; in_bin <= BW'(n);
      in_data <= '{re: smp_t'(y2r[n]), im: smp_t'(y2i[n])};
      @(posedge clk);
      expect_bin = n;     // output appears in the following cycle
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
