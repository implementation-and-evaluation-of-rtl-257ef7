// tb_y_buffer: self-checking testbench of the received-symbol delay FIFO.
// Writes and reads in random interleavings (with a reference queue), fills
// the buffer completely, and checks data order, the one-cycle read latency,
// the fill count, the clear input and the overflow / underflow flags.
module tb_y_buffer;
  import chest_pkg::*;

  localparam int DEPTH = 512;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   wr_en = 0, rd_en = 0, clear = 0;
  cpx_t                   wr_data = '0;
  logic                   rd_valid, overflow, underflow;
  cpx_t                   rd_data;
  logic [$clog2(DEPTH):0] count;

  y_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  cpx_t model[$];
  cpx_t pending[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read data is checked one cycle after the read
  always @(negedge clk) begin
    if (rd_valid) begin
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("unexpected read data");
      end else begin
        cpx_t e, g;
        e = pending.pop_front();
        g = rd_data;
        if (g != e) begin
          failures++;
          $display("read %h expected %h (count %0d, model %0d)", g, e, count, model.size());
        end
      end
    end
  end

  task automatic step(bit w, bit r);
    cpx_t d;
    d = cpx_t'($urandom);
    wr_en <= w; rd_en <= r; wr_data <= d;
    @(posedge clk);
    // the model follows the same rules: a read needs data, a write needs room
    if (r && model.size() > 0) pending.push_back(model.pop_front());
    if (w && (model.size() < DEPTH || r)) model.push_back(d);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      step($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 45);
    end
    step(0, 0);
    @(negedge clk);
    checks++;
    if (int'(count) != model.size()) begin failures++; $display("count %0d model %0d", count, model.size()); end
    checks++;
    if (overflow) begin failures++; $display("early overflow"); end
    // fill to the top: 7 symbols of 64 bins must fit
    while (model.size() < DEPTH) step(1, 0);
    step(0, 0);
    checks++;
    if (overflow || int'(count) != DEPTH) begin failures++; $display("full: count %0d", count); end
    step(1, 0);                                  // one too many
    @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("overflow not flagged"); end
    // clear in the middle of the traffic
    for (int i = 0; i < 10; i++) step(1, 0);
    clear <= 1;
    step(0, 0);
    clear <= 0;
    model.delete();
    step(0, 0);
    checks++;
    if (count != 0) begin failures++; $display("clear failed"); end
    for (int i = 0; i < 5; i++) step(1, 0);
    while (model.size() > 0) step(0, 1);
    step(0, 0);
    rst_n <= 0;                                  // clear the flags
    step(0, 0);
    rst_n <= 1;
    step(0, 0);
    checks++;
    if (underflow || overflow || count != 0) begin failures++; $display("after reset"); end
    step(0, 1);                                  // read from empty
    @(negedge clk);
    checks++;
    if (!underflow) begin failures++; $display("underflow not flagged"); end
    step(0, 0);
    step(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
