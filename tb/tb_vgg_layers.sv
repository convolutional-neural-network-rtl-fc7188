// tb_vgg_layers: runs VGG11 convolution layers on the accelerator the way the
// host uses it. A layer with Cin input and Cout output channels is Cin x Cout
// single-channel passes; for each pass the host model copies the kernel
// (bias only with the first input channel, zero otherwise) and one input
// channel into the RX memory, starts the pass, waits for finish and copies the
// result out of the TX memory. It adds the passes of one output channel in
// FP16 and applies ReLU (clear negative values), as the host does.
//
// Checked: every pass output against the double-precision reference of the
// zero-padded 3x3 convolution, each pass's cycle count (24 + 36*d^2), the
// number of passes, and that ReLU clipped some sums. Layers: the whole first layer (3 -> 64 channels at 32 x 32,
// 192 passes), and for each later size of the network (16, 8, 4, 2) a slice of
// 4 input x 2 output channels.
module tb_vgg_layers;
  import tb_fp16_ref::*;

  logic        clk = 0, rst_n = 0, start = 0, finish;
  logic [5:0]  fm_dim = 0;
  logic [15:0] progress;
  logic [16:0] rx_addr = 0, tx_addr = 0;
  logic        rx_write = 0, tx_write = 0;
  logic [7:0]  rx_writedata = 0, tx_writedata = 0, rx_readdata, tx_readdata;
  int checks = 0, failures = 0;
  int n_passes = 0, n_relu_zeroed = 0;

  logic [15:0] fmap [8][1024];     // input channels of the current layer
  logic [15:0] kern [8][10];       // per input channel: w0..w8, bias
  logic [15:0] acc  [1024];        // host-side sum for one output channel

  cnn_system dut (.clk, .rst_n, .start, .fm_dim, .finish, .progress,
                  .rx_addr, .rx_write, .rx_writedata, .rx_readdata,
                  .tx_addr, .tx_write, .tx_writedata, .tx_readdata);

  always #5 clk = ~clk;

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  task automatic rx_byte(input int a, input logic [7:0] b);
    @(negedge clk);
    rx_addr = 17'(a); rx_write = 1; rx_writedata = b;
  endtask

  task automatic tx_word(input int i, output logic [15:0] w);
    @(negedge clk); tx_addr = 17'(2*i);
    @(negedge clk); tx_addr = 17'(2*i + 1); w[7:0] = tx_readdata;
    @(negedge clk); w[15:8] = tx_readdata;
  endtask

  function automatic logic [15:0] px(input int ci, input int d, input int r, input int c);
    if (r < 0 || c < 0 || r >= d || c >= d) return 16'h0000;
    return fmap[ci][r*d + c];
  endfunction

  // One pass: input channel ci with kernel kern[ci]; returns the output map in res.
  task automatic run_pass(input int ci, input int d, output logic [15:0] res [1024]);
    int cyc;
    logic [159:0] wb;
    for (int i = 0; i < 10; i++) begin
      wb[16*i +: 16] = kern[ci][i];
      rx_byte(2*i, kern[ci][i][7:0]);
      rx_byte(2*i + 1, kern[ci][i][15:8]);
    end
    for (int i = 0; i < d*d; i++) begin
      rx_byte(20 + 2*i, fmap[ci][i][7:0]);
      rx_byte(20 + 2*i + 1, fmap[ci][i][15:8]);
    end
    @(negedge clk); rx_write = 0; start = 1; fm_dim = 6'(d);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!finish) begin @(negedge clk); cyc++; end
    expect_eq(cyc, 24 + 36*d*d, "pass cycles");
    n_passes++;
    for (int r = 0; r < d; r++)
      for (int c = 0; c < d; c++) begin
        logic [143:0] win;
        for (int k = 0; k < 9; k++) win[16*k +: 16] = px(ci, d, r + k/3 - 1, c + k%3 - 1);
        tx_word(r*d + c, res[r*d + c]);
        expect_eq(res[r*d + c], ref_pixel(win, wb), "pass output");
      end
  endtask

  task automatic run_layer(input int cin, input int cout, input int d);
    logic [15:0] res [1024];
    for (int ci = 0; ci < cin; ci++)
      for (int i = 0; i < d*d; i++)
        fmap[ci][i] = ($urandom_range(0, 3) == 0) ? 16'h0000 : (rand_normal(4) & 16'h7FFF); // post-ReLU input
    for (int co = 0; co < cout; co++) begin
      for (int ci = 0; ci < cin; ci++) begin
        for (int i = 0; i < 9; i++) kern[ci][i] = rand_normal(4);
        kern[ci][9] = (ci == 0) ? rand_normal(4) : 16'h0000;
      end
      for (int ci = 0; ci < cin; ci++) begin
        run_pass(ci, d, res);
        for (int i = 0; i < d*d; i++) acc[i] = (ci == 0) ? res[i] : ref_add(acc[i], res[i]);
      end
      for (int i = 0; i < d*d; i++) if (acc[i][15]) begin acc[i] = 16'h0000; n_relu_zeroed++; end
    end
    $display("layer %0d -> %0d channels at %0dx%0d done, %0d passes so far", cin, cout, d, d, n_passes);
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_layer(3, 64, 32);   // first layer, complete
    run_layer(4, 2, 16);    // slices of the later layers
    run_layer(4, 2, 8);
    run_layer(4, 2, 4);
    run_layer(4, 2, 2);
    expect_eq(n_passes, 192 + 4*8, "number of passes");
    checks++;
    if (n_relu_zeroed == 0) begin failures++; $display("FAIL ReLU never clipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
