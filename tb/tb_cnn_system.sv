// tb_cnn_system: end-to-end test of the accelerator at its default sizes.
//
// The host and the two DMA controllers are modelled by tasks: one copies the
// kernel, the bias and a feature map byte by byte into the RX memory through
// the rx_* port, the host pulses start with the map size and waits for finish,
// the other copies the results out of the TX memory through the tx_* port
// (one-cycle read latency). Every output pixel is compared with a
// double-precision reference of the zero-padded 3x3 convolution.
//
// Passes run at every spatial size of the VGG11 convolution layers for a
// 32 x 32 input (32, 16, 8, 4, 2), then a pass that is restarted with a new
// size while it is running. Counted and required to happen: zero-padded
// window bytes, kernel loads, changes of map size, a restart while busy, and a
// full 32 x 32 map finishing in 24 + 36*1024 cycles.
module tb_cnn_system;
  import tb_fp16_ref::*;

  logic        clk = 0, rst_n = 0, start = 0, finish;
  logic [5:0]  fm_dim = 0;
  logic [15:0] progress;
  logic [16:0] rx_addr = 0, tx_addr = 0;
  logic        rx_write = 0, tx_write = 0;
  logic [7:0]  rx_writedata = 0, tx_writedata = 0, rx_readdata, tx_readdata;
  logic [7:0]  img [4608];
  int checks = 0, failures = 0;
  int n_padded = 0, n_loads = 0, n_dim_changes = 0, n_restarts = 0, n_full_maps = 0;
  logic [5:0]  last_dim = 0;
  logic        rdy_q = 0;

  cnn_system dut (.clk, .rst_n, .start, .fm_dim, .finish, .progress,
                  .rx_addr, .rx_write, .rx_writedata, .rx_readdata,
                  .tx_addr, .tx_write, .tx_writedata, .tx_readdata);

  always #5 clk = ~clk;

  // Event counters, observed inside the design.
  always @(posedge clk) begin
    if (rst_n && dut.opt.rd.state == dut.opt.rd.S_FETCH && !dut.opt.rd.in_map) n_padded++;
    rdy_q <= dut.opt.rd.in_data_ready;
    if (dut.opt.rd.in_data_ready && !rdy_q) n_loads++;
  end

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  task automatic dma_to_rx(input int nbytes);
    for (int i = 0; i < nbytes; i++) begin
      @(negedge clk);
      rx_addr = 17'(i); rx_write = 1; rx_writedata = img[i];
    end
    @(negedge clk); rx_write = 0;
  endtask

  task automatic dma_from_tx(input int i, output logic [7:0] b);
    @(negedge clk); tx_addr = 17'(i);
    @(posedge clk); #1;
    b = tx_readdata;
  endtask

  function automatic logic [15:0] px(input int d, input int r, input int c);
    if (r < 0 || c < 0 || r >= d || c >= d) return 16'h0000;
    return {img[20 + 2*(r*d + c) + 1], img[20 + 2*(r*d + c)]};
  endfunction

  task automatic make_image(input int d);
    for (int i = 0; i < 10; i++) {img[2*i+1], img[2*i]} = rand_normal(4);
    for (int i = 0; i < d*d; i++) {img[20+2*i+1], img[20+2*i]} = rand_normal(6);
  endtask

  task automatic pulse_start(input int d);
    if (6'(d) != last_dim) n_dim_changes++;
    last_dim = 6'(d);
    @(negedge clk); start = 1; fm_dim = 6'(d);
    @(negedge clk); start = 0;
  endtask

  task automatic check_outputs(input int d);
    logic [159:0] wb;
    logic [7:0] lo, hi;
    for (int i = 0; i < 10; i++) wb[16*i +: 16] = {img[2*i+1], img[2*i]};
    for (int r = 0; r < d; r++)
      for (int c = 0; c < d; c++) begin
        logic [143:0] win;
        for (int k = 0; k < 9; k++) win[16*k +: 16] = px(d, r + k/3 - 1, c + k%3 - 1);
        dma_from_tx(2*(r*d+c), lo);
        dma_from_tx(2*(r*d+c) + 1, hi);
        expect_eq({hi, lo}, ref_pixel(win, wb), $sformatf("output (%0d,%0d) of %0dx%0d", r, c, d, d));
      end
  endtask

  task automatic pass(input int d);
    int cyc;
    logic [7:0] b;
    make_image(d);
    dma_to_rx(20 + 2*d*d);
    dma_from_tx(0, b);                       // DMA side of RX is readable too
    tx_addr = 0;
    pulse_start(d);
    cyc = 1;
    while (!finish) begin @(negedge clk); cyc++; end
    expect_eq(cyc, 24 + 36*d*d, $sformatf("cycles for a %0dx%0d map", d, d));
    expect_eq(progress, d*d, "progress at finish");
    if (d == 32) n_full_maps++;
    check_outputs(d);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pass(32);
    pass(16);
    pass(8);
    pass(4);
    pass(2);
    // Restart: start an 8x8 pass, then start a 5x5 pass while it runs.
    begin
      int cyc;
      make_image(8);
      dma_to_rx(20 + 2*64);
      pulse_start(8);
      repeat (300) @(negedge clk);
      checks++;
      if (finish || progress == 0) begin failures++; $display("FAIL pass not running"); end
      make_image(5);
      dma_to_rx(20 + 2*25);
      pulse_start(5);
      n_restarts++;
      cyc = 1;
      while (!finish) begin @(negedge clk); cyc++; end
      expect_eq(cyc, 24 + 36*25, "cycles after restart");
      check_outputs(5);
    end
    $display("padded window bytes %0d, kernel loads %0d, size changes %0d, restarts %0d, full maps %0d",
             n_padded, n_loads, n_dim_changes, n_restarts, n_full_maps);
    checks += 5;
    if (n_padded == 0)      begin failures++; $display("FAIL no zero padding"); end
    if (n_loads < 7)        begin failures++; $display("FAIL kernel loads %0d", n_loads); end
    if (n_dim_changes < 6)  begin failures++; $display("FAIL size changes"); end
    if (n_restarts == 0)    begin failures++; $display("FAIL no restart"); end
    if (n_full_maps == 0)   begin failures++; $display("FAIL no full map"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
