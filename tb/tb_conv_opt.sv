// tb_conv_opt: drives the convolution engine with models of the reader and the
// writer. The reader model answers each start_fm with a random window, the
// writer model takes each start_out. Every result is compared with a
// double-precision reference that performs the engine's operations in the
// same order (nine rounded products, then acc = p0 + p1 + ... + p8 + bias,
// rounded after every addition). Also checks the raster index of each result,
// that finish rises after exactly dim^2 results, and, in a run whose models
// answer with the latencies of the real reader (20) and writer (3), that a
// pixel takes 36 cycles.
module tb_conv_opt;
  import cnn_pkg::*;
  import tb_fp16_ref::*;

  logic         clk = 0, rst_n = 0, start = 0;
  logic         in_data_ready = 0;
  logic [5:0]   in_data_dim = 0;
  logic [143:0] feat_map_in = 0;
  logic [159:0] weight_bias = 0;
  logic         start_fm, finish_fm = 0;
  logic         start_out, finish_out = 0;
  logic [15:0]  out_data, out_idx, mult_idx;
  logic [3:0]   add_idx;
  logic         finish;
  int checks = 0, failures = 0;

  conv_opt dut (.clk, .rst_n, .start, .in_data_ready, .in_data_dim, .feat_map_in, .weight_bias,
                .start_fm, .finish_fm, .start_out, .out_data, .out_idx, .finish_out,
                .mult_idx, .add_idx, .finish);

  always #5 clk = ~clk;

  int rd_lat = 20, wr_lat = 3;   // 0 = random
  logic [15:0] expected [$];
  int n_out;
  bit saw_add9;

  always @(posedge clk) if (add_idx == 4'd9) saw_add9 = 1;

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  // Reader model.
  initial forever begin
    @(posedge clk);
    if (rst_n && start_fm) begin
      logic [143:0] win;
      int lat;
      for (int k = 0; k < 9; k++)
        win[16*k +: 16] = ($urandom_range(0, 9) == 0) ? rand_h(6) : rand_normal(6);
      lat = (rd_lat != 0) ? rd_lat : $urandom_range(1, 6);
      repeat (lat - 1) @(posedge clk);
      feat_map_in <= win;
      finish_fm   <= 1;
      expected.push_back(ref_pixel(win, weight_bias));
      @(posedge clk);
      finish_fm <= 0;
    end
  end

  // Writer model.
  initial forever begin
    @(posedge clk);
    if (rst_n && start_out) begin
      logic [15:0] want;
      int lat;
      want = expected.pop_front();
      expect_eq(out_data, want, $sformatf("pixel %0d", n_out));
      expect_eq(out_idx, n_out, "out_idx");
      n_out++;
      lat = (wr_lat != 0) ? wr_lat : $urandom_range(1, 5);
      repeat (lat - 1) @(posedge clk);
      finish_out <= 1;
      @(posedge clk);
      finish_out <= 0;
    end
  end

  task automatic run(input int d, input int rl, input int wl);
    int cyc;
    rd_lat = rl; wr_lat = wl; n_out = 0; saw_add9 = 0;
    expected.delete();
    for (int k = 0; k < 10; k++) weight_bias[16*k +: 16] = rand_normal(4);
    @(negedge clk); start = 1; in_data_ready = 0;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    in_data_ready = 1; in_data_dim = 6'(d);
    cyc = 0;
    while (!finish) begin @(negedge clk); cyc++; end
    expect_eq(n_out, d*d, "number of results");
    expect_eq(mult_idx, d*d, "mult_idx at finish");
    if (d > 0) expect_eq(saw_add9, 1, "add_idx reached 9");
    // In the cycle in_data_ready is seen, REQ follows; finish is one cycle after DONE.
    if (rl == 20 && wl == 3) expect_eq(cyc, 36*d*d + 2, "cycles for the map");
    repeat (3) @(negedge clk);
    expect_eq(n_out, d*d, "no extra results");
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(4, 20, 3);
    run(7, 0, 0);
    run(1, 0, 0);
    run(32, 20, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
