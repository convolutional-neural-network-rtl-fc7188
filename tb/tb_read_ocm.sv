// tb_read_ocm: loads a random kernel and a random dim x dim map into a model of
// the RX memory (one-cycle registered read) and checks that read_ocm delivers
// the kernel and, for every output pixel in raster order, the 3x3 window with
// zero padding outside the map. Also checks in_data_dim, the 22-cycle kernel
// load and the 20-cycle window fetch. Runs maps of 5x5, 1x1 and 32x32.
module tb_read_ocm;
  import cnn_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        start = 0, start_fm = 0;
  logic [5:0]  fm_dim = 0;
  logic [16:0] ocm0_addr;
  logic        ocm0_read;
  logic [7:0]  ocm0_readdata;
  logic        in_data_ready, finish_fm;
  logic [5:0]  in_data_dim;
  logic [143:0] feat_map_in;
  logic [159:0] weight_bias;
  logic [3:0]  fm_save_idx;
  logic [7:0]  mem [4608];
  int checks = 0, failures = 0;
  int padded_windows = 0;

  read_ocm dut (.clk, .rst_n, .start, .fm_dim, .ocm0_addr, .ocm0_read, .ocm0_readdata,
                .in_data_ready, .in_data_dim, .feat_map_in, .weight_bias,
                .start_fm, .finish_fm, .fm_save_idx);

  always #5 clk = ~clk;
  always @(posedge clk) ocm0_readdata <= mem[ocm0_addr % 4608];

  task automatic expect_eq(input logic [159:0] got, input logic [159:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  function automatic logic [15:0] px(input int d, input int r, input int c);
    if (r < 0 || c < 0 || r >= d || c >= d) return 16'h0000;
    return {mem[20 + 2*(r*d + c) + 1], mem[20 + 2*(r*d + c)]};
  endfunction

  task automatic run(input int d);
    logic [159:0] wb;
    int lat;
    for (int i = 0; i < 4608; i++) mem[i] = 8'($urandom);
    for (int i = 0; i < 10; i++) wb[16*i +: 16] = {mem[2*i+1], mem[2*i]};
    @(negedge clk); start = 1; fm_dim = 6'(d);
    @(negedge clk); start = 0; fm_dim = 6'($urandom);
    lat = 1;
    while (!in_data_ready) begin @(negedge clk); lat++; end
    expect_eq(lat, 22, "kernel load latency");
    expect_eq(weight_bias, wb, "weight_bias");
    expect_eq(in_data_dim, d, "in_data_dim");
    for (int r = 0; r < d; r++)
      for (int c = 0; c < d; c++) begin
        logic [143:0] win;
        bit padded = 0;
        for (int k = 0; k < 9; k++) begin
          win[16*k +: 16] = px(d, r + k/3 - 1, c + k%3 - 1);
          if (r + k/3 - 1 < 0 || c + k%3 - 1 < 0 || r + k/3 - 1 >= d || c + k%3 - 1 >= d) padded = 1;
        end
        if (padded) padded_windows++;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        start_fm = 1;
        @(negedge clk); start_fm = 0;
        lat = 1;
        while (!finish_fm) begin @(negedge clk); lat++; end
        expect_eq(lat, 20, "window latency");
        expect_eq(feat_map_in, win, $sformatf("window (%0d,%0d) of %0dx%0d", r, c, d, d));
        @(negedge clk);
        expect_eq(feat_map_in, win, "window held");
      end
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
    run(5);
    run(1);
    run(32);
    checks++;
    if (padded_windows == 0) begin failures++; $display("FAIL no padded window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
