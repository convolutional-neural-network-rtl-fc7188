// tb_conv_pipeline: runs the reader, engine and writer together against models
// of the RX memory (one-cycle registered read) and the TX memory. For maps of
// 6x6, 3x3 and 11x11 it fills the RX model with a random kernel, bias and map
// in the byte layout of the RX buffer, pulses start, and checks every output pixel
// of the zero-padded 3x3 convolution against a double-precision reference,
// that no byte outside the output is written, and that finish rises
// 24 + 36*dim^2 cycles after start.
module tb_conv_pipeline;
  import tb_fp16_ref::*;

  logic        clk = 0, rst_n = 0, start = 0, finish;
  logic [5:0]  fm_dim = 0;
  logic [16:0] ocm0_addr, ocm1_addr;
  logic        ocm0_read, ocm1_write;
  logic [7:0]  ocm0_readdata, ocm1_writedata;
  logic [15:0] mult_idx;
  logic [7:0]  rx [4608];
  logic [7:0]  tx [4608];
  int checks = 0, failures = 0;

  conv_pipeline dut (.clk, .rst_n, .start, .fm_dim, .finish,
                     .ocm0_addr, .ocm0_read, .ocm0_readdata,
                     .ocm1_addr, .ocm1_write, .ocm1_writedata, .mult_idx);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    ocm0_readdata <= rx[ocm0_addr % 4608];
    if (ocm1_write) tx[ocm1_addr % 4608] <= ocm1_writedata;
  end

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  function automatic logic [15:0] px(input int d, input int r, input int c);
    if (r < 0 || c < 0 || r >= d || c >= d) return 16'h0000;
    return {rx[20 + 2*(r*d + c) + 1], rx[20 + 2*(r*d + c)]};
  endfunction

  task automatic run(input int d);
    logic [159:0] wb;
    int cyc;
    for (int i = 0; i < 10; i++) begin
      wb[16*i +: 16] = rand_normal(4);
      {rx[2*i+1], rx[2*i]} = wb[16*i +: 16];
    end
    for (int i = 0; i < d*d; i++) {rx[20+2*i+1], rx[20+2*i]} = rand_normal(6);
    for (int i = 0; i < 4608; i++) tx[i] = 8'hEE;
    @(negedge clk); start = 1; fm_dim = 6'(d);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!finish) begin @(negedge clk); cyc++; end
    expect_eq(cyc, 24 + 36*d*d, $sformatf("cycles for a %0dx%0d map", d, d));
    for (int r = 0; r < d; r++)
      for (int c = 0; c < d; c++) begin
        logic [143:0] win;
        for (int k = 0; k < 9; k++) win[16*k +: 16] = px(d, r + k/3 - 1, c + k%3 - 1);
        expect_eq({tx[2*(r*d+c)+1], tx[2*(r*d+c)]}, ref_pixel(win, wb),
                  $sformatf("output (%0d,%0d) of %0dx%0d", r, c, d, d));
      end
    for (int i = 2*d*d; i < 2*d*d + 16; i++) expect_eq(tx[i], 8'hEE, "byte past the output");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(6);
    run(3);
    run(11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
