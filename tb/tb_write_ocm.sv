// tb_write_ocm: hands random results to write_ocm and checks the two bytes it
// writes (address 2*index low byte, then the high byte), that nothing else is
// written, and that finish_out comes exactly three cycles after start_out.
module tb_write_ocm;
  logic        clk = 0, rst_n = 0;
  logic        start_out = 0, finish_out;
  logic [15:0] out_data = 0, out_idx = 0;
  logic [4:0]  n_written;
  logic [16:0] ocm1_addr;
  logic        ocm1_write;
  logic [7:0]  ocm1_writedata;
  logic [7:0]  mem [logic [16:0]];
  int          n_writes = 0;
  int checks = 0, failures = 0;

  write_ocm dut (.clk, .rst_n, .start_out, .out_data, .out_idx, .finish_out, .n_written,
                 .ocm1_addr, .ocm1_write, .ocm1_writedata);

  always #5 clk = ~clk;

  always @(posedge clk) if (ocm1_write) begin
    mem[ocm1_addr] = ocm1_writedata;
    n_writes++;
  end

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] d, idx;
      int lat;
      d   = 16'($urandom);
      idx = 16'($urandom_range(0, 4000));
      n_writes = 0;
      @(negedge clk); start_out = 1; out_data = d; out_idx = idx;
      @(negedge clk); start_out = 0; out_data = 16'($urandom); out_idx = 16'($urandom);
      lat = 1;
      while (!finish_out) begin @(negedge clk); lat++; end
      expect_eq(lat, 3, "finish_out latency");
      expect_eq(n_written, 2, "n_written");
      @(negedge clk);
      expect_eq(n_writes, 2, "number of writes");
      expect_eq(mem.exists(17'(2*idx)) ? mem[17'(2*idx)] : -1, d[7:0], "low byte");
      expect_eq(mem.exists(17'(2*idx+1)) ? mem[17'(2*idx+1)] : -1, d[15:8], "high byte");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
