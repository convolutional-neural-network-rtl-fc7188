// tb_ocm_ram: checks the dual-port byte memory: writes from either port are
// read back from both, reads take one cycle, port B wins a same-address write
// collision, and out-of-range addresses are ignored and read as zero.
module tb_ocm_ram;
  localparam int DEPTH = 64;

  logic        clk = 0;
  logic [16:0] a_addr = 0, b_addr = 0;
  logic        a_write = 0, b_write = 0;
  logic [7:0]  a_wd = 0, b_wd = 0, a_rd, b_rd;
  logic [7:0]  model [DEPTH];
  int checks = 0, failures = 0;

  ocm_ram #(.DEPTH(DEPTH)) dut (
    .clk,
    .a_addr, .a_write, .a_writedata(a_wd), .a_readdata(a_rd),
    .b_addr, .b_write, .b_writedata(b_wd), .b_readdata(b_rd)
  );

  always #5 clk = ~clk;

  task automatic expect8(input logic [7:0] got, input logic [7:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill: even addresses through A, odd through B.
    for (int i = 0; i < DEPTH; i += 2) begin
      model[i]   = 8'($urandom);
      model[i+1] = 8'($urandom);
      @(negedge clk);
      a_addr = 17'(i);   a_write = 1; a_wd = model[i];
      b_addr = 17'(i+1); b_write = 1; b_wd = model[i+1];
    end
    @(negedge clk); a_write = 0; b_write = 0;
    // Read every byte through both ports; data is there one cycle later.
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_addr = 17'(i); b_addr = 17'(DEPTH - 1 - i);
      @(posedge clk); #1;
      expect8(a_rd, model[i], "port A read");
      expect8(b_rd, model[DEPTH-1-i], "port B read");
    end
    // Latency: change the address, the output must not follow before the edge.
    @(negedge clk); a_addr = 17'(3);
    @(posedge clk); #1;
    @(negedge clk); a_addr = 17'(4);
    #1 expect8(a_rd, model[3], "registered read holds until the clock");
    // Collision: B wins.
    @(negedge clk);
    a_addr = 17'(7); a_write = 1; a_wd = 8'hAA;
    b_addr = 17'(7); b_write = 1; b_wd = 8'h55;
    @(negedge clk); a_write = 0; b_write = 0;
    @(posedge clk); #1;
    expect8(a_rd, 8'h55, "collision");
    // Out of range: write ignored, read zero.
    @(negedge clk); b_addr = 17'(DEPTH + 3); b_write = 1; b_wd = 8'h77;
    a_addr = 17'(DEPTH + 3);
    @(negedge clk); b_write = 0;
    @(posedge clk); #1;
    expect8(a_rd, 8'h00, "out of range read");
    expect8(b_rd, 8'h00, "out of range read B");
    a_addr = 17'(3);
    @(posedge clk); #1;
    expect8(a_rd, model[3], "in range after out of range write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
