// ocm_ram: byte-wide dual-port on-chip memory.
//
// The system has two of these. The RX memory is filled by a DMA controller
// with the weights, the bias and the feature map that the host copied from
// SDRAM, and read by the convolution pipeline; the TX memory is written by the
// pipeline with the results and read back by a second DMA controller. Each
// port can read or write one byte per cycle. Reads are registered: the byte at
// the address presented in cycle t appears on readdata in cycle t+1 (the read
// strobe is not needed for that, it only matters to a bus master). When both
// ports write the same byte in the same cycle, port B (the DMA side) wins. An
// address at or above DEPTH is ignored on write and reads as zero.
//
// The original design shows the two memories and the 17-bit, byte-wide addresses of
// the pipeline side; the depth, the read latency and the collision rule are
// this design's own. DEPTH defaults to 4608 bytes, so that the two memories
// together hold 73,728 bits.
module ocm_ram #(
  parameter int unsigned DEPTH  = 4608,
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  // Port A: convolution pipeline
  input  logic [ADDR_W-1:0] a_addr,
  input  logic              a_write,
  input  logic [7:0]        a_writedata,
  output logic [7:0]        a_readdata,
  // Port B: DMA controller (Avalon-MM slave side)
  input  logic [ADDR_W-1:0] b_addr,
  input  logic              b_write,
  input  logic [7:0]        b_writedata,
  output logic [7:0]        b_readdata
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [7:0]       mem [DEPTH];
  logic [IDX_W-1:0] a_idx, b_idx;
  logic             a_ok, b_ok;

  assign a_idx = IDX_W'(a_addr);
  assign b_idx = IDX_W'(b_addr);
  assign a_ok  = (a_addr < ADDR_W'(DEPTH));
  assign b_ok  = (b_addr < ADDR_W'(DEPTH));

  always_ff @(posedge clk) begin
    if (a_write && a_ok) mem[a_idx] <= a_writedata;
    if (b_write && b_ok) mem[b_idx] <= b_writedata;
  end

  always_ff @(posedge clk) begin
    a_readdata <= a_ok ? mem[a_idx] : 8'h00;
    b_readdata <= b_ok ? mem[b_idx] : 8'h00;
  end

endmodule
