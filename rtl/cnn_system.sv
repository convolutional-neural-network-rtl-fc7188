// cnn_system: FPGA side of an FP16 convolution accelerator for a VGG11-style
// network on a Cyclone V SoC.
//
// The host processor keeps the network and runs pooling, ReLU and the rest; it
// offloads the 3x3 convolutions. For one single-channel pass it places the
// kernel, the bias and an fm_dim x fm_dim FP16 map in SDRAM, has a DMA
// controller copy them into the RX on-chip memory, pulses `start`, waits for
// `finish`, and has a second DMA controller copy the fm_dim^2 results from the
// TX on-chip memory back to SDRAM. The DMA controllers, the host and the SDRAM
// are outside this module: their side of the two memories is brought out as
// the rx_* and tx_* ports (byte-wide, registered read, one cycle latency).
//
// RX layout: bytes 0..17 the weights w0..w8 (row-major), bytes 18..19 the bias,
// then the map, row-major; each FP16 value low byte first. TX layout: the
// output map, same order and byte order, from byte 0. A 32 x 32 pass needs
// 2068 RX bytes and 2048 TX bytes and takes 24 + 36*1024 = 36,888 cycles from
// start to finish.
//
// The blocks and their connections follow the original design's system diagram and
// design hierarchy; the memory depth, the byte order and the control ports are
// this design's own.
module cnn_system
  import cnn_pkg::*;
#(
  parameter int unsigned DIM_MAX   = 32,
  parameter int unsigned OCM_BYTES = 4608,
  parameter int unsigned ADDR_W    = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  // Control from the host
  input  logic              start,
  input  logic [5:0]        fm_dim,
  output logic              finish,
  output logic [15:0]       progress,
  // RX on-chip memory, DMA side
  input  logic [ADDR_W-1:0] rx_addr,
  input  logic              rx_write,
  input  logic [7:0]        rx_writedata,
  output logic [7:0]        rx_readdata,
  // TX on-chip memory, DMA side
  input  logic [ADDR_W-1:0] tx_addr,
  input  logic              tx_write,
  input  logic [7:0]        tx_writedata,
  output logic [7:0]        tx_readdata
);

  logic [ADDR_W-1:0] ocm0_addr, ocm1_addr;
  logic              ocm0_read, ocm1_write;
  logic [7:0]        ocm0_readdata, ocm1_writedata, ocm1_readdata;

  ocm_ram #(.DEPTH(OCM_BYTES), .ADDR_W(ADDR_W)) ocm_rx (
    .clk,
    .a_addr(ocm0_addr), .a_write(1'b0), .a_writedata(8'h00), .a_readdata(ocm0_readdata),
    .b_addr(rx_addr), .b_write(rx_write), .b_writedata(rx_writedata), .b_readdata(rx_readdata)
  );

  conv_pipeline #(.DIM_MAX(DIM_MAX), .ADDR_W(ADDR_W)) opt (
    .clk, .rst_n, .start, .fm_dim, .finish,
    .ocm0_addr, .ocm0_read, .ocm0_readdata,
    .ocm1_addr, .ocm1_write, .ocm1_writedata,
    .mult_idx(progress)
  );

  ocm_ram #(.DEPTH(OCM_BYTES), .ADDR_W(ADDR_W)) ocm_tx (
    .clk,
    .a_addr(ocm1_addr), .a_write(ocm1_write), .a_writedata(ocm1_writedata), .a_readdata(ocm1_readdata),
    .b_addr(tx_addr), .b_write(tx_write), .b_writedata(tx_writedata), .b_readdata(tx_readdata)
  );

endmodule
