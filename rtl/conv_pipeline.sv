// conv_pipeline: the convolution datapath between the two on-chip memories:
// read_ocm fetches the kernel and the 3x3 windows from the RX memory, conv_opt
// multiplies and accumulates, write_ocm stores the results in the TX memory.
//
// One `start` pulse computes one single-channel 3x3 convolution with stride 1
// and one pixel of zero padding over an fm_dim x fm_dim FP16 map (fm_dim up to
// DIM_MAX); `finish` rises when the last result byte has been written and stays
// high until the next start. Latency: 24 + 36*fm_dim^2 cycles.
//
// The split into a reader, a convolution engine and a writer follows the
// original design's hierarchy; the handshakes between them are this design's
// own (see the three modules). fm_save_idx, add_idx and n_written are status
// signals of the sub-blocks that are left unconnected here; they are kept for
// waveform debugging.
module conv_pipeline
  import cnn_pkg::*;
#(
  parameter int unsigned DIM_MAX = 32,
  parameter int unsigned ADDR_W  = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [5:0]        fm_dim,
  output logic              finish,
  // RX on-chip memory, port A
  output logic [ADDR_W-1:0] ocm0_addr,
  output logic              ocm0_read,
  input  logic [7:0]        ocm0_readdata,
  // TX on-chip memory, port A
  output logic [ADDR_W-1:0] ocm1_addr,
  output logic              ocm1_write,
  output logic [7:0]        ocm1_writedata,
  // Progress
  output logic [15:0]       mult_idx
);

  logic                   in_data_ready;
  logic [5:0]             in_data_dim;
  logic [9*16-1:0]        feat_map_in;
  logic [WB_WORDS*16-1:0] weight_bias;
  logic                   start_fm, finish_fm;
  logic [3:0]             fm_save_idx;
  logic                   start_out, finish_out;
  fp16_t                  out_data;
  logic [15:0]            out_idx;
  logic [3:0]             add_idx;
  logic [4:0]             n_written;

  read_ocm #(.DIM_MAX(DIM_MAX), .ADDR_W(ADDR_W)) rd (
    .clk, .rst_n, .start, .fm_dim,
    .ocm0_addr, .ocm0_read, .ocm0_readdata,
    .in_data_ready, .in_data_dim, .feat_map_in, .weight_bias,
    .start_fm, .finish_fm, .fm_save_idx
  );

  conv_opt cv (
    .clk, .rst_n, .start,
    .in_data_ready, .in_data_dim, .feat_map_in, .weight_bias,
    .start_fm, .finish_fm,
    .start_out, .out_data, .out_idx, .finish_out,
    .mult_idx, .add_idx, .finish
  );

  write_ocm #(.ADDR_W(ADDR_W)) wr (
    .clk, .rst_n, .start_out, .out_data, .out_idx,
    .finish_out, .n_written,
    .ocm1_addr, .ocm1_write, .ocm1_writedata
  );

endmodule
