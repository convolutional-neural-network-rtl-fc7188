// read_ocm: fetches the kernel and the 3x3 windows of a feature map from the
// RX on-chip memory and hands them to the convolution engine.
//
// Buffer layout (bytes, from address 0): the 9 kernel weights w0..w8 in
// row-major order, then the bias, then the feature map of dim x dim pixels,
// row-major. Every FP16 value is split into two bytes, low byte first. For a
// 32 x 32 map this is 20 + 2048 = 2068 bytes.
//
// After `start` the reader latches `fm_dim`, reads the 20 kernel bytes into
// weight_bias (value i in bits [16*i +: 16], bias in [159:144]) and raises
// in_data_ready, which stays high until the next start. Each pulse on
// start_fm then fetches the window of the next output pixel, in raster order,
// into feat_map_in (pixel k of the window, k = 3*row + column, in bits
// [16*k +: 16]); positions outside the map are zero, which gives the one-pixel
// zero padding that keeps the output the size of the input. finish_fm pulses
// for one cycle when the window is complete; feat_map_in then holds still
// until the next start_fm.
//
// Timing: the memory answers one cycle after the address. The reader walks the
// 18 byte slots of a window at one slot per cycle, issuing a read for each slot
// in_map the map and writing zero for each slot outside it, so a window takes
// 18 cycles plus one to collect the last byte: finish_fm rises 20 cycles after
// the cycle in which start_fm is high. in_data_ready rises 22 cycles after the
// cycle in which start is high.
//
// The port names and widths follow the original design's signal list (feat_map_in
// [143:0], weight_bias [159:0], in_data_dim [5:0], ocm0_addr [16:0],
// ocm0_readdata [7:0], fm_save_idx [3:0]); the byte order, the slot-by-slot
// schedule and the start_fm/finish_fm handshake are this design's own.
module read_ocm
  import cnn_pkg::*;
#(
  parameter int unsigned DIM_MAX = 32,
  parameter int unsigned ADDR_W  = 17
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [5:0]           fm_dim,
  // RX on-chip memory, port A
  output logic [ADDR_W-1:0]    ocm0_addr,
  output logic                 ocm0_read,
  input  logic [7:0]           ocm0_readdata,
  // To the convolution engine
  output logic                 in_data_ready,
  output logic [5:0]           in_data_dim,
  output logic [9*16-1:0]      feat_map_in,
  output logic [WB_WORDS*16-1:0] weight_bias,
  input  logic                 start_fm,
  output logic                 finish_fm,
  output logic [3:0]           fm_save_idx
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD_WB, S_WB_DRAIN, S_WAIT_REQ, S_FETCH, S_FM_DRAIN
  } state_t;

  state_t      state;
  logic [4:0]  slot;        // byte slot being issued
  logic        pend;        // a read was issued last cycle
  logic [4:0]  pend_slot;   // ... for this byte slot
  logic [5:0]  row, col;    // output pixel whose window is fetched

  // Position of the window pixel for the slot being issued.
  logic [3:0]  k;
  logic signed [7:0] pr, pc;
  logic        in_map;
  logic [ADDR_W-1:0] fm_addr;

  always_comb begin
    k       = 4'(slot >> 1);
    pr      = $signed({2'b00, row}) + $signed(8'(k / 4'd3)) - 8'sd1;
    pc      = $signed({2'b00, col}) + $signed(8'(k % 4'd3)) - 8'sd1;
    in_map  = (pr >= 0) && (pc >= 0) &&
              (pr < $signed({2'b00, in_data_dim})) && (pc < $signed({2'b00, in_data_dim}));
    fm_addr = ADDR_W'(WB_BYTES) +
              ADDR_W'(2 * (int'(pr) * int'(in_data_dim) + int'(pc))) + ADDR_W'(slot[0]);
  end

  always_comb begin
    ocm0_read = 1'b0;
    ocm0_addr = '0;
    if (state == S_LOAD_WB) begin
      ocm0_read = 1'b1;
      ocm0_addr = ADDR_W'(slot);
    end else if (state == S_FETCH && in_map) begin
      ocm0_read = 1'b1;
      ocm0_addr = fm_addr;
    end
  end

  assign fm_save_idx = k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      slot          <= '0;
      pend          <= 1'b0;
      pend_slot     <= '0;
      row           <= '0;
      col           <= '0;
      in_data_ready <= 1'b0;
      in_data_dim   <= '0;
      feat_map_in   <= '0;
      weight_bias   <= '0;
      finish_fm     <= 1'b0;
    end else begin
      finish_fm <= 1'b0;
      pend      <= 1'b0;
      // Collect the byte requested in the previous cycle.
      if (pend) begin
        if (state == S_LOAD_WB || state == S_WB_DRAIN)
          weight_bias[8*pend_slot +: 8] <= ocm0_readdata;
        else
          feat_map_in[8*pend_slot +: 8] <= ocm0_readdata;
      end
      unique case (state)
        S_IDLE: ;
        S_LOAD_WB: begin
          pend      <= 1'b1;
          pend_slot <= slot;
          if (slot == 5'(WB_BYTES - 1)) state <= S_WB_DRAIN;
          else slot <= slot + 5'd1;
        end
        S_WB_DRAIN: begin
          in_data_ready <= 1'b1;
          row           <= '0;
          col           <= '0;
          state         <= S_WAIT_REQ;
        end
        S_WAIT_REQ: begin
          if (start_fm) begin
            slot  <= '0;
            state <= S_FETCH;
          end
        end
        S_FETCH: begin
          if (in_map) begin
            pend      <= 1'b1;
            pend_slot <= slot;
          end else begin
            feat_map_in[8*slot +: 8] <= 8'h00;
          end
          if (slot == 5'd17) state <= S_FM_DRAIN;
          else slot <= slot + 5'd1;
        end
        S_FM_DRAIN: begin
          finish_fm <= 1'b1;
          if (col == in_data_dim - 6'd1) begin
            col <= '0;
            row <= row + 6'd1;
          end else begin
            col <= col + 6'd1;
          end
          state <= S_WAIT_REQ;
        end
        default: state <= S_IDLE;
      endcase
      // A new start restarts the reader from any state.
      if (start) begin
        state         <= S_LOAD_WB;
        slot          <= '0;
        pend          <= 1'b0;
        in_data_ready <= 1'b0;
        in_data_dim   <= (fm_dim > 6'(DIM_MAX)) ? 6'(DIM_MAX) : fm_dim;
      end
    end
  end

endmodule
