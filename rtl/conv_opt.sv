// conv_opt: the convolution engine. For every output pixel it multiplies the
// nine pixels of a 3x3 window by the nine kernel weights in parallel and sums
// the products and the bias with a single adder.
//
// Operation: `start` arms the engine. Once the reader raises in_data_ready
// (kernel loaded) the engine computes in_data_dim^2 output pixels in raster
// order. For each it pulses start_fm to request the window, waits for
// finish_fm, registers the nine products of its nine fp16_mult units, and then
// runs its fp16_add nine times, one addition per cycle, with add_idx counting
// 1..9: acc = p0; acc += p1 ... acc += p8; acc += bias. The result is offered
// to the writer with a one-cycle start_out pulse together with its index
// (out_idx = mult_idx, the raster position), and the engine waits for the
// writer's finish_out before moving on. After the last pixel `finish` goes high
// and stays high until the next start. No activation is applied: the ReLU runs
// on the host.
//
// Timing per pixel, with the reader and writer of this design: 1 cycle to
// request, 20 from start_fm to finish_fm, 1 to register the products, 9
// additions, 1 to hand over, 3 from start_out to finish_out and 1 to see it:
// 36 cycles. A whole map of N pixels takes 24 + 36*N cycles from start to
// finish (22 of them load the kernel).
//
// Nine multipliers and one adder, the names start_fm, finish_fm, mult_idx
// [15:0], add_idx [3:0] and finish, and mult_idx ending at 1024 and add_idx at 9
// for a 32 x 32 map follow the original design; the order of the additions and the
// handshakes are this design's own.
module conv_opt
  import cnn_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  // From the reader
  input  logic                   in_data_ready,
  input  logic [5:0]             in_data_dim,
  input  logic [9*16-1:0]        feat_map_in,
  input  logic [WB_WORDS*16-1:0] weight_bias,
  output logic                   start_fm,
  input  logic                   finish_fm,
  // To the writer
  output logic                   start_out,
  output fp16_t                  out_data,
  output logic [15:0]            out_idx,
  input  logic                   finish_out,
  // Status
  output logic [15:0]            mult_idx,
  output logic [3:0]             add_idx,
  output logic                   finish
);

  typedef enum logic [2:0] {
    S_IDLE, S_WAIT_WB, S_REQ, S_WAIT_FM, S_ADD, S_OUT, S_WAIT_OUT, S_DONE
  } state_t;

  state_t      state;
  fp16_t       prod_c [KERNEL_TAPS];
  fp16_t       prod_r [KERNEL_TAPS];
  fp16_t       acc, add_b, sum;
  logic [15:0] npix;

  for (genvar g = 0; g < KERNEL_TAPS; g++) begin : gen_fp_kernel
    fp16_mult fp_mult (
      .a (feat_map_in[16*g +: 16]),
      .b (weight_bias[16*g +: 16]),
      .p (prod_c[g])
    );
  end

  always_comb begin
    if (add_idx == 4'd9) add_b = weight_bias[16*KERNEL_TAPS +: 16];
    else                 add_b = prod_r[add_idx];
  end

  fp16_add fp_add (.a(acc), .b(add_b), .s(sum));

  assign out_data = acc;
  assign out_idx  = mult_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      start_fm  <= 1'b0;
      start_out <= 1'b0;
      mult_idx  <= '0;
      add_idx   <= '0;
      acc       <= '0;
      npix      <= '0;
      finish    <= 1'b0;
      for (int i = 0; i < KERNEL_TAPS; i++) prod_r[i] <= '0;
    end else begin
      start_fm  <= 1'b0;
      start_out <= 1'b0;
      unique case (state)
        S_IDLE: ;
        S_WAIT_WB: begin
          if (in_data_ready) begin
            npix     <= 16'(in_data_dim) * 16'(in_data_dim);
            mult_idx <= '0;
            state    <= (in_data_dim == 6'd0) ? S_DONE : S_REQ;
          end
        end
        S_REQ: begin
          start_fm <= 1'b1;
          state    <= S_WAIT_FM;
        end
        S_WAIT_FM: begin
          if (finish_fm) begin
            for (int i = 0; i < KERNEL_TAPS; i++) prod_r[i] <= prod_c[i];
            acc     <= prod_c[0];
            add_idx <= 4'd1;
            state   <= S_ADD;
          end
        end
        S_ADD: begin
          acc <= sum;
          if (add_idx == 4'd9) state <= S_OUT;
          else add_idx <= add_idx + 4'd1;
        end
        S_OUT: begin
          start_out <= 1'b1;
          state     <= S_WAIT_OUT;
        end
        S_WAIT_OUT: begin
          if (finish_out) begin
            mult_idx <= mult_idx + 16'd1;
            state    <= (mult_idx + 16'd1 == npix) ? S_DONE : S_REQ;
          end
        end
        S_DONE: finish <= 1'b1;
        default: state <= S_IDLE;
      endcase
      if (start) begin
        state    <= S_WAIT_WB;
        finish   <= 1'b0;
        mult_idx <= '0;
        add_idx  <= '0;
      end
    end
  end

endmodule
