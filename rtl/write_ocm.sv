// write_ocm: stores each result of the convolution engine, as two bytes, in
// the TX on-chip memory.
//
// A one-cycle start_out pulse hands over a result and its raster index. The
// writer then writes the low byte at BASE + 2*index and the high byte at the
// next address, one byte per cycle, and pulses finish_out in the following
// cycle; n_written counts the bytes of the current result that have been
// written. The TX buffer thus has the same layout as the feature map in the RX
// buffer: row-major, two bytes per value, low byte first.
//
// Timing: start_out in cycle t, writes in cycles t+1 and t+2, finish_out high in
// cycle t+3. A start_out while busy is ignored (the engine never sends one).
//
// The signal names and widths (start_out, out_idx, finish_out, n_written [4:0],
// ocm1_write, ocm1_addr [16:0], ocm1_writedata [7:0]) follow the original design; the
// byte order and schedule are this design's own.
module write_ocm
  import cnn_pkg::*;
#(
  parameter int unsigned ADDR_W = 17,
  parameter int unsigned BASE   = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_out,
  input  fp16_t             out_data,
  input  logic [15:0]       out_idx,
  output logic              finish_out,
  output logic [4:0]        n_written,
  // TX on-chip memory, port A
  output logic [ADDR_W-1:0] ocm1_addr,
  output logic              ocm1_write,
  output logic [7:0]        ocm1_writedata
);

  typedef enum logic [1:0] {S_IDLE, S_LO, S_HI} state_t;

  state_t            state;
  fp16_t             data_r;
  logic [ADDR_W-1:0] addr_r;

  always_comb begin
    ocm1_write     = (state == S_LO) || (state == S_HI);
    ocm1_addr      = addr_r + ((state == S_HI) ? ADDR_W'(1) : ADDR_W'(0));
    ocm1_writedata = (state == S_HI) ? data_r[15:8] : data_r[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      data_r     <= '0;
      addr_r     <= '0;
      n_written  <= '0;
      finish_out <= 1'b0;
    end else begin
      finish_out <= 1'b0;
      unique case (state)
        S_IDLE: if (start_out) begin
          data_r    <= out_data;
          addr_r    <= ADDR_W'(BASE) + (ADDR_W'(out_idx) << 1);
          n_written <= '0;
          state     <= S_LO;
        end
        S_LO: begin
          n_written <= 5'd1;
          state     <= S_HI;
        end
        S_HI: begin
          n_written  <= 5'd2;
          finish_out <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
