// uart_rx: UART receiver that delivers whole packet streams.
//
// The serial line (8 data bits, LSB first, one stop bit, no parity) is sampled
// on sample_tick, 16 times per bit. Before each stream the line must have been
// high for IDLE_SAMPLES consecutive samples; a start bit is accepted after 8 low
// samples (mid-bit), then each data bit is sampled 16 samples apart and the stop
// bit is checked. Bytes with a valid stop bit are collected into an 80-bit
// stream, the first byte in bits [7:0]; a byte with a bad stop bit is dropped.
// After BYTES_PER_STREAM bytes the stream is output and stream_valid pulses for
// one clock cycle, and the receiver goes back to waiting for an idle line.
// The sampling scheme and the idle check (230 samples, about 14 bit times at
// 115200 baud) are those of the original receiver.
//
// Timing: stream is updated, and stream_valid high, for one clock cycle after
// the edge that samples the last stop bit. Synchronous active-high reset.
module uart_rx
  import nn_pkg::*;
#(
  parameter int BYTES_PER_STREAM_P = BYTES_PER_STREAM,
  parameter int IDLE_SAMPLES       = 230
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            sample_tick,
  input  logic                            rx,
  output logic [8*BYTES_PER_STREAM_P-1:0] stream,
  output logic                            stream_valid
);
  typedef enum logic [1:0] {S_VERIFY_IDLE, S_WAITING, S_LISTENING, S_VERIFY_STOP} state_e;
  state_e state;

  logic [$clog2(IDLE_SAMPLES+2)-1:0]         timer;
  logic [2:0]                                bit_count;
  logic [$clog2(BYTES_PER_STREAM_P+1)-1:0]   byte_count;
  logic [7:0]                                shift;
  logic [8*BYTES_PER_STREAM_P-1:0]           buffer;
  logic                                      rx_s, rx_m;

  // Two-flop synchroniser for the asynchronous serial line.
  always_ff @(posedge clk) begin
    if (rst) {rx_s, rx_m} <= 2'b11;
    else     {rx_s, rx_m} <= {rx_m, rx};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_VERIFY_IDLE;
      timer        <= '0;
      bit_count    <= '0;
      byte_count   <= '0;
      shift        <= '0;
      buffer       <= '0;
      stream       <= '0;
      stream_valid <= 1'b0;
    end else begin
      stream_valid <= 1'b0;
      if (sample_tick) begin
        unique case (state)
          S_VERIFY_IDLE: begin
            if (!rx_s) timer <= '0;
            else if (timer == $bits(timer)'(IDLE_SAMPLES - 1)) begin
              timer      <= '0;
              byte_count <= '0;
              state      <= S_WAITING;
            end else timer <= timer + 1'b1;
          end
          S_WAITING: begin
            if (rx_s) timer <= '0;
            else if (timer == 7) begin  // middle of the start bit
              timer     <= '0;
              bit_count <= '0;
              state     <= S_LISTENING;
            end else timer <= timer + 1'b1;
          end
          S_LISTENING: begin
            if (timer == 15) begin
              timer     <= '0;
              shift     <= {rx_s, shift[7:1]};
              bit_count <= bit_count + 1'b1;
              if (bit_count == 3'd7) state <= S_VERIFY_STOP;
            end else timer <= timer + 1'b1;
          end
          S_VERIFY_STOP: begin
            if (timer == 15) begin
              timer <= '0;
              state <= S_WAITING;
              if (rx_s) begin
                buffer     <= {shift, buffer[8*BYTES_PER_STREAM_P-1:8]};
                byte_count <= byte_count + 1'b1;
                if (byte_count == $bits(byte_count)'(BYTES_PER_STREAM_P - 1)) begin
                  stream       <= {shift, buffer[8*BYTES_PER_STREAM_P-1:8]};
                  stream_valid <= 1'b1;
                  state        <= S_VERIFY_IDLE;
                end
              end
            end else timer <= timer + 1'b1;
          end
          default: state <= S_VERIFY_IDLE;
        endcase
      end
    end
  end
endmodule
