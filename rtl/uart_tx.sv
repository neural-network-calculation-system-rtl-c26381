// uart_tx: UART transmitter that sends one whole packet stream.
//
// On start, the 80-bit stream is latched and, after START_DELAY_BITS idle bit
// periods, sent as BYTES_PER_STREAM back-to-back bytes, first byte (bits [7:0])
// first, each framed as start bit, 8 data bits LSB first, stop bit. Every bit
// lasts BIT_CYCLES clock cycles (868 = 100 MHz / 115200). The idle delay before
// each stream comes from the original transmitter (100 bit periods); it gives the
// receiving side time to turn around.
//
// Timing: start is a one-cycle pulse accepted while busy is low. busy is high
// from the cycle after start until done; done pulses for one cycle at the end of
// the last stop bit. The line idles high. Synchronous active-high reset.
module uart_tx
  import nn_pkg::*;
#(
  parameter int BYTES_PER_STREAM_P = BYTES_PER_STREAM,
  parameter int BIT_CYCLES         = 868,
  parameter int START_DELAY_BITS   = 100
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            start,
  input  logic [8*BYTES_PER_STREAM_P-1:0] stream,
  output logic                            tx,
  output logic                            busy,
  output logic                            done
);
  localparam int FRAME_BITS = 10 * BYTES_PER_STREAM_P;
  localparam int BITS_TOTAL = START_DELAY_BITS + FRAME_BITS;

  logic [FRAME_BITS-1:0]                 frame;
  logic [$clog2(BIT_CYCLES+1)-1:0]       cycle_count;
  logic [$clog2(BITS_TOTAL+1)-1:0]       bits_left;

  // Frame every byte: {stop=1, data[7:0], start=0}, first byte sent first.
  function automatic logic [FRAME_BITS-1:0] frame_stream(input logic [8*BYTES_PER_STREAM_P-1:0] s);
    logic [FRAME_BITS-1:0] f;
    for (int b = 0; b < BYTES_PER_STREAM_P; b++)
      f[10*b +: 10] = {1'b1, s[8*b +: 8], 1'b0};
    return f;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      tx          <= 1'b1;
      busy        <= 1'b0;
      done        <= 1'b0;
      frame       <= '1;
      cycle_count <= '0;
      bits_left   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        tx <= 1'b1;
        if (start) begin
          frame       <= frame_stream(stream);
          bits_left   <= $bits(bits_left)'(BITS_TOTAL);
          cycle_count <= '0;
          busy        <= 1'b1;
        end
      end else if (cycle_count == '0) begin
        // Start of a bit period: idle bits first, then the framed bytes.
        cycle_count <= $bits(cycle_count)'(BIT_CYCLES - 1);
        if (bits_left == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          tx   <= 1'b1;
        end else begin
          bits_left <= bits_left - 1'b1;
          if (bits_left > $bits(bits_left)'(FRAME_BITS)) begin
            tx <= 1'b1;
          end else begin
            tx    <= frame[0];
            frame <= {1'b1, frame[FRAME_BITS-1:1]};
          end
        end
      end else begin
        cycle_count <= cycle_count - 1'b1;
      end
    end
  end
endmodule
