// nn_pkg: constants and types shared by the neural-network accelerator.
//
// The accelerator evaluates a fully connected network of at most MAX_NET_DEPTH
// layers, each at most MAX_NET_WIDTH neurons wide, with signed INPUT_WIDTH-bit
// activations and signed WEIGHT_WIDTH-bit weights. The host sends everything over
// a UART as 10-byte "packet streams": one header byte followed by nine data bytes.
// The sizes below (I = 24, D = 4, N = 16, M = 24, S1 = 3, S2 = 1, 80-bit streams)
// are the ones of the original board design; the header layout is
// {mode_data[4:0], crc_en, mode[1:0]}, mode in the two least significant bits.
package nn_pkg;

  // Network limits (I, D) and number formats (N, M).
  parameter int MAX_NET_WIDTH = 24;
  parameter int MAX_NET_DEPTH = 4;
  parameter int INPUT_WIDTH   = 16;
  parameter int WEIGHT_WIDTH  = 24;

  // Right shifts applied after the multiply (S1) and after the sum (S2).
  parameter int SHIFT_1 = 3;
  parameter int SHIFT_2 = 1;

  // Packet stream format: 1 header byte + 9 data bytes.
  parameter int BYTES_PER_STREAM = 10;
  parameter int BITS_PER_STREAM  = 8 * BYTES_PER_STREAM;
  parameter int DATA_BYTES       = BYTES_PER_STREAM - 1;

  // Header modes (two least significant bits of the header byte).
  typedef enum logic [1:0] {
    MODE_WEIGHT = 2'd0,
    MODE_INPUT  = 2'd1,
    MODE_OUTPUT = 2'd2,
    MODE_DEBUG  = 2'd3
  } stream_mode_e;

  typedef struct packed {
    logic [4:0]   mode_data;  // layer id (weights), error code (debug), zero otherwise
    logic         crc_en;     // CRC follows the stream (never used by this design)
    stream_mode_e mode;
  } stream_header_t;

  // System phase, the four hardware states of the forward-propagation loop.
  typedef enum logic [1:0] {
    PH_WEIGHT_TRANSFER = 2'd0,
    PH_INPUT_TRANSFER  = 2'd1,
    PH_NETWORK_COMPUTE = 2'd2,
    PH_OUTPUT_TRANSFER = 2'd3
  } phase_e;

endpackage
