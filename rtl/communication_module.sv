// communication_module: FPGA end of the host link.
//
// Receive side. uart_rx delivers 10-byte packet streams: a header byte
// {mode_data[4:0], crc_en, mode[1:0]} and nine data bytes, which are then
// decoded one byte per clock cycle, least significant byte of every value first:
//   weight mode (0): mode_data is the layer id. Every three bytes form a signed
//     24-bit word. The first two words of a layer (the first words after the
//     layer id changes) are its parallelism P and its largest neuron index;
//     after that every I+1 words form one neuron (bias word, then I weights),
//     which is presented on layer_weights with a one-cycle weight_rdy pulse.
//   input mode (1): bytes fill the I x N input vector, which is presented with
//     a one-cycle input_rdy pulse once I*N/8 bytes have arrived; the rest of that
//     stream is padding and is dropped.
//   debug mode (3) with nine zero data bytes: the host has finished sending;
//     network_depth (number of layers = last layer id + 1) is set and
//     in_transfer_done goes high and stays high until reset.
// Values may straddle streams; a partial neuron or input vector left when the
// stream type or layer changes is discarded. The CRC_EN bit is ignored (CRC
// checking is disabled in the original protocol too).
//
// Transmit side. When start_output_transfer goes high the output vector is
// latched and sent as ceil(I*N/72) output-mode (2) streams, 72 data bits each,
// output 0 in the lowest bytes, zero padded; out_transfer_done pulses after the
// last one. The protocol is the original design's; decoding byte by byte and
// the discard rules are this design's.
//
// Timing: weight_rdy, input_rdy, input_stream_seen and out_transfer_done are
// one-cycle pulses; layer_id, layer_parallelism and layer_max_node_id are valid
// with weight_rdy and stay until the next word. Synchronous active-high reset.
module communication_module
  import nn_pkg::*;
#(
  parameter int I                   = MAX_NET_WIDTH,
  parameter int D                   = MAX_NET_DEPTH,
  parameter int N                   = INPUT_WIDTH,
  parameter int M                   = WEIGHT_WIDTH,
  parameter int CLK_DIV             = 54,
  parameter int TX_BIT_CYCLES       = 868,
  parameter int RX_IDLE_SAMPLES     = 230,
  parameter int TX_START_DELAY_BITS = 100,
  localparam int LID_W = (D > 1) ? $clog2(D) : 1,
  localparam int DEP_W = $clog2(D + 1),
  localparam int NID_W = $clog2(I),
  localparam int P_W   = $clog2(I + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 uart_rx_i,
  output logic                 uart_tx_o,
  // decoded weights and layer metadata
  output logic [(I+1)*M-1:0]   layer_weights,
  output logic                 weight_rdy,
  output logic [LID_W-1:0]     layer_id,
  output logic [P_W-1:0]       layer_parallelism,
  output logic [NID_W-1:0]     layer_max_node_id,
  // decoded inputs
  output logic [I*N-1:0]       network_inputs,
  output logic                 input_rdy,
  output logic                 input_stream_seen,
  // end of the host's transfer
  output logic [DEP_W-1:0]     network_depth,
  output logic                 in_transfer_done,
  // output transfer
  input  logic                 start_output_transfer,
  input  logic [I*N-1:0]       network_outputs,
  output logic                 out_transfer_done,
  output logic [1:0]           debug_state
);
  localparam int DATA_BITS     = 8 * DATA_BYTES;                     // 72
  localparam int INPUT_BYTES   = (I * N + 7) / 8;
  localparam int OUT_STREAMS   = (I * N + DATA_BITS - 1) / DATA_BITS;
  localparam int OUT_BUF_W     = OUT_STREAMS * DATA_BITS;
  localparam int NODE_WORDS    = I + 1;

  // ---------------------------------------------------------------- UART
  logic                       sample_tick;
  logic [BITS_PER_STREAM-1:0] rx_stream;
  logic                       rx_valid;
  logic                       tx_start, tx_busy, tx_done;
  logic [BITS_PER_STREAM-1:0] tx_stream;

  uart_clkdiv #(.CLK_DIV(CLK_DIV)) u_clkdiv (.clk(clk), .rst(rst), .tick(sample_tick));

  uart_rx #(.IDLE_SAMPLES(RX_IDLE_SAMPLES)) u_rx (
    .clk(clk), .rst(rst), .sample_tick(sample_tick), .rx(uart_rx_i),
    .stream(rx_stream), .stream_valid(rx_valid)
  );

  uart_tx #(.BIT_CYCLES(TX_BIT_CYCLES), .START_DELAY_BITS(TX_START_DELAY_BITS)) u_tx (
    .clk(clk), .rst(rst), .start(tx_start), .stream(tx_stream),
    .tx(uart_tx_o), .busy(tx_busy), .done(tx_done)
  );

  // ------------------------------------------------------- stream decoding
  stream_header_t          hdr;          // header of the stream being decoded
  logic [DATA_BITS-1:0]    data_bytes;   // data bytes still to decode, next in [7:0]
  logic [3:0]              bytes_left;
  stream_mode_e            last_mode;
  logic                    mode_valid;   // last_mode holds a mode
  logic                    layer_seen;
  logic [LID_W-1:0]        prev_layer;
  // weight word assembly
  logic [1:0]              word_byte;    // bytes of the current word received
  logic [M-1:0]            word_acc;
  logic [1:0]              meta_words;   // metadata words of this layer received
  logic [$clog2(NODE_WORDS+1)-1:0] node_word;
  logic [(I+1)*M-1:0]      node_buf;
  // input assembly
  logic [$clog2(INPUT_BYTES+1)-1:0] in_byte;
  logic                    in_skip;      // rest of this stream is padding

  stream_header_t          rx_hdr;
  assign rx_hdr = stream_header_t'(rx_stream[7:0]);

  logic [M-1:0]            word_next;
  assign word_next = {data_bytes[7:0], word_acc[M-1:8]};

  always_ff @(posedge clk) begin
    if (rst) begin
      hdr               <= '0;
      data_bytes        <= '0;
      bytes_left        <= '0;
      last_mode         <= MODE_WEIGHT;
      mode_valid        <= 1'b0;
      layer_seen        <= 1'b0;
      prev_layer        <= '0;
      word_byte         <= '0;
      word_acc          <= '0;
      meta_words        <= '0;
      node_word         <= '0;
      node_buf          <= '0;
      in_byte           <= '0;
      in_skip           <= 1'b0;
      layer_weights     <= '0;
      weight_rdy        <= 1'b0;
      layer_id          <= '0;
      layer_parallelism <= '0;
      layer_max_node_id <= '0;
      network_inputs    <= '0;
      input_rdy         <= 1'b0;
      input_stream_seen <= 1'b0;
      network_depth     <= '0;
      in_transfer_done  <= 1'b0;
    end else begin
      weight_rdy        <= 1'b0;
      input_rdy         <= 1'b0;
      input_stream_seen <= 1'b0;
      if (rx_valid) begin
        // New stream: latch it and apply the per-stream header rules.
        hdr        <= rx_hdr;
        data_bytes <= rx_stream[BITS_PER_STREAM-1:8];
        bytes_left <= 4'(DATA_BYTES);
        in_skip    <= 1'b0;
        last_mode  <= rx_hdr.mode;
        mode_valid <= 1'b1;
        unique case (rx_hdr.mode)
          MODE_WEIGHT: begin
            if (!layer_seen || prev_layer != LID_W'(rx_hdr.mode_data) ||
                !mode_valid || last_mode != MODE_WEIGHT) begin
              // A new layer (or weights resumed after other traffic).
              if (!layer_seen || prev_layer != LID_W'(rx_hdr.mode_data)) meta_words <= '0;
              word_byte <= '0;
              node_word <= '0;
            end
            layer_seen <= 1'b1;
            prev_layer <= LID_W'(rx_hdr.mode_data);
            layer_id   <= LID_W'(rx_hdr.mode_data);
          end
          MODE_INPUT: begin
            input_stream_seen <= 1'b1;
            if (!mode_valid || last_mode != MODE_INPUT) in_byte <= '0;
          end
          MODE_DEBUG: begin
            if (rx_stream[BITS_PER_STREAM-1:8] == '0) begin
              in_transfer_done <= 1'b1;
              network_depth    <= layer_seen ? DEP_W'(prev_layer) + 1'b1 : '0;
            end
            bytes_left <= '0;
          end
          default: bytes_left <= '0;   // output streams are never received
        endcase
      end else if (bytes_left != '0) begin
        // Decode one data byte.
        bytes_left <= bytes_left - 1'b1;
        data_bytes <= data_bytes >> 8;
        if (hdr.mode == MODE_WEIGHT) begin
          word_acc <= word_next;
          if (word_byte == 2'd2) begin
            word_byte <= '0;
            if (meta_words == 2'd0) begin
              layer_parallelism <= P_W'(word_next);
              meta_words        <= 2'd1;
            end else if (meta_words == 2'd1) begin
              layer_max_node_id <= NID_W'(word_next);
              meta_words        <= 2'd2;
            end else begin
              node_buf[node_word*M +: M] <= word_next;
              if (node_word == $bits(node_word)'(NODE_WORDS - 1)) begin
                node_word     <= '0;
                layer_weights <= node_buf;
                layer_weights[(NODE_WORDS-1)*M +: M] <= word_next;
                weight_rdy    <= 1'b1;
              end else begin
                node_word <= node_word + 1'b1;
              end
            end
          end else begin
            word_byte <= word_byte + 1'b1;
          end
        end else if (hdr.mode == MODE_INPUT && !in_skip) begin
          network_inputs[in_byte*8 +: 8] <= data_bytes[7:0];
          if (in_byte == $bits(in_byte)'(INPUT_BYTES - 1)) begin
            in_byte   <= '0;
            in_skip   <= 1'b1;
            input_rdy <= 1'b1;
          end else begin
            in_byte <= in_byte + 1'b1;
          end
        end
      end
    end
  end

  // ------------------------------------------------------- output streams
  logic [OUT_BUF_W-1:0]                 out_buf;
  logic [$clog2(OUT_STREAMS+1)-1:0]     streams_left;
  logic                                 out_started;
  stream_header_t                       out_hdr;

  assign out_hdr   = '{mode_data: '0, crc_en: 1'b0, mode: MODE_OUTPUT};
  assign tx_stream = {out_buf[DATA_BITS-1:0], out_hdr};

  always_ff @(posedge clk) begin
    if (rst) begin
      out_buf           <= '0;
      streams_left      <= '0;
      out_started       <= 1'b0;
      tx_start          <= 1'b0;
      out_transfer_done <= 1'b0;
    end else begin
      tx_start          <= 1'b0;
      out_transfer_done <= 1'b0;
      if (start_output_transfer && !out_started) begin
        out_started  <= 1'b1;
        out_buf      <= OUT_BUF_W'(network_outputs);
        streams_left <= $bits(streams_left)'(OUT_STREAMS);
        tx_start     <= 1'b1;
      end else if (tx_done) begin
        out_buf <= out_buf >> DATA_BITS;
        if (streams_left == 1) begin
          streams_left      <= '0;
          out_transfer_done <= 1'b1;
        end else begin
          streams_left <= streams_left - 1'b1;
          tx_start     <= 1'b1;
        end
      end
    end
  end

  assign debug_state = {layer_parallelism[0], layer_max_node_id[0]};
endmodule
