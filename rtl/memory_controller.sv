// memory_controller: writes neurons into the weight RAM and reads a group back.
//
// Write side: each complete neuron received from the host (bias word plus
// MAX_NET_WIDTH weights, bias in the least significant word) is written to row
// layer_id * MAX_NET_WIDTH + k, where k counts the neurons written so far for
// that layer and restarts at 0 whenever the write layer id changes. A layer is
// therefore stored as consecutive rows.
//
// Read side: a read request (read_en with read_layer_id, read_node_id and
// read_parallelism = P) reads the P consecutive rows starting at
// read_layer_id * MAX_NET_WIDTH + read_node_id. Row k is split into slot k of
// read_thresholds (its bias word) and slot k of read_weights (its weights);
// slots P and above are cleared. read_rdy is high for one cycle when all P rows
// are in. The row address formula and the bias-in-lowest-word layout are the
// original design's; reading exactly P rows (the original always read a whole
// layer) and indexed slots in place of shift registers are this design's.
//
// Timing: one RAM access per cycle with one cycle of read latency. read_rdy
// rises on the (P+3)-th clock edge, counting the edge that samples read_en as
// the first. Requests are accepted only
// while idle (busy low); a write request has priority over a read request.
// Synchronous active-high reset.
module memory_controller
  import nn_pkg::*;
#(
  parameter int I = MAX_NET_WIDTH,
  parameter int D = MAX_NET_DEPTH,
  parameter int M = WEIGHT_WIDTH,
  localparam int ROW_W  = (I + 1) * M,
  localparam int ROWS   = D * I,
  localparam int ADDR_W = $clog2(ROWS),
  localparam int LID_W  = (D > 1) ? $clog2(D) : 1,
  localparam int NID_W  = $clog2(I),
  localparam int P_W    = $clog2(I + 1)
) (
  input  logic               clk,
  input  logic               rst,
  // write side (communication module)
  input  logic               write_en,
  input  logic [ROW_W-1:0]   write_node,
  input  logic [LID_W-1:0]   write_layer_id,
  // read side (layer controller)
  input  logic               read_en,
  input  logic [LID_W-1:0]   read_layer_id,
  input  logic [NID_W-1:0]   read_node_id,
  input  logic [P_W-1:0]     read_parallelism,
  output logic [I*I*M-1:0]   read_weights,
  output logic [I*M-1:0]     read_thresholds,
  output logic               read_rdy,
  output logic               busy
);
  typedef enum logic [1:0] {ST_IDLE, ST_WRITE, ST_READ} state_e;
  state_e state;

  logic              ram_en, ram_we;
  logic [ADDR_W-1:0] ram_addr;
  logic [ROW_W-1:0]  ram_din, ram_dout;

  logic [LID_W-1:0]  last_wr_layer;
  logic              wr_layer_valid;
  logic [NID_W-1:0]  wr_offset;
  logic [P_W-1:0]    rd_issued;    // rows addressed so far
  logic [P_W-1:0]    rd_received;  // rows captured so far
  logic [P_W-1:0]    rd_count;     // rows to read (P, at most I)
  logic              rd_pending;   // a row was addressed in the previous cycle

  weight_bram #(.DEPTH(ROWS), .WIDTH(ROW_W)) u_bram (
    .clk (clk), .en(ram_en), .we(ram_we), .addr(ram_addr), .din(ram_din), .dout(ram_dout)
  );

  assign busy = (state != ST_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= ST_IDLE;
      ram_en          <= 1'b0;
      ram_we          <= 1'b0;
      ram_addr        <= '0;
      ram_din         <= '0;
      last_wr_layer   <= '0;
      wr_layer_valid  <= 1'b0;
      wr_offset       <= '0;
      rd_issued       <= '0;
      rd_received     <= '0;
      rd_count        <= '0;
      rd_pending      <= 1'b0;
      read_rdy        <= 1'b0;
      read_weights    <= '0;
      read_thresholds <= '0;
    end else begin
      read_rdy <= 1'b0;
      ram_en   <= 1'b0;
      ram_we   <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (write_en) begin
            // Restart the row offset when a new layer begins.
            if (!wr_layer_valid || write_layer_id != last_wr_layer) begin
              ram_addr  <= ADDR_W'(write_layer_id * I);
              wr_offset <= NID_W'(1);
            end else begin
              ram_addr  <= ADDR_W'(write_layer_id * I + wr_offset);
              wr_offset <= wr_offset + 1'b1;
            end
            last_wr_layer  <= write_layer_id;
            wr_layer_valid <= 1'b1;
            ram_din        <= write_node;
            ram_en         <= 1'b1;
            ram_we         <= 1'b1;
            state          <= ST_WRITE;
          end else if (read_en) begin
            ram_addr        <= ADDR_W'(read_layer_id * I + read_node_id);
            rd_count        <= (read_parallelism > P_W'(I)) ? P_W'(I) : read_parallelism;
            rd_issued       <= '0;
            rd_received     <= '0;
            rd_pending      <= 1'b0;
            read_weights    <= '0;
            read_thresholds <= '0;
            state           <= ST_READ;
          end
        end
        ST_WRITE: state <= ST_IDLE;   // the write itself happens on this edge
        ST_READ: begin
          // Address the next row while rows remain.
          if (rd_issued < rd_count) begin
            ram_en <= 1'b1;
            if (rd_issued != '0) ram_addr <= ram_addr + 1'b1;
            rd_issued <= rd_issued + 1'b1;
          end
          rd_pending <= ram_en;
          // Capture the row addressed two edges ago (one cycle RAM latency).
          if (rd_pending) begin
            read_thresholds[rd_received*M +: M]       <= ram_dout[M-1:0];
            read_weights[rd_received*I*M +: I*M]      <= ram_dout[ROW_W-1:M];
            rd_received <= rd_received + 1'b1;
            if (rd_received + 1'b1 == rd_count) begin
              read_rdy <= 1'b1;
              state    <= ST_IDLE;
            end
          end
          if (rd_count == '0) begin
            read_rdy <= 1'b1;
            state    <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
