// readout_sequencer: latency pipeline, derandomiser and serialiser (ROS).
//
// Every bunch tick the slice word 'din' (W bits) enters a shift-register
// pipeline PIPE_DEPTH ticks long, which covers the time until the Level-1
// accept arrives. While ReadRequest is high the word leaving the pipeline is
// written into a FIFO_DEPTH-deep derandomiser FIFO, one word per tick, so a
// ReadRequest of n ticks reads out n consecutive slices. A word written on
// the rising edge of ReadRequest is marked as the first slice of an event.
// With HOLD_FIRST set, the later slices of an event repeat the first slice's
// data (used for the bunch-crossing number, which must tag all slices with
// the triggering crossing).
//
// Whenever the FIFO holds data the serialiser sends it at one bit per tick
// and lane: each slice is split into LANES lanes of W/LANES bits, sent most
// significant bit first, and each lane ends with its own odd parity bit.
// Slices of one event follow each other without a gap; a new event is
// preceded by at least one invalid (separator) bit, valid = 0. Transmission
// starts on the tick after the first slice is written if the FIFO was idle.
// The pipeline, FIFO depth, parity and separator follow the document; the
// bit order, single wide FIFO and first-slice flag are this design's choice.
//
// Timing: clk is 4x the bunch clock and everything moves on ce40.
module readout_sequencer #(
  parameter int W          = 88,
  parameter int LANES      = 1,
  parameter int PIPE_DEPTH = 48,
  parameter int FIFO_DEPTH = 256,
  parameter bit HOLD_FIRST = 1'b0
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        ce40,
  input  logic [W-1:0]                din,
  input  logic                        read_req,
  output logic [LANES-1:0]            ser,
  output logic                        valid,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count,
  output logic                        overflow
);
  localparam int BPL = W / LANES;
  localparam int CW  = $clog2(BPL + 1);

  logic [W-1:0] pipe [PIPE_DEPTH];
  logic [W-1:0] pipe_out, first_word, wr_word;
  logic         req_d;

  // Latency pipeline.
  always_ff @(posedge clk) begin
    if (ce40) begin
      pipe[0] <= din;
      for (int k = 1; k < PIPE_DEPTH; k++) pipe[k] <= pipe[k-1];
    end
  end
  assign pipe_out = pipe[PIPE_DEPTH-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      req_d      <= 1'b0;
      first_word <= '0;
    end else if (ce40) begin
      req_d <= read_req;
      if (read_req && !req_d) first_word <= pipe_out;
    end
  end

  assign wr_word = (HOLD_FIRST && req_d) ? first_word : pipe_out;

  // Derandomiser.
  logic [W:0] head;
  logic       empty, full, pop;
  sync_fifo #(.W(W + 1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .push (ce40 && read_req),
    .wdata({!req_d, wr_word}),
    .pop,
    .head, .empty, .full,
    .count(fifo_count),
    .overflow
  );

  // Serialiser.
  logic               busy, sep_done;
  logic [CW-1:0]      idx;
  logic [W-1:0]       sh;
  logic [LANES-1:0]   par;
  logic               start;

  assign start = ce40 && !busy && !empty && (!head[W] || sep_done);
  assign pop   = start;

  function automatic logic [LANES-1:0] lane_bits(input logic [W-1:0] w, input int i);
    logic [LANES-1:0] b;
    for (int l = 0; l < LANES; l++) b[l] = w[l*BPL + (BPL - 1 - i)];
    return b;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      sep_done <= 1'b1;
      idx      <= '0;
      sh       <= '0;
      par      <= '0;
      ser      <= '0;
      valid    <= 1'b0;
    end else if (ce40) begin
      if (start) begin
        sh    <= head[W-1:0];
        ser   <= lane_bits(head[W-1:0], 0);
        par   <= lane_bits(head[W-1:0], 0);
        valid <= 1'b1;
        idx   <= CW'(1);
        busy  <= 1'b1;
      end else if (busy) begin
        valid <= 1'b1;
        if (idx == CW'(BPL)) begin
          ser      <= ~par;          // odd parity per lane
          busy     <= 1'b0;
          sep_done <= 1'b0;
        end else begin
          ser <= lane_bits(sh, int'(idx));
          par <= par ^ lane_bits(sh, int'(idx));
          idx <= idx + 1'b1;
        end
      end else begin
        ser      <= '0;
        valid    <= 1'b0;
        sep_done <= 1'b1;
      end
    end
  end
endmodule
