// spy_buffer: captures the event builder's output words so that software can
// read a stretch of the DAQ stream back through registers.
//
// start (a one-clock pulse) arms the buffer and empties it. With
// wait_for_trigger set, capture begins at the next start-of-event word;
// otherwise at once. While running, every valid 36-bit word ({k[3:0],
// data[31:0]}) is written until the buffer is full, then capture stops.
// read (a one-clock pulse) drops the word shown on data; empty says there is
// none. The firmware names the controls and monitor bits; the depth is this
// design's choice (DEPTH words, a power of two).
module spy_buffer #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  logic        wait_for_trigger,
  input  logic        read,
  input  logic        in_valid,
  input  logic [35:0] in_word,
  input  logic        in_sof,
  output logic [35:0] data,
  output logic        empty,
  output logic        running,
  output logic        waiting
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [35:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic        full, capture;

  assign full    = (wr_ptr - rd_ptr) == (AW + 1)'(DEPTH);
  assign empty   = (wr_ptr == rd_ptr);
  assign capture = in_valid && !full && (running || (waiting && in_sof));

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0; rd_ptr <= '0; running <= 1'b0; waiting <= 1'b0;
    end else if (start) begin
      wr_ptr <= '0; rd_ptr <= '0;
      running <= !wait_for_trigger;
      waiting <= wait_for_trigger;
    end else begin
      if (capture) begin
        wr_ptr  <= wr_ptr + 1'b1;
        running <= 1'b1;
        waiting <= 1'b0;
        if ((wr_ptr - rd_ptr) == (AW + 1)'(DEPTH - 1)) running <= 1'b0;
      end else if (full) begin
        running <= 1'b0;
      end
      if (read && !empty) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (capture) mem[wr_ptr[AW-1:0]] <= in_word;
  end

  assign data = mem[rd_ptr[AW-1:0]];
endmodule
