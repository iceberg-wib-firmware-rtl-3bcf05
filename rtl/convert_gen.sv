// convert_gen: the ADC convert strobe and time stamp of the WIB, built from
// the system clock and the timing system's commands.
//
// A 64-bit time stamp counts system clocks. Every CONVERT_PERIOD clocks a
// one-clock convert.trigger goes out (64 MHz / 32 = 2 MHz, the sample rate),
// carrying convert_count, the number of converts since the last sync. A sync
// command restarts the period and convert_count and adds one to reset_count.
// When the timing endpoint delivers a time stamp (ts_valid), the local one is
// compared with it and reloaded; out_of_sync shows whether the last comparison
// failed. All outputs are registered. The firmware names the convert_t fields
// and this block (DTS_Convert_Generation); the counting rules are this
// design's choice, and the timing endpoint itself is not modelled.
module convert_gen
  import wib_pkg::*;
#(
  parameter int unsigned CONVERT_PERIOD = 32
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        sync_cmd,
  input  logic        ts_valid,
  input  logic [63:0] ts_in,
  output convert_t    convert
);
  localparam int unsigned PW = (CONVERT_PERIOD > 1) ? $clog2(CONVERT_PERIOD) : 1;
  logic [PW-1:0] phase;

  always_ff @(posedge clk) begin
    if (reset) begin
      phase <= '0;
      convert <= '0;
    end else begin
      convert.trigger <= 1'b0;
      if (ts_valid) begin
        convert.time_stamp  <= ts_in + 64'd1;
        convert.out_of_sync <= (ts_in != convert.time_stamp);
      end else begin
        convert.time_stamp  <= convert.time_stamp + 64'd1;
      end
      if (sync_cmd) begin
        phase <= '0;
        convert.convert_count <= '0;
        convert.reset_count   <= convert.reset_count + 24'd1;
      end else if (phase == PW'(CONVERT_PERIOD - 1)) begin
        phase <= '0;
        convert.trigger       <= 1'b1;
        convert.convert_count <= convert.convert_count + 16'd1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end
endmodule
