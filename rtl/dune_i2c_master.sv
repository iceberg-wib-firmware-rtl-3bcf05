// dune_i2c_master: master for the three-word "DUNE I2C" used to configure
// the COLDATA ASIC over the cold cable.
//
// Unlike standard I2C, each access is three bytes in one transfer: a
// chip/page byte, a register address and the data byte. The data line is
// split into two one-way lines, warm-to-cold (sda_w2c, driven by this master)
// and cold-to-warm (sda_c2w, driven by the chip), so both are driven actively
// and never tri-stated.
//   write: START {chip[3:0], page[2:0], 0} A  reg A  data A  STOP
//   read:  START {chip[3:0], page[2:0], 1} A  reg A  data(from chip) N  STOP
// A = acknowledge from the chip (sda_c2w low, else ack_error), N = the
// master's not-acknowledge. Bytes go MSB first; sda_w2c changes while scl is
// low and sda_c2w is sampled at the end of the scl high time. Each bit takes
// 4 x CLK_DIV clocks (CLK_DIV = 160 gives 100 kHz from 64 MHz). start is
// taken when busy is low; done pulses for one clock at the end, with rdata
// and ack_error valid from then on. The three-word format and the split data
// lines come from the COLDATA interface; the bit placement of chip and page
// and the bit timing are this design's choice.
module dune_i2c_master #(
  parameter int unsigned CLK_DIV = 160
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  logic       rw,          // 1 = read
  input  logic [3:0] chip_addr,
  input  logic [2:0] page,
  input  logic [7:0] reg_addr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       done,
  output logic [7:0] rdata,
  output logic       ack_error,
  output logic       scl,
  output logic       sda_w2c,
  input  logic       sda_c2w
);
  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam logic [4:0] POS_STOP = 5'd28;   // 0 START, 1..27 bits, 28 STOP

  logic [DW-1:0] div;
  logic [1:0]    quarter;
  logic [4:0]    pos;
  logic [26:0]   shreg;    // the three 9-bit slots (byte + ack), first slot at 26
  logic          rd_q;
  logic          tick;
  logic [4:0]    bit_no;   // 0..26 within the bit slots
  logic          ack_slot, read_slot, drive;

  assign tick      = (div == DW'(CLK_DIV - 1));
  assign bit_no    = pos - 5'd1;
  assign ack_slot  = (pos >= 5'd1 && pos <= 5'd27) && ((bit_no == 5'd8) || (bit_no == 5'd17) || (bit_no == 5'd26));
  assign read_slot = rd_q && (pos >= 5'd19 && pos <= 5'd26);
  assign drive     = shreg[26];

  always_ff @(posedge clk) begin
    if (reset) begin
      busy <= 1'b0; done <= 1'b0; div <= '0; quarter <= '0; pos <= '0;
      shreg <= '0; rd_q <= 1'b0; rdata <= '0; ack_error <= 1'b0;
      scl <= 1'b1; sda_w2c <= 1'b1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        scl <= 1'b1; sda_w2c <= 1'b1;
        if (start) begin
          busy <= 1'b1; div <= '0; quarter <= '0; pos <= '0; rd_q <= rw;
          ack_error <= 1'b0;
          // Ack and read-data slots are sent as 1 (line released).
          shreg <= {chip_addr, page, rw, 1'b1, reg_addr, 1'b1,
                    (rw ? 8'hFF : wdata), 1'b1};
        end
      end else begin
        div <= tick ? '0 : div + 1'b1;
        // Line levels for this quarter.
        if (pos == 5'd0) begin
          scl     <= (quarter != 2'd3);
          sda_w2c <= (quarter < 2'd2);
        end else if (pos == POS_STOP) begin
          scl     <= (quarter != 2'd0);
          sda_w2c <= (quarter >= 2'd2);
        end else begin
          scl     <= (quarter == 2'd1) || (quarter == 2'd2);
          sda_w2c <= drive;
        end
        if (tick) begin
          quarter <= quarter + 2'd1;
          if (quarter == 2'd2 && pos != 5'd0 && pos != POS_STOP) begin
            if (ack_slot && bit_no != 5'd26 && sda_c2w) ack_error <= 1'b1;
            if (ack_slot && bit_no == 5'd26 && !rd_q && sda_c2w) ack_error <= 1'b1;
            if (read_slot) rdata <= {rdata[6:0], sda_c2w};
          end
          if (quarter == 2'd3) begin
            if (pos != 5'd0) shreg <= {shreg[25:0], 1'b1};
            if (pos == POS_STOP) begin
              busy <= 1'b0; done <= 1'b1;
            end
            pos <= pos + 5'd1;
          end
        end
      end
    end
  end
endmodule
