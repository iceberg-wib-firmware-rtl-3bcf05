// enc8b10b: combinational 8b10b encoder (IBM/Widmer-Franaszek code).
//
// One byte plus a K flag is mapped to a 10-bit symbol chosen by the incoming
// running disparity; the outgoing running disparity is returned so that
// several encoders can be chained within one clock (the DAQ link PCS chains
// eight, one per byte of a 64-bit word). Symbol bit order is abcdei fghj with
// "a" in bit 9, the first bit on the wire. Supported control characters are
// K28.0-K28.7 and K23.7, K27.7, K29.7, K30.7; k_err flags any other K request,
// which is then encoded as the data byte. rd_in/rd_out: 0 = RD-, 1 = RD+.
// The code itself is the standard one; the chaining interface is this
// design's choice.
module enc8b10b (
  input  logic [7:0] data,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out,
  output logic       k_err
);
  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] c6;
  logic [3:0] c4;
  logic       rd6;      // running disparity after the 6b sub-block
  logic       k28, kx7, use_a7;

  assign x = data[4:0];
  assign y = data[7:5];
  assign k28 = k && (x == 5'd28);
  assign kx7 = k && (y == 3'd7) && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30);
  assign k_err = k && !k28 && !kx7;

  // 5b/6b, RD- forms.
  always_comb begin
    unique case (x)
      5'd0 : c6 = 6'b100111;
      5'd1 : c6 = 6'b011101;
      5'd2 : c6 = 6'b101101;
      5'd3 : c6 = 6'b110001;
      5'd4 : c6 = 6'b110101;
      5'd5 : c6 = 6'b101001;
      5'd6 : c6 = 6'b011001;
      5'd7 : c6 = 6'b111000;
      5'd8 : c6 = 6'b111001;
      5'd9 : c6 = 6'b100101;
      5'd10: c6 = 6'b010101;
      5'd11: c6 = 6'b110100;
      5'd12: c6 = 6'b001101;
      5'd13: c6 = 6'b101100;
      5'd14: c6 = 6'b011100;
      5'd15: c6 = 6'b010111;
      5'd16: c6 = 6'b011011;
      5'd17: c6 = 6'b100011;
      5'd18: c6 = 6'b010011;
      5'd19: c6 = 6'b110010;
      5'd20: c6 = 6'b001011;
      5'd21: c6 = 6'b101010;
      5'd22: c6 = 6'b011010;
      5'd23: c6 = 6'b111010;
      5'd24: c6 = 6'b110011;
      5'd25: c6 = 6'b100110;
      5'd26: c6 = 6'b010110;
      5'd27: c6 = 6'b110110;
      5'd28: c6 = 6'b001110;
      5'd29: c6 = 6'b101110;
      5'd30: c6 = 6'b011110;
      5'd31: c6 = 6'b101011;
      default: c6 = 6'b000000;
    endcase
    if (k28) c6 = 6'b001111;
  end

  // 3b/4b, RD- forms (x.7 primary).
  always_comb begin
    unique case (y)
      3'd0: c4 = 4'b1011;
      3'd1: c4 = 4'b1001;
      3'd2: c4 = 4'b0101;
      3'd3: c4 = 4'b1100;
      3'd4: c4 = 4'b1101;
      3'd5: c4 = 4'b1010;
      3'd6: c4 = 4'b0110;
      3'd7: c4 = 4'b1110;
      default: c4 = 4'b0000;
    endcase
  end

  logic [5:0] s6;
  logic [3:0] s4, a4;
  always_comb begin
    // 6b: unbalanced codes and D.07 take the complement under RD+.
    if (rd_in && (($countones(c6) != 3) || (c6 == 6'b111000))) s6 = ~c6;
    else                                                      s6 = c6;
    if ($countones(s6) == 3) rd6 = rd_in;
    else                     rd6 = ($countones(s6) > 3);

    use_a7 = (y == 3'd7) && (kx7 || k28 ||
             (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
             ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    a4 = use_a7 ? 4'b0111 : c4;
    if (k28) begin
      // K28.y: the whole symbol under RD+ is the complement of the RD- one,
      // whose 4b part is the RD+ form of D.x.y.
      s4 = ((y == 3'd0) || (y == 3'd3) || (y == 3'd4) || (y == 3'd7)) ? ~a4 : a4;
      if (rd_in) s4 = ~s4;
    end else if (rd6 && ((y == 3'd0) || (y == 3'd3) || (y == 3'd4) || (y == 3'd7)))
      s4 = ~a4;
    else
      s4 = a4;
    code = {s6, s4};
    if ($countones(code) == 5) rd_out = rd_in;
    else                       rd_out = ($countones(code) > 5);
  end
endmodule
