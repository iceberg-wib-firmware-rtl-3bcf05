// dec8b10b: combinational 8b10b decoder with error detection.
//
// A 10-bit symbol (abcdei fghj, "a" in bit 9) is split into its 6b and 4b
// sub-blocks and looked up. code_err flags a sub-block that is not a valid
// code word; disp_err flags a valid code word whose disparity form does not
// fit the incoming running disparity (rd_in: 0 = RD-, 1 = RD+). rd_out is the
// running disparity after the symbol, taken from the symbol itself, so the
// decoder resynchronises after an error. The K flag is set for K28.y and for
// K23.7/K27.7/K29.7/K30.7. Standard code; interface is this design's choice.
module dec8b10b (
  input  logic [9:0] code,
  input  logic       rd_in,
  output logic [7:0] data,
  output logic       k,
  output logic       code_err,
  output logic       disp_err,
  output logic       rd_out
);
  logic [5:0] c6;
  logic [3:0] c4, l4;
  logic [4:0] d5;
  logic [2:0] d3;
  logic       v6, v4, k28, kx7;
  int unsigned n6, n4;
  logic       rd6;

  assign c6 = code[9:4];
  assign c4 = code[3:0];
  assign k28 = (c6 == 6'b001111) || (c6 == 6'b110000);
  // K28.y under RD+ is the complement of its RD- symbol: undo it for the 4b part.
  assign l4 = (c6 == 6'b110000) ? ~c4 : c4;

  always_comb begin
    d5 = 5'd0; v6 = 1'b0;
    unique case (c6)
      6'b100111: begin d5 = 5'd0; v6 = 1'b1; end
      6'b011000: begin d5 = 5'd0; v6 = 1'b1; end
      6'b011101: begin d5 = 5'd1; v6 = 1'b1; end
      6'b100010: begin d5 = 5'd1; v6 = 1'b1; end
      6'b101101: begin d5 = 5'd2; v6 = 1'b1; end
      6'b010010: begin d5 = 5'd2; v6 = 1'b1; end
      6'b110001: begin d5 = 5'd3; v6 = 1'b1; end
      6'b110101: begin d5 = 5'd4; v6 = 1'b1; end
      6'b001010: begin d5 = 5'd4; v6 = 1'b1; end
      6'b101001: begin d5 = 5'd5; v6 = 1'b1; end
      6'b011001: begin d5 = 5'd6; v6 = 1'b1; end
      6'b111000: begin d5 = 5'd7; v6 = 1'b1; end
      6'b000111: begin d5 = 5'd7; v6 = 1'b1; end
      6'b111001: begin d5 = 5'd8; v6 = 1'b1; end
      6'b000110: begin d5 = 5'd8; v6 = 1'b1; end
      6'b100101: begin d5 = 5'd9; v6 = 1'b1; end
      6'b010101: begin d5 = 5'd10; v6 = 1'b1; end
      6'b110100: begin d5 = 5'd11; v6 = 1'b1; end
      6'b001101: begin d5 = 5'd12; v6 = 1'b1; end
      6'b101100: begin d5 = 5'd13; v6 = 1'b1; end
      6'b011100: begin d5 = 5'd14; v6 = 1'b1; end
      6'b010111: begin d5 = 5'd15; v6 = 1'b1; end
      6'b101000: begin d5 = 5'd15; v6 = 1'b1; end
      6'b011011: begin d5 = 5'd16; v6 = 1'b1; end
      6'b100100: begin d5 = 5'd16; v6 = 1'b1; end
      6'b100011: begin d5 = 5'd17; v6 = 1'b1; end
      6'b010011: begin d5 = 5'd18; v6 = 1'b1; end
      6'b110010: begin d5 = 5'd19; v6 = 1'b1; end
      6'b001011: begin d5 = 5'd20; v6 = 1'b1; end
      6'b101010: begin d5 = 5'd21; v6 = 1'b1; end
      6'b011010: begin d5 = 5'd22; v6 = 1'b1; end
      6'b111010: begin d5 = 5'd23; v6 = 1'b1; end
      6'b000101: begin d5 = 5'd23; v6 = 1'b1; end
      6'b110011: begin d5 = 5'd24; v6 = 1'b1; end
      6'b001100: begin d5 = 5'd24; v6 = 1'b1; end
      6'b100110: begin d5 = 5'd25; v6 = 1'b1; end
      6'b010110: begin d5 = 5'd26; v6 = 1'b1; end
      6'b110110: begin d5 = 5'd27; v6 = 1'b1; end
      6'b001001: begin d5 = 5'd27; v6 = 1'b1; end
      6'b001110: begin d5 = 5'd28; v6 = 1'b1; end
      6'b101110: begin d5 = 5'd29; v6 = 1'b1; end
      6'b010001: begin d5 = 5'd29; v6 = 1'b1; end
      6'b011110: begin d5 = 5'd30; v6 = 1'b1; end
      6'b100001: begin d5 = 5'd30; v6 = 1'b1; end
      6'b101011: begin d5 = 5'd31; v6 = 1'b1; end
      6'b010100: begin d5 = 5'd31; v6 = 1'b1; end
      6'b001111: begin d5 = 5'd28; v6 = 1'b1; end
      6'b110000: begin d5 = 5'd28; v6 = 1'b1; end
      default: ;
    endcase
  end

  always_comb begin
    d3 = 3'd0; v4 = 1'b0;
    unique case (l4)
      4'b1011: begin d3 = 3'd0; v4 = 1'b1; end
      4'b0100: begin d3 = 3'd0; v4 = 1'b1; end
      4'b1001: begin d3 = 3'd1; v4 = 1'b1; end
      4'b0101: begin d3 = 3'd2; v4 = 1'b1; end
      4'b1100: begin d3 = 3'd3; v4 = 1'b1; end
      4'b0011: begin d3 = 3'd3; v4 = 1'b1; end
      4'b1101: begin d3 = 3'd4; v4 = 1'b1; end
      4'b0010: begin d3 = 3'd4; v4 = 1'b1; end
      4'b1010: begin d3 = 3'd5; v4 = 1'b1; end
      4'b0110: begin d3 = 3'd6; v4 = 1'b1; end
      4'b1110: begin d3 = 3'd7; v4 = 1'b1; end
      4'b0001: begin d3 = 3'd7; v4 = 1'b1; end
      4'b0111: begin d3 = 3'd7; v4 = 1'b1; end
      4'b1000: begin d3 = 3'd7; v4 = 1'b1; end
      default: ;
    endcase
  end

  always_comb begin
    n6 = $countones(c6);
    n4 = $countones(c4);
    // Alternate x.7 forms are only legal for K codes and the six data values
    // whose primary x.7 form would make a run of five.
    kx7 = (c4 == 4'b0111 || c4 == 4'b1000) &&
          (d5 == 5'd23 || d5 == 5'd27 || d5 == 5'd29 || d5 == 5'd30);
    k = k28 || kx7;
    data = {d3, d5};
    code_err = !v6 || !v4;
    if (k28) begin
      // K28.0-7 RD- forms (001111 + 0100/1001/0101/0011/0010/1010/0110/1000).
      if (l4 == 4'b1011 || l4 == 4'b1100 || l4 == 4'b1101 || l4 == 4'b1110 ||
          l4 == 4'b0111 || l4 == 4'b0001) code_err = 1'b1;
    end else if ((c4 == 4'b0111 || c4 == 4'b1000) && !kx7) begin
      if (!((c4 == 4'b0111 && (d5 == 5'd17 || d5 == 5'd18 || d5 == 5'd20)) ||
            (c4 == 4'b1000 && (d5 == 5'd11 || d5 == 5'd13 || d5 == 5'd14))))
        code_err = 1'b1;
    end
    // Disparity: a +2 block needs RD- before it, a -2 block RD+; the two
    // balanced-but-polar blocks (111000/000111, 1100/0011) likewise.
    disp_err = 1'b0;
    if (n6 == 4 || c6 == 6'b111000) begin
      if (rd_in) disp_err = 1'b1;
    end else if (n6 == 2 || c6 == 6'b000111) begin
      if (!rd_in) disp_err = 1'b1;
    end
    if (n6 == 3) rd6 = (c6 == 6'b111000) ? 1'b0 : (c6 == 6'b000111) ? 1'b1 : rd_in;
    else         rd6 = (n6 > 3);
    if (n4 == 3 || c4 == 4'b1100) begin
      if (rd6) disp_err = 1'b1;
    end else if (n4 == 1 || c4 == 4'b0011) begin
      if (!rd6) disp_err = 1'b1;
    end
    if (n4 == 2) rd_out = (c4 == 4'b1100) ? 1'b0 : (c4 == 4'b0011) ? 1'b1 : rd6;
    else         rd_out = (n4 > 2);
    if (n6 + n4 != 5 && n6 + n4 != 4 && n6 + n4 != 6) code_err = 1'b1;
  end
endmodule
