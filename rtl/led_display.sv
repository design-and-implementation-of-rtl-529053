// led_display: seven-segment driver for the frequency shown on the LED device.
//
// Each decimal digit is decoded to the segments {g,f,e,d,c,b,a} (bit 0 = a),
// active high, for statically driven common-cathode digits; codes 10-15 are
// blank. The design only states that the frequency value is sent to an LED
// display; the seven-segment device, its segment order and polarity and the
// six-digit width (enough for 160000 Hz) are this design's choices.
// Purely combinational: seg follows bcd in the same clock.
module led_display #(
  parameter int unsigned DIGITS = dds_pkg::DISP_DIGITS
) (
  input  dds_pkg::bcd_t bcd [DIGITS],
  output logic [6:0] seg [DIGITS]
);

  function automatic logic [6:0] decode(dds_pkg::bcd_t d);
    case (d)
      4'd0:    return 7'b011_1111;
      4'd1:    return 7'b000_0110;
      4'd2:    return 7'b101_1011;
      4'd3:    return 7'b100_1111;
      4'd4:    return 7'b110_0110;
      4'd5:    return 7'b110_1101;
      4'd6:    return 7'b111_1101;
      4'd7:    return 7'b000_0111;
      4'd8:    return 7'b111_1111;
      4'd9:    return 7'b110_1111;
      default: return 7'b000_0000;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < DIGITS; i++) seg[i] = decode(bcd[i]);
  end

endmodule
