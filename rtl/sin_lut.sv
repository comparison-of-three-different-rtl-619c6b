// sin_lut: sine of a binary angle from a 65-entry quarter-wave table.
//
// The table holds 65 16-bit codes for 0 .. 90 degrees in steps of 90/64
// degrees, in offset binary: code = 32768 + round(32767*sin(x)), so 32768
// means 2*sin(0) = 0 and 65535 means 2*sin(90deg) = 2 (49151 means 1). The
// other three quadrants are folded onto this quarter by the usual symmetry.
// The offset is removed and the result, two_sin, is 2*sin(angle) in signed
// Q14 (1.0 = 16384). The angle is truncated to the table grid (256 points
// per turn); there is no interpolation.
//
// The table size, code format and quarter-wave folding follow the published
// design; truncation to the grid is this design's choice.
// Interface: angle (16-bit binary angle, 65536 = 2*pi) -> two_sin (17-bit
// signed). Purely combinational.
module sin_lut
  import svpwm_pkg::*;
(
  input  logic [ANGLE_W-1:0] angle,
  output logic signed [16:0] two_sin
);

  // quarter-wave table, entry i = 32768 + round(32767*sin(i*pi/128))
  function automatic logic [15:0] rom(input logic [6:0] i);
    case (i)
      7'd0 : return 16'd32768; 7'd1 : return 16'd33572; 7'd2 : return 16'd34376; 7'd3 : return 16'd35178;
      7'd4 : return 16'd35980; 7'd5 : return 16'd36779; 7'd6 : return 16'd37576; 7'd7 : return 16'd38370;
      7'd8 : return 16'd39161; 7'd9 : return 16'd39947; 7'd10: return 16'd40730; 7'd11: return 16'd41507;
      7'd12: return 16'd42280; 7'd13: return 16'd43046; 7'd14: return 16'd43807; 7'd15: return 16'd44561;
      7'd16: return 16'd45307; 7'd17: return 16'd46047; 7'd18: return 16'd46778; 7'd19: return 16'd47500;
      7'd20: return 16'd48214; 7'd21: return 16'd48919; 7'd22: return 16'd49614; 7'd23: return 16'd50298;
      7'd24: return 16'd50972; 7'd25: return 16'd51636; 7'd26: return 16'd52287; 7'd27: return 16'd52927;
      7'd28: return 16'd53555; 7'd29: return 16'd54171; 7'd30: return 16'd54773; 7'd31: return 16'd55362;
      7'd32: return 16'd55938; 7'd33: return 16'd56499; 7'd34: return 16'd57047; 7'd35: return 16'd57579;
      7'd36: return 16'd58097; 7'd37: return 16'd58600; 7'd38: return 16'd59087; 7'd39: return 16'd59558;
      7'd40: return 16'd60013; 7'd41: return 16'd60451; 7'd42: return 16'd60873; 7'd43: return 16'd61278;
      7'd44: return 16'd61666; 7'd45: return 16'd62036; 7'd46: return 16'd62389; 7'd47: return 16'd62724;
      7'd48: return 16'd63041; 7'd49: return 16'd63339; 7'd50: return 16'd63620; 7'd51: return 16'd63881;
      7'd52: return 16'd64124; 7'd53: return 16'd64348; 7'd54: return 16'd64553; 7'd55: return 16'd64739;
      7'd56: return 16'd64905; 7'd57: return 16'd65053; 7'd58: return 16'd65180; 7'd59: return 16'd65289;
      7'd60: return 16'd65377; 7'd61: return 16'd65446; 7'd62: return 16'd65496; 7'd63: return 16'd65525;
      7'd64: return 16'd65535;
      default: return 16'd65535;
    endcase
  endfunction

  logic [1:0]  quad;
  logic [5:0]  idx;
  logic [6:0]  addr;
  logic [16:0] mag;

  always_comb begin
    quad = angle[15:14];
    idx  = angle[13:8];
    // quadrants 1 and 3 run the table backwards
    addr = quad[0] ? (7'd64 - {1'b0, idx}) : {1'b0, idx};
    mag  = {1'b0, rom(addr)} - 17'd32768;
    // quadrants 2 and 3 are negative
    two_sin = quad[1] ? -$signed(mag) : $signed(mag);
  end

endmodule
