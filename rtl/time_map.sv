// time_map: mapping time of every upper IGBT of every phase leg.
//
// The four-segment sequence seq[0..3] raises one phase by one level at each
// step, so each switch is off for the first z segments and on for the rest.
// Switch j of a leg (j = 0 is the outermost, named X1; j = 1 is X2 ...) is on
// when the leg's level is at least LEVELS-1-j; for three levels this is the
// published binary form of the level (2 -> "11", 1 -> "01", 0 -> "00").
// Counting the zeros z of a switch over the four segments picks its mapping
// time: 0, tI, tII, tIII or ts for z = 0..4. The PWM stage turns the switch
// on while the carrier counter is at or above that time, so z = 0 means on
// for the whole period and z = 4 off for the whole period. That reading of
// the carrier comparison follows the published PWM rule; the published worked
// example of z -> time is inconsistent on this point.
//
// Times leave in 16 bits, Q14 times four, saturated at 65535 (= ts).
// Combinational.
module time_map
  import svpwm_pkg::*;
#(
  parameter int LEVELS = 3
) (
  input  state_t seq [4],
  input  ton_t   bnd [3],
  output tmap_t  tmap [3][LEVELS-1]
);

  function automatic tmap_t to_t16(input ton_t t);
    logic [FRAC+2:0] w;
    w = {t, 2'b00};
    return (w > (FRAC+3)'(TMAP_MAX)) ? tmap_t'(TMAP_MAX) : tmap_t'(w);
  endfunction

  function automatic lvl_t phase_lvl(input state_t v, input int p);
    case (p)
      0:       return v.a;
      1:       return v.b;
      default: return v.c;
    endcase
  endfunction

  logic [2:0] z;

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      for (int j = 0; j < LEVELS - 1; j++) begin
        z = '0;
        for (int k = 0; k < 4; k++)
          if (int'(phase_lvl(seq[k], p)) < LEVELS - 1 - j) z = z + 3'd1;
        case (z)
          0:       tmap[p][j] = '0;
          1:       tmap[p][j] = to_t16(bnd[0]);
          2:       tmap[p][j] = to_t16(bnd[1]);
          3:       tmap[p][j] = to_t16(bnd[2]);
          default: tmap[p][j] = tmap_t'(TMAP_MAX);
        endcase
      end
    end
  end

endmodule
