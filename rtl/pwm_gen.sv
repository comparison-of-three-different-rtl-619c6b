// pwm_gen: triangular carrier, double-buffered mapping times, gate outputs.
//
// A 16-bit counter runs up from 0 to MAX = 65536-CARRIER_STEP in steps of
// CARRIER_STEP and back down to 0; each value is visited once on the way up
// and once on the way down, so one carrier period (one ts) lasts
// 2*65536/CARRIER_STEP clocks and is symmetric. Gate [p][j] is on while the
// counter is at or above its mapping time: a time of 0 keeps the switch on
// for the whole period, 65535 keeps it off. This follows the published rule
// "PWM output is 1 when the carrier counter is greater than the mapping
// time"; the 'at or above' form, the step size and the double buffering are
// this design's choices.
//
// Mapping times are written into a shadow register by 'load' at any time
// and copied into the active register when a new period starts. 'sample'
// pulses for one clock in the first clock of every period: it asks the
// modulator for the times of the next period (one period of latency). After
// reset all times are 65535, so every gate stays off until the first
// computed times arrive. Gates are registered (one clock behind the counter).
module pwm_gen
  import svpwm_pkg::*;
#(
  parameter int LEVELS       = 3,
  parameter int CARRIER_STEP = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  tmap_t tmap_in [3][LEVELS-1],
  output logic  sample,
  output logic  carrier_up,
  output tmap_t carrier,
  output logic  gate [3][LEVELS-1]
);

  localparam tmap_t CMAX = tmap_t'(65536 - CARRIER_STEP);

  tmap_t shadow [3][LEVELS-1];
  tmap_t active [3][LEVELS-1];

  initial begin
    assert (CARRIER_STEP >= 2 && CARRIER_STEP <= 32768 &&
            (65536 % CARRIER_STEP) == 0)
      else $error("CARRIER_STEP must divide 65536 and be at least 2");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carrier    <= '0;
      carrier_up <= 1'b1;
      sample     <= 1'b0;
      for (int p = 0; p < 3; p++)
        for (int j = 0; j < LEVELS - 1; j++) begin
          shadow[p][j] <= tmap_t'(TMAP_MAX);
          active[p][j] <= tmap_t'(TMAP_MAX);
          gate[p][j]   <= 1'b0;
        end
    end else begin
      sample <= 1'b0;
      if (carrier_up) begin
        if (carrier == CMAX) carrier_up <= 1'b0;
        else                 carrier    <= carrier + tmap_t'(CARRIER_STEP);
      end else begin
        if (carrier == '0) begin
          carrier_up <= 1'b1;
          sample     <= 1'b1;
          active     <= shadow;
        end else begin
          carrier <= carrier - tmap_t'(CARRIER_STEP);
        end
      end
      if (load) shadow <= tmap_in;
      for (int p = 0; p < 3; p++)
        for (int j = 0; j < LEVELS - 1; j++)
          gate[p][j] <= (carrier >= active[p][j]);
    end
  end

endmodule
