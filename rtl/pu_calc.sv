// pu_calc: calculate unit of a processing unit (magnitude and sign paths).
//
// Fed one variable-to-check message per cycle (magnitude and sign), it keeps
// a running minimum, second minimum, the entry index of the minimum and the
// XOR of all signs. 'in_first' starts a new layer: the state is loaded from
// the input instead of being merged with it. The outputs show the state
// after the last accepted input; min_s and sub_s are the same magnitudes
// normalised by alpha = 0.75 (m - floor(m/4)).
// Timing: one input per cycle, results visible the cycle after the input.
// A new layer's first input may be given in the cycle right after the last
// input of the previous layer; the previous results are visible during that
// cycle and are lost at its end.
// 'en' freezes the unit (stand-in for powering off an unused lane).
module pu_calc
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             en,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic [ENTW-1:0]  in_entry,
  input  logic [MAGW-1:0]  in_mag,
  input  logic             in_sign,
  output logic [MAGW-1:0]  min_s,
  output logic [MAGW-1:0]  sub_s,
  output logic [ENTW-1:0]  idx,
  output logic             sgn
);
  logic [MAGW-1:0] min_q, sub_q;
  logic [ENTW-1:0] idx_q;
  logic            sgn_q;

  always_ff @(posedge clk) begin
    if (en && in_valid) begin
      if (in_first) begin
        min_q <= in_mag;
        sub_q <= '1;
        idx_q <= in_entry;
        sgn_q <= in_sign;
      end else begin
        // A: input below the minimum; C: input below the second minimum
        if (in_mag < min_q) begin
          sub_q <= min_q;
          min_q <= in_mag;
          idx_q <= in_entry;
        end else if (in_mag < sub_q) begin
          sub_q <= in_mag;
        end
        sgn_q <= sgn_q ^ in_sign;
      end
    end
  end

  assign min_s = scale_alpha(min_q);
  assign sub_s = scale_alpha(sub_q);
  assign idx   = idx_q;
  assign sgn   = sgn_q;
endmodule
