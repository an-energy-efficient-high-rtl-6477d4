// pu: processing unit, one check node (one lane) of the layered decoder.
//
// Layered normalised min-sum, split in two phases per layer:
//  Phase A (one entry per cycle): the routed LLR L of an entry arrives with
//   a_valid; the recover unit rebuilds the old check-to-variable message R
//   from the layer's compressed record; Q = L - R (saturated) is stored in
//   the SUB regs and fed to the calc unit. A padded entry (a_pad, a row
//   shorter than the code's row length) enters as +31, which neither lowers
//   the minimum nor flips the sign.
//  fin (the cycle after the layer's last phase-A entry): the calc unit's
//   scaled min / second min / index / sign product are latched for bank
//   fin_bank.
//  Phase B (combinational, any later cycle): for entry b_entry of bank
//   b_bank, the new message R' (second min for the min entry, min otherwise,
//   sign = sign(Q) xor sign product) gives the updated LLR Q + R'.
//   ex_out is the new compressed record of bank ex_bank.
// Two banks of SUB regs and results let phase A of the next layer run while
// phase B of the previous one writes back (the overlapped schedule).
// The compressed record arrives with the layer's first entry (a_first) and
// is held for the rest of the layer. Signs of the new record are derived
// from the SUB regs, which therefore also serve as the sign registers.
// en = 0 freezes the lane (unused lanes when Z is below the lane count).
module pu
  import ldpc_pkg::*;
(
  input  logic                  clk,
  input  logic                  en,
  // phase A
  input  logic                  a_valid,
  input  logic                  a_first,
  input  logic [ENTW-1:0]       a_entry,
  input  logic                  a_bank,
  input  logic                  a_pad,
  input  logic                  a_zero,
  input  logic signed [QW-1:0]  a_llr,
  input  ex_rec_t               ex_in,
  // finalise
  input  logic                  fin,
  input  logic                  fin_bank,
  // phase B
  input  logic [ENTW-1:0]       b_entry,
  input  logic                  b_bank,
  output logic signed [QW-1:0]  b_llr,
  // compressed record
  input  logic                  ex_bank,
  output ex_rec_t               ex_out
);
  logic signed [QW-1:0] subr [2][DMAX];
  ex_rec_t              ex_hold;
  ex_rec_t              ex_cur;
  logic signed [QW-1:0] r_old, q;
  logic [MAGW-1:0]      c_min, c_sub;
  logic [ENTW-1:0]      c_idx;
  logic                 c_sgn;
  logic [MAGW-1:0]      res_min [2];
  logic [MAGW-1:0]      res_sub [2];
  logic [ENTW-1:0]      res_idx [2];
  logic                 res_sgn [2];

  assign ex_cur = a_first ? ex_in : ex_hold;

  pu_recover u_rec (.rec(ex_cur), .entry(a_entry), .zero(a_zero), .r(r_old));

  always_comb begin
    q = a_pad ? QMAX : sat_q(8'(a_llr) - 8'(r_old));
  end

  pu_calc u_calc (
    .clk, .en, .in_valid(a_valid), .in_first(a_first), .in_entry(a_entry),
    .in_mag(mag_q(q)), .in_sign(q[QW-1]),
    .min_s(c_min), .sub_s(c_sub), .idx(c_idx), .sgn(c_sgn)
  );

  always_ff @(posedge clk) begin
    if (en) begin
      if (a_valid) begin
        subr[a_bank][a_entry] <= q;
        if (a_first) ex_hold <= ex_in;
      end
      if (fin) begin
        res_min[fin_bank] <= c_min;
        res_sub[fin_bank] <= c_sub;
        res_idx[fin_bank] <= c_idx;
        res_sgn[fin_bank] <= c_sgn;
      end
    end
  end

  // phase B: updated LLR
  logic signed [QW-1:0] qb, rn;
  always_comb begin
    qb    = subr[b_bank][b_entry];
    rn    = smag(qb[QW-1] ^ res_sgn[b_bank],
                 (b_entry == res_idx[b_bank]) ? res_sub[b_bank] : res_min[b_bank]);
    b_llr = sat_q(8'(qb) + 8'(rn));
  end

  // new compressed record
  always_comb begin
    ex_out.min = res_min[ex_bank];
    ex_out.sub = res_sub[ex_bank];
    ex_out.idx = res_idx[ex_bank];
    for (int j = 0; j < DMAX; j++)
      ex_out.signs[j] = subr[ex_bank][j][QW-1] ^ res_sgn[ex_bank];
  end
endmodule
