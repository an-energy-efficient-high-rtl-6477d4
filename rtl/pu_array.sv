// pu_array: the row of processing units, one per lane of the expansion
// factor (PU-1 .. PU-ZMAX).
//
// All lanes share the control of the two phases; only the data differ.
// Lanes at or above the current expansion factor z are disabled (en = 0) and
// hold their state, the stand-in for powering off unused units when a
// shorter code is decoded. Their phase-B outputs are forced to +31, the
// most positive value, so they never affect a comparison downstream.
// Timing is that of pu: phase A registered, phase B and ex_out combinational.
module pu_array
  import ldpc_pkg::*;
#(
  parameter int unsigned LANES = ZMAX
) (
  input  logic                  clk,
  input  logic [ZW-1:0]         z,
  input  logic                  a_valid,
  input  logic                  a_first,
  input  logic [ENTW-1:0]       a_entry,
  input  logic                  a_bank,
  input  logic                  a_pad,
  input  logic                  a_zero,
  input  logic signed [QW-1:0]  a_llr [LANES],
  input  ex_rec_t               ex_in [LANES],
  input  logic                  fin,
  input  logic                  fin_bank,
  input  logic [ENTW-1:0]       b_entry,
  input  logic                  b_bank,
  output logic signed [QW-1:0]  b_llr [LANES],
  input  logic                  ex_bank,
  output ex_rec_t               ex_out [LANES]
);
  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic                 en;
    logic signed [QW-1:0] llr;
    assign en = (i < int'(z));
    pu u_pu (
      .clk, .en, .a_valid, .a_first, .a_entry, .a_bank, .a_pad, .a_zero,
      .a_llr(a_llr[i]), .ex_in(ex_in[i]), .fin, .fin_bank,
      .b_entry, .b_bank, .b_llr(llr), .ex_bank, .ex_out(ex_out[i])
    );
    assign b_llr[i] = en ? llr : QMAX;
  end
endmodule
