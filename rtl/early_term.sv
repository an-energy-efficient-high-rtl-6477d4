// early_term: early-termination unit.
//
// During a layer's read phase it stores the hard decision (sign) of every
// LLR read from memory, per entry and lane (a_* inputs, routed order). During
// the layer's write-back it compares them with the signs of the updated
// LLRs (b_* inputs, same order). Padded entries and lanes at or above z are
// not compared. At the last entry of a layer (b_last) the unchanged-layer
// counter et_flag is incremented if no decision changed in that layer and
// cleared otherwise; stop is raised in that cycle when the new count equals
// the number of layers m, i.e. a whole iteration's worth of consecutive
// layers left every decision unchanged.
// Two banks of sign storage follow the two banks of the processing units.
// clear (start of a codeword) resets the counter.
module early_term
  import ldpc_pkg::*;
#(
  parameter int unsigned LANES = ZMAX
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [ZW-1:0]     z,
  input  logic [LAYW-1:0]   m,
  input  logic              a_valid,
  input  logic              a_bank,
  input  logic [ENTW-1:0]   a_entry,
  input  logic [LANES-1:0]  a_sign,
  input  logic              b_valid,
  input  logic              b_bank,
  input  logic [ENTW-1:0]   b_entry,
  input  logic              b_pad,
  input  logic              b_last,
  input  logic [LANES-1:0]  b_sign,
  output logic [LAYW-1:0]   et_flag,
  output logic              stop
);
  logic [LANES-1:0] sign_reg [2][DMAX];
  logic [LANES-1:0] lane_mask;
  logic             layer_same, entry_same, same;
  logic [LAYW-1:0]  et_next;

  always_comb begin
    for (int i = 0; i < LANES; i++) lane_mask[i] = (i < int'(z));
    entry_same = b_pad || (((sign_reg[b_bank][b_entry] ^ b_sign) & lane_mask) == '0);
    same       = layer_same && entry_same;
    et_next    = same ? et_flag + 1'b1 : '0;
    stop       = b_valid && b_last && (et_next == m);
  end

  always_ff @(posedge clk) begin
    if (a_valid) sign_reg[a_bank][a_entry] <= a_sign;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      et_flag    <= '0;
      layer_same <= 1'b1;
    end else if (clear) begin
      et_flag    <= '0;
      layer_same <= 1'b1;
    end else if (b_valid) begin
      if (b_last) begin
        et_flag    <= et_next;
        layer_same <= 1'b1;
      end else begin
        layer_same <= same;
      end
    end
  end
endmodule
