// ex_router: unpacks an EX memory word into the compressed records of the
// processing units.
//
// The EX word layout depends on the code class of the current mode
// (mode_class): lane i's record starts at bit i * W, W = 21, 28 or 35 bits
// for the rate 1/2, 2/3 and 5/6 codes, and holds, from the LSB up: min (5),
// second min (5), min index (3, 4 or 5 bits), then one sign per entry (8, 14
// or 20). This packing lets the largest code of every class fill the same
// 7560 of the 7680 bits, so one word of 64 RAMs serves all modes. Fields a
// class does not use come out as 0; so do lanes beyond the word.
// Combinational: one fixed wiring per class and a 3-way selection.
module ex_router
  import ldpc_pkg::*;
#(
  parameter int unsigned LANES = ZMAX,
  parameter int unsigned WORD  = EXWORD
) (
  input  logic [1:0]      cls,
  input  logic [WORD-1:0] word,
  output ex_rec_t         rec [LANES]
);
  ex_rec_t cand [NCLASS][LANES];

  for (genvar c = 0; c < NCLASS; c++) begin : g_cls
    localparam int unsigned W  = cls_width(c);
    localparam int unsigned IW = cls_idxw(c);
    localparam int unsigned SW = cls_signs(c);
    for (genvar i = 0; i < LANES; i++) begin : g_lane
      if ((i + 1) * W <= WORD) begin : g_fit
        assign cand[c][i] = {DMAX'(word[i*W + 2*MAGW + IW +: SW]),
                             ENTW'(word[i*W + 2*MAGW +: IW]),
                             word[i*W + MAGW +: MAGW],
                             word[i*W +: MAGW]};
      end else begin : g_out
        assign cand[c][i] = '0;
      end
    end
  end

  always_comb
    for (int i = 0; i < LANES; i++)
      rec[i] = (cls < 2'(NCLASS)) ? cand[cls][i] : '0;
endmodule
