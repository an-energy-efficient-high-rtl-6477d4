// ex_derouter: packs the compressed records of the processing units into
// one EX memory word, in the layout of the current code class (see
// ex_router): lane i at bit i * W with W = 21, 28 or 35, fields from the
// LSB up min, second min, min index, signs. Index and sign fields are cut
// to the class's width (a class's rows never have more entries than its
// sign field). Bits above the last lane are 0.
// Combinational: one fixed wiring per class and a 3-way selection.
module ex_derouter
  import ldpc_pkg::*;
#(
  parameter int unsigned LANES = ZMAX,
  parameter int unsigned WORD  = EXWORD
) (
  input  logic [1:0]      cls,
  input  ex_rec_t         rec [LANES],
  output logic [WORD-1:0] word
);
  logic [WORD-1:0] cand [NCLASS];

  for (genvar c = 0; c < NCLASS; c++) begin : g_cls
    localparam int unsigned W  = cls_width(c);
    localparam int unsigned IW = cls_idxw(c);
    localparam int unsigned SW = cls_signs(c);
    localparam int unsigned NL = (WORD / W < LANES) ? WORD / W : LANES;
    always_comb begin
      cand[c] = '0;
      for (int i = 0; i < int'(NL); i++)
        cand[c][i*W +: W] = {rec[i].signs[SW-1:0], rec[i].idx[IW-1:0], rec[i].sub, rec[i].min};
    end
  end

  assign word = (cls < 2'(NCLASS)) ? cand[cls] : '0;
endmodule
