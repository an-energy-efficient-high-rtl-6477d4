// pu_recover: recover unit of a processing unit.
//
// Expands the compressed check-node record of the current layer (scaled
// minimum, scaled second minimum, index of the minimum, one sign per entry)
// back into the check-to-variable message of one entry: the entry that
// held the minimum gets the second minimum, every other entry the minimum,
// each with its own stored sign. In the first iteration no message exists
// yet and 'zero' forces the output to 0.
// Purely combinational; 'entry' selects which of the layer's entries is
// being recovered.
module pu_recover
  import ldpc_pkg::*;
(
  input  ex_rec_t               rec,
  input  logic [ENTW-1:0]       entry,
  input  logic                  zero,
  output logic signed [QW-1:0]  r
);
  logic [MAGW-1:0] m;
  always_comb begin
    m = (entry == rec.idx) ? rec.sub : rec.min;
    r = zero ? '0 : smag(rec.signs[entry], m);
  end
endmodule
