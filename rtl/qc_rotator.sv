// qc_rotator: cyclic shifter over the first z of LANES lanes, used as the
// LLR router (forward shift) and LLR derouter (inverse shift).
//
// Forward (inverse = 0): out[i] = in[(i + s) mod z]; this lines the z LLRs
// of a block column up with the z check rows of a circulant with offset s.
// Inverse (inverse = 1): out[(i + s) mod z] = in[i], undoing the forward
// shift for the write-back. Lanes at and above z are driven with +31.
// It is built as two barrel shifts of the flattened lane vector, one by s
// lanes and one by z - s lanes, OR-ed together; the shift amount comes from
// the offset table, so no per-mode permutation network is needed.
// Requires s < z <= LANES. Purely combinational.
module qc_rotator
  import ldpc_pkg::*;
#(
  parameter int unsigned LANES = ZMAX
) (
  input  logic [ZW-1:0]        z,
  input  logic [ZW-1:0]        s,
  input  logic                 inverse,
  input  logic signed [QW-1:0] din  [LANES],
  output logic signed [QW-1:0] dout [LANES]
);
  localparam int unsigned W = LANES * QW;
  logic [W-1:0] flat_in, lo, hi, flat_out;
  logic [ZW-1:0] sh;
  logic [ZW:0]   back;

  always_comb begin
    for (int i = 0; i < LANES; i++)
      flat_in[i*QW +: QW] = (i < int'(z)) ? din[i] : '0;
    // forward by s == inverse by z - s
    sh   = (inverse && s != '0) ? ZW'(z - s) : (inverse ? '0 : s);
    back = (ZW+1)'(z) - (ZW+1)'(sh);
    lo   = flat_in >> (int'(sh) * QW);
    hi   = (back >= (ZW+1)'(z)) ? '0 : (flat_in << (int'(back) * QW));
    flat_out = lo | hi;
    for (int i = 0; i < LANES; i++)
      dout[i] = (i < int'(z)) ? flat_out[i*QW +: QW] : QMAX;
  end
endmodule
