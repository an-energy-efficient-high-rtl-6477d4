// llr_mem: LLR memory. One word holds one block column: the LANES LLRs of
// that column in natural (unshifted) order, 6 bits each. Depth is the 24
// block columns. The word is split over BANKW-bit two-port RAMs
// (360 x 6 = 2160 bits = 18 RAMs of 24 x 120 at the full size), so a whole
// column is read and another written in the same cycle: the read for the
// next layer does not wait for the write-back of the previous one.
// Timing: synchronous read, data the cycle after rd_en; read and write of
// the same address in one cycle returns the old word.
module llr_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned LANES = ZMAX,
  parameter int unsigned BANKW = 120
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [COLW-1:0]       wr_addr,
  input  logic signed [QW-1:0]  wr_data [LANES],
  input  logic                  rd_en,
  input  logic [COLW-1:0]       rd_addr,
  output logic signed [QW-1:0]  rd_data [LANES]
);
  localparam int unsigned W     = LANES * QW;
  localparam int unsigned NBANK = (W + BANKW - 1) / BANKW;
  localparam int unsigned WP    = NBANK * BANKW;
  logic [WP-1:0] wflat, rflat;

  always_comb begin
    wflat = '0;
    for (int i = 0; i < LANES; i++) wflat[i*QW +: QW] = wr_data[i];
    for (int i = 0; i < LANES; i++) rd_data[i] = rflat[i*QW +: QW];
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    tpram #(.DEPTH(NB), .WIDTH(BANKW), .AW(COLW)) u_ram (
      .clk, .wr_en, .wr_addr, .wr_data(wflat[b*BANKW +: BANKW]),
      .rd_en, .rd_addr, .rd_data(rflat[b*BANKW +: BANKW])
    );
  end
endmodule
