// ex_mem: extrinsic (check-to-variable) message memory. One word per layer
// holds the packed compressed records of all check nodes of that layer
// (layout set by ex_router / ex_derouter). The word is split over
// EXBANKS single-port RAMs of 12 x 120 bits that share one address, so a
// cycle is either a read or a write of a whole layer.
// Timing: synchronous read, data the cycle after a read; we has priority.
module ex_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned NBANK = EXBANKS,
  parameter int unsigned BANKW = 120
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic                   we,
  input  logic [LAYW-1:0]        addr,
  input  logic [NBANK*BANKW-1:0] wdata,
  output logic [NBANK*BANKW-1:0] rdata
);
  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    spram #(.DEPTH(MMAX), .WIDTH(BANKW), .AW(LAYW)) u_ram (
      .clk, .en, .we, .addr, .wdata(wdata[b*BANKW +: BANKW]),
      .rdata(rdata[b*BANKW +: BANKW])
    );
  end
endmodule
