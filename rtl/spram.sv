// spram: single-port RAM macro model. One access per cycle: a write when
// we = 1, otherwise a read when en = 1. Synchronous read: data appears the
// cycle after the read. Written as an array so that synthesis can map it.
module spram #(
  parameter int unsigned DEPTH = 12,
  parameter int unsigned WIDTH = 120,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
