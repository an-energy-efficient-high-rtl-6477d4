// tpram: two-port RAM macro model, one write port and one read port on the
// same clock. Synchronous read: data of rd_addr appears the cycle after
// rd_en. A read of the address being written in the same cycle returns the
// old word. Written as an array so that synthesis can map it to a RAM.
module tpram #(
  parameter int unsigned DEPTH = 24,
  parameter int unsigned WIDTH = 120,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
