// input_module: loads one codeword of channel LLRs into the LLR memory.
//
// While enabled it accepts one block column per beat (valid/ready): the z
// LLRs of that column, 6-bit two's complement. Beats are written to block
// columns 0, 1, ... 23 in arrival order. Each LLR is clipped to the
// symmetric range -31..+31; lanes at or above z are filled with +31, the
// most positive value, so they never disturb the decoder. done pulses with
// the write of the 24th column. Throughput: one column per cycle.
// in_ready is the enable itself: while enabled the module never stalls.
module input_module
  import ldpc_pkg::*;
#(
  parameter int unsigned LANES = ZMAX
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic [ZW-1:0]         z,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [QW-1:0]  in_llr [LANES],
  output logic                  wr_en,
  output logic [COLW-1:0]       wr_addr,
  output logic signed [QW-1:0]  wr_data [LANES],
  output logic                  done
);
  logic [COLW-1:0] col_q;

  assign in_ready = enable;
  assign wr_en    = enable && in_valid;
  assign wr_addr  = col_q;
  assign done     = wr_en && (col_q == COLW'(NB - 1));

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      if (i >= int'(z))                 wr_data[i] = QMAX;
      else if (in_llr[i] == -6'sd32)    wr_data[i] = -6'sd31;
      else                              wr_data[i] = in_llr[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      col_q <= '0;
    else if (done)   col_q <= '0;
    else if (wr_en)  col_q <= col_q + 1'b1;
  end
endmodule
