// output_module: emits the decoded information bits.
//
// After start it reads block columns 0 .. kb-1 (the systematic part) from
// the LLR memory and, for each, loads the sign bits of the z lanes into the
// output sign registers (1 = negative LLR = bit 1; lanes at or above z read
// 0). Each column is offered with out_valid / out_ready and its column
// number. done pulses when the last column has been taken.
// Timing: read, one cycle memory latency, then the word is held until
// taken; at least 3 cycles per column.
module output_module
  import ldpc_pkg::*;
#(
  parameter int unsigned LANES = ZMAX
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [COLW-1:0]       kb,
  input  logic [ZW-1:0]         z,
  output logic                  rd_en,
  output logic [COLW-1:0]       rd_addr,
  input  logic signed [QW-1:0]  rd_data [LANES],
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [COLW-1:0]       out_col,
  output logic [LANES-1:0]      out_bits,
  output logic                  done
);
  typedef enum logic [1:0] {O_IDLE, O_READ, O_WAIT, O_HOLD} ostate_t;
  ostate_t         st;
  logic [COLW-1:0] col_q;

  assign rd_en     = (st == O_READ);
  assign rd_addr   = col_q;
  assign out_valid = (st == O_HOLD);
  assign out_col   = col_q;
  assign done      = (st == O_HOLD) && out_ready && (col_q == kb - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= O_IDLE;
      col_q    <= '0;
      out_bits <= '0;
    end else begin
      case (st)
        O_IDLE: if (start) begin st <= O_READ; col_q <= '0; end
        O_READ: st <= O_WAIT;
        O_WAIT: begin
          for (int i = 0; i < LANES; i++)
            out_bits[i] <= (i < int'(z)) && rd_data[i][QW-1];
          st <= O_HOLD;
        end
        O_HOLD: if (out_ready) begin
          if (done) st <= O_IDLE;
          else begin st <= O_READ; col_q <= col_q + 1'b1; end
        end
        default: st <= O_IDLE;
      endcase
    end
  end
endmodule
