// code_rom: Index-ROM and Offset-ROM of the decoder, plus the row length
// of each code.
//
// For every mode, layer and entry of a layer it holds the block column of
// the entry (Index-ROM), whether the entry exists (rows shorter than the
// code's row length are padded with absent entries) and the cyclic offset
// of its Z x Z circulant (Offset-ROM). Per mode it holds the row length
// (entries processed per layer). The controller reads these as look-up
// tables through two combinational ports: one for the read phase and one
// for the write-back phase.
// The base matrices of the codes are not part of this design, so the tables
// are written through a configuration port (cfg_we_entry / cfg_we_deg) after
// reset and before the first codeword; they are not reset.
module code_rom
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             cfg_we_entry,
  input  logic             cfg_we_deg,
  input  logic [MODEW-1:0] cfg_mode,
  input  logic [LAYW-1:0]  cfg_layer,
  input  logic [ENTW-1:0]  cfg_entry,
  input  logic             cfg_valid,
  input  logic [COLW-1:0]  cfg_col,
  input  logic [ZW-1:0]    cfg_off,     // also the row length for cfg_we_deg
  // lookup port A (read phase) and B (write-back phase)
  input  logic [MODEW-1:0] mode,
  input  logic [LAYW-1:0]  a_layer,
  input  logic [ENTW-1:0]  a_entry,
  output logic             a_valid,
  output logic [COLW-1:0]  a_col,
  output logic [ZW-1:0]    a_off,
  input  logic [LAYW-1:0]  b_layer,
  input  logic [ENTW-1:0]  b_entry,
  output logic             b_valid,
  output logic [COLW-1:0]  b_col,
  output logic [ZW-1:0]    b_off,
  output logic [ENTW:0]    deg
);
  typedef struct packed {
    logic            valid;
    logic [COLW-1:0] col;
  } idx_ent_t;

  idx_ent_t      index_rom  [NMODE][MMAX][DMAX];
  logic [ZW-1:0] offset_rom [NMODE][MMAX][DMAX];
  logic [ENTW:0] deg_rom    [NMODE];

  always_ff @(posedge clk) begin
    if (cfg_we_entry) begin
      index_rom[cfg_mode][cfg_layer][cfg_entry]  <= '{valid: cfg_valid, col: cfg_col};
      offset_rom[cfg_mode][cfg_layer][cfg_entry] <= cfg_off;
    end
    if (cfg_we_deg) deg_rom[cfg_mode] <= cfg_off[ENTW:0];
  end

  always_comb begin
    a_valid = index_rom[mode][a_layer][a_entry].valid;
    a_col   = index_rom[mode][a_layer][a_entry].col;
    a_off   = offset_rom[mode][a_layer][a_entry];
    b_valid = index_rom[mode][b_layer][b_entry].valid;
    b_col   = index_rom[mode][b_layer][b_entry].col;
    b_off   = offset_rom[mode][b_layer][b_entry];
    deg     = deg_rom[mode];
  end
endmodule
