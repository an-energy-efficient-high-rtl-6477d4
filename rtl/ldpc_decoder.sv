// ldpc_decoder: multi-rate QC-LDPC decoder for the G.hn code set.
//
// Layered (turbo-decoding message passing) normalised min-sum decoding,
// one layer of Z check nodes at a time, with ZMAX = 360 processing units
// working in parallel on the Z lanes of a block row. Channel LLRs are loaded
// column by column, decoding runs until early termination or max_iter
// iterations, then the hard decisions of the information columns are
// streamed out.
//
// Data path per entry (one block of a layer): LLR memory -> LLR router
// (cyclic shift by the entry's offset) -> processing units (subtract old
// check message, min / second-min search) -> after the layer: processing
// units (add new check message) -> LLR derouter (inverse shift) -> LLR
// memory. The compressed check messages of each layer live in the EX
// memory, packed per code class by the EX router / derouter. The
// Index/Offset ROMs give each entry's block column and offset.
// The early-termination unit watches the hard decisions of each layer.
//
// Interface:
//  cfg_*      : load the code tables (see code_rom) before the first codeword.
//  mode_in, max_iter_in : sampled with the first input column of a codeword.
//  in_*       : 24 block columns of channel LLRs, one per beat (lanes >= Z
//               are ignored), valid/ready.
//  out_*      : 24 - M columns of decoded bits, one per beat, valid/ready.
//  dec_done   : pulses after the last output column; dec_iters / dec_early
//               give the iterations run and whether early termination hit.
//  stat_*     : one-cycle event flags (hazard stall, bank stall, EX-port
//               stall, overlapped read and write-back) for monitoring.
module ldpc_decoder
  import ldpc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we_entry,
  input  logic                  cfg_we_deg,
  input  logic [MODEW-1:0]      cfg_mode,
  input  logic [LAYW-1:0]       cfg_layer,
  input  logic [ENTW-1:0]       cfg_entry,
  input  logic                  cfg_valid,
  input  logic [COLW-1:0]       cfg_col,
  input  logic [ZW-1:0]         cfg_off,
  input  logic [MODEW-1:0]      mode_in,
  input  logic [ITW-1:0]        max_iter_in,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [QW-1:0]  in_llr [ZMAX],
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [COLW-1:0]       out_col,
  output logic [ZMAX-1:0]       out_bits,
  output logic                  busy,
  output logic                  dec_done,
  output logic [ITW-1:0]        dec_iters,
  output logic                  dec_early,
  output logic                  stat_stall_hazard,
  output logic                  stat_stall_bank,
  output logic                  stat_stall_ex,
  output logic                  stat_overlap
);
  logic [MODEW-1:0] mode;
  logic [ZW-1:0]    z;
  logic [LAYW-1:0]  m;
  logic             in_en, in_done, in_wr_en;
  logic [COLW-1:0]  in_wr_addr;
  logic signed [QW-1:0] in_wr_data [ZMAX];
  logic [LAYW-1:0]  ra_layer, rb_layer;
  logic [ENTW-1:0]  ra_entry, rb_entry;
  logic             ra_valid, rb_valid;
  logic [COLW-1:0]  ra_col, rb_col;
  logic [ZW-1:0]    ra_off, rb_off;
  logic [ENTW:0]    deg;
  logic             c_rd_en, c_wr_en;
  logic [COLW-1:0]  c_rd_addr, c_wr_addr;
  logic             a1_valid, a1_first, a1_bank, a1_pad, a1_zero;
  logic [ENTW-1:0]  a1_entry;
  logic [ZW-1:0]    a1_off;
  logic             fin, fin_bank;
  logic             ex_en, ex_we, ex_bank;
  logic [LAYW-1:0]  ex_addr;
  logic             b_valid, b_bank, b_pad, b_last;
  logic [ENTW-1:0]  b_entry;
  logic [ZW-1:0]    b_off;
  logic             et_clear, et_stop;
  logic             out_start, out_done, o_rd_en;
  logic [COLW-1:0]  kb, o_rd_addr;
  logic             in_fire;

  logic             mem_rd_en, mem_wr_en;
  logic [COLW-1:0]  mem_rd_addr, mem_wr_addr;
  logic signed [QW-1:0] mem_wr_data [ZMAX];
  logic signed [QW-1:0] mem_rd_data [ZMAX];
  logic signed [QW-1:0] routed [ZMAX];
  logic signed [QW-1:0] pu_out [ZMAX];
  logic signed [QW-1:0] derouted [ZMAX];
  ex_rec_t          ex_rd [ZMAX];
  ex_rec_t          ex_wr [ZMAX];
  logic [EXWORD-1:0] ex_rword, ex_wword;
  logic [ZMAX-1:0]  a_sign, b_sign;

  assign in_fire = in_valid && in_ready;

  central_controller u_ctrl (
    .clk, .rst_n, .mode_in, .max_iter_in, .mode, .z, .m,
    .in_en, .in_fire, .in_done,
    .ra_layer, .ra_entry, .ra_valid, .ra_col, .ra_off,
    .rb_layer, .rb_entry, .rb_valid, .rb_col, .rb_off, .deg,
    .llr_rd_en(c_rd_en), .llr_rd_addr(c_rd_addr),
    .a1_valid, .a1_first, .a1_entry, .a1_bank, .a1_pad, .a1_zero, .a1_off,
    .fin, .fin_bank, .ex_en, .ex_we, .ex_addr, .ex_bank,
    .b_valid, .b_entry, .b_bank, .b_pad, .b_last, .b_off,
    .llr_wr_en(c_wr_en), .llr_wr_addr(c_wr_addr),
    .et_clear, .et_stop, .out_start, .kb, .out_done,
    .busy, .dec_done, .dec_iters, .dec_early,
    .stall_hazard(stat_stall_hazard), .stall_bank(stat_stall_bank),
    .stall_ex(stat_stall_ex), .overlap(stat_overlap)
  );

  code_rom u_rom (
    .clk, .cfg_we_entry, .cfg_we_deg, .cfg_mode, .cfg_layer, .cfg_entry,
    .cfg_valid, .cfg_col, .cfg_off, .mode,
    .a_layer(ra_layer), .a_entry(ra_entry), .a_valid(ra_valid), .a_col(ra_col), .a_off(ra_off),
    .b_layer(rb_layer), .b_entry(rb_entry), .b_valid(rb_valid), .b_col(rb_col), .b_off(rb_off),
    .deg
  );

  input_module #(.LANES(ZMAX)) u_in (
    .clk, .rst_n, .enable(in_en), .z, .in_valid, .in_ready, .in_llr,
    .wr_en(in_wr_en), .wr_addr(in_wr_addr), .wr_data(in_wr_data), .done(in_done)
  );

  // LLR memory port sharing: load / write-back, decode read / output read
  always_comb begin
    mem_wr_en   = in_wr_en || c_wr_en;
    mem_wr_addr = in_wr_en ? in_wr_addr : c_wr_addr;
    mem_wr_data = in_wr_en ? in_wr_data : derouted;
    mem_rd_en   = c_rd_en || o_rd_en;
    mem_rd_addr = o_rd_en ? o_rd_addr : c_rd_addr;
  end

  llr_mem #(.LANES(ZMAX)) u_llr (
    .clk, .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data)
  );

  qc_rotator #(.LANES(ZMAX)) u_router (
    .z, .s(a1_off), .inverse(1'b0), .din(mem_rd_data), .dout(routed)
  );

  ex_mem u_ex (
    .clk, .en(ex_en), .we(ex_we), .addr(ex_addr), .wdata(ex_wword), .rdata(ex_rword)
  );

  ex_router #(.LANES(ZMAX)) u_ex_router (
    .cls(mode_class(mode)), .word(ex_rword), .rec(ex_rd)
  );

  ex_derouter #(.LANES(ZMAX)) u_ex_derouter (
    .cls(mode_class(mode)), .rec(ex_wr), .word(ex_wword)
  );

  pu_array #(.LANES(ZMAX)) u_pus (
    .clk, .z, .a_valid(a1_valid), .a_first(a1_first), .a_entry(a1_entry),
    .a_bank(a1_bank), .a_pad(a1_pad), .a_zero(a1_zero), .a_llr(routed),
    .ex_in(ex_rd), .fin, .fin_bank, .b_entry, .b_bank, .b_llr(pu_out),
    .ex_bank, .ex_out(ex_wr)
  );

  qc_rotator #(.LANES(ZMAX)) u_derouter (
    .z, .s(b_off), .inverse(1'b1), .din(pu_out), .dout(derouted)
  );

  always_comb begin
    for (int i = 0; i < ZMAX; i++) begin
      a_sign[i] = routed[i][QW-1];
      b_sign[i] = pu_out[i][QW-1];
    end
  end

  early_term #(.LANES(ZMAX)) u_et (
    .clk, .rst_n, .clear(et_clear), .z, .m,
    .a_valid(a1_valid && !a1_pad), .a_bank(a1_bank), .a_entry(a1_entry), .a_sign,
    .b_valid, .b_bank, .b_entry, .b_pad, .b_last, .b_sign,
    .et_flag(), .stop(et_stop)
  );

  output_module #(.LANES(ZMAX)) u_out (
    .clk, .rst_n, .start(out_start), .kb, .z,
    .rd_en(o_rd_en), .rd_addr(o_rd_addr), .rd_data(mem_rd_data),
    .out_valid, .out_ready, .out_col, .out_bits, .done(out_done)
  );
endmodule
