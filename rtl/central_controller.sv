// central_controller: sequencing of the whole decoder.
//
// States: S_IDLE / S_LOAD (channel LLRs come in through the input module),
// S_DEC (layered decoding), S_OUT (the output module reads the hard
// decisions of the information columns).
//
// Decoding runs two processes that overlap in time:
//  * the reader issues one entry of the current layer per cycle: it reads
//    the entry's block column from the LLR memory (and, with the layer's
//    first entry, the layer's compressed record from the EX memory); one
//    cycle later the data enter the processing units (a1_* outputs) through
//    the router with the entry's offset. Layers alternate between the two
//    banks of the processing units.
//  * the writer, once a layer's read phase and its finalisation are done,
//    takes the layer's entries again one per cycle, and writes each updated
//    column back through the derouter (b_* outputs), while the reader is
//    already busy with the next layer.
// Hazards: a column read by a layer is marked pending until that layer has
//  written it back; the reader stalls on a pending column (stall_hazard).
//  The reader also waits for its bank to be released by the writer
//  (stall_bank), and the first entry of a layer waits when the single-port
//  EX memory is being written in that cycle (stall_ex).
// Termination: after each written layer either the early-termination unit
//  reports that m consecutive layers left all decisions unchanged (stop),
//  or the last layer of iteration max_iter has been written. The reader
//  stops issuing after max_iter iterations; a partly read layer is then
//  dropped.
// Padded entries (absent in the Index-ROM) still take a cycle in both
//  phases but are neither read nor written.
// The first iteration tells the processing units that no check-to-variable
//  messages exist yet (a1_zero).
// The LLR addresses (llr_rd_addr, llr_wr_addr) and the write-back offset and
//  pad flag (b_off, b_pad) are the code table's answers passed straight on:
//  the controller only chooses what to look up.
module central_controller
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // configuration of the next codeword
  input  logic [MODEW-1:0] mode_in,
  input  logic [ITW-1:0]   max_iter_in,
  output logic [MODEW-1:0] mode,
  output logic [ZW-1:0]    z,
  output logic [LAYW-1:0]  m,
  // input module
  output logic             in_en,
  input  logic             in_fire,
  input  logic             in_done,
  // code ROM lookups
  output logic [LAYW-1:0]  ra_layer,
  output logic [ENTW-1:0]  ra_entry,
  input  logic             ra_valid,
  input  logic [COLW-1:0]  ra_col,
  input  logic [ZW-1:0]    ra_off,
  output logic [LAYW-1:0]  rb_layer,
  output logic [ENTW-1:0]  rb_entry,
  input  logic             rb_valid,
  input  logic [COLW-1:0]  rb_col,
  input  logic [ZW-1:0]    rb_off,
  input  logic [ENTW:0]    deg,
  // LLR memory, read phase
  output logic             llr_rd_en,
  output logic [COLW-1:0]  llr_rd_addr,
  // phase A towards router / PUs / early termination
  output logic             a1_valid,
  output logic             a1_first,
  output logic [ENTW-1:0]  a1_entry,
  output logic             a1_bank,
  output logic             a1_pad,
  output logic             a1_zero,
  output logic [ZW-1:0]    a1_off,
  output logic             fin,
  output logic             fin_bank,
  // EX memory
  output logic             ex_en,
  output logic             ex_we,
  output logic [LAYW-1:0]  ex_addr,
  output logic             ex_bank,
  // write-back phase
  output logic             b_valid,
  output logic [ENTW-1:0]  b_entry,
  output logic             b_bank,
  output logic             b_pad,
  output logic             b_last,
  output logic [ZW-1:0]    b_off,
  output logic             llr_wr_en,
  output logic [COLW-1:0]  llr_wr_addr,
  // early termination
  output logic             et_clear,
  input  logic             et_stop,
  // output module
  output logic             out_start,
  output logic [COLW-1:0]  kb,
  input  logic             out_done,
  // status
  output logic             busy,
  output logic             dec_done,
  output logic [ITW-1:0]   dec_iters,
  output logic             dec_early,
  output logic             stall_hazard,
  output logic             stall_bank,
  output logic             stall_ex,
  output logic             overlap
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_DEC, S_OUT} state_t;
  state_t st;

  logic [ITW-1:0]   max_iter;
  mode_info_t       mi;
  // reader
  logic [LAYW-1:0]  rd_layer;
  logic [ENTW-1:0]  rd_entry;
  logic             rd_bank;
  logic [ITW-1:0]   rd_iter;
  logic             rd_issue, rd_last, rd_more;
  // bank bookkeeping
  logic [1:0]       bank_busy, bank_ready;
  logic [LAYW-1:0]  bank_layer [2];
  logic [ITW-1:0]   bank_iter  [2];
  logic [NB-1:0]    pending;
  // finalisation / EX write
  logic             fin_q, ex_wr_q, ex_wr_bank;
  logic             a1_last;
  // writer
  logic             wr_on, wr_bank;
  logic [ENTW-1:0]  wr_entry;
  logic             wr_end, term_max, term;

  assign mi   = mode_info((st == S_IDLE) ? mode_in : mode);
  assign z    = mi.z;
  assign m    = mi.m;
  assign kb   = COLW'(NB) - COLW'(mi.m);
  assign busy = (st != S_IDLE);

  // ---------------- reader ----------------
  assign ra_layer = rd_layer;
  assign ra_entry = rd_entry;
  assign rd_last  = ({1'b0, rd_entry} == deg - 1'b1);
  assign rd_more  = (st == S_DEC) && (rd_iter < max_iter);
  always_comb begin
    stall_bank   = rd_more && rd_entry == '0 && bank_busy[rd_bank];
    stall_ex     = rd_more && rd_entry == '0 && !bank_busy[rd_bank] && ex_wr_q;
    stall_hazard = rd_more && !stall_bank && !stall_ex && ra_valid && pending[ra_col];
    rd_issue     = rd_more && !stall_bank && !stall_ex && !stall_hazard && !term;
  end
  assign llr_rd_en   = (st == S_DEC) ? (rd_issue && ra_valid) : 1'b0;
  assign llr_rd_addr = ra_col;

  // ---------------- writer ----------------
  assign wr_on    = bank_ready[wr_bank];
  assign rb_layer = bank_layer[wr_bank];
  assign rb_entry = wr_entry;
  assign b_valid  = wr_on;
  assign b_entry  = wr_entry;
  assign b_bank   = wr_bank;
  assign b_pad    = !rb_valid;
  assign b_off    = rb_off;
  assign b_last   = ({1'b0, wr_entry} == deg - 1'b1);
  assign wr_end   = wr_on && b_last;
  assign llr_wr_en   = wr_on && rb_valid;
  assign llr_wr_addr = rb_col;
  assign term_max = wr_end && bank_layer[wr_bank] == m - 1'b1 &&
                    bank_iter[wr_bank] == max_iter - 1'b1;
  assign term     = (st == S_DEC) && (et_stop || term_max);
  assign overlap  = wr_on && rd_issue;

  // ---------------- EX memory ----------------
  always_comb begin
    ex_we   = ex_wr_q;
    ex_en   = ex_wr_q || (rd_issue && rd_entry == '0);
    ex_addr = ex_wr_q ? bank_layer[ex_wr_bank] : rd_layer;
    ex_bank = ex_wr_bank;
  end

  assign fin      = fin_q;
  assign in_en    = (st == S_IDLE) || (st == S_LOAD);
  assign et_clear = (st != S_DEC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      mode <= '0; max_iter <= '0;
      rd_layer <= '0; rd_entry <= '0; rd_bank <= 1'b0; rd_iter <= '0;
      bank_busy <= '0; bank_ready <= '0; pending <= '0;
      bank_layer[0] <= '0; bank_layer[1] <= '0;
      bank_iter[0] <= '0; bank_iter[1] <= '0;
      fin_q <= 1'b0; fin_bank <= 1'b0; ex_wr_q <= 1'b0; ex_wr_bank <= 1'b0;
      a1_valid <= 1'b0; a1_first <= 1'b0; a1_last <= 1'b0; a1_entry <= '0;
      a1_bank <= 1'b0; a1_pad <= 1'b0; a1_zero <= 1'b0; a1_off <= '0;
      wr_bank <= 1'b0; wr_entry <= '0;
      out_start <= 1'b0; dec_done <= 1'b0; dec_iters <= '0; dec_early <= 1'b0;
    end else begin
      out_start <= 1'b0;
      dec_done  <= 1'b0;
      case (st)
        S_IDLE: begin
          mode     <= mode_in;
          max_iter <= max_iter_in;
          if (in_fire) st <= S_LOAD;
          if (in_done) st <= S_DEC;   // (only with a one-column code)
        end
        S_LOAD: if (in_done) st <= S_DEC;
        S_OUT:  if (out_done) begin st <= S_IDLE; dec_done <= 1'b1; end
        default: ;
      endcase

      // phase A pipeline register (data arrive from memory next cycle)
      a1_valid <= rd_issue;
      a1_first <= rd_entry == '0;
      a1_last  <= rd_last;
      a1_entry <= rd_entry;
      a1_bank  <= rd_bank;
      a1_pad   <= !ra_valid;
      a1_zero  <= rd_iter == '0;
      a1_off   <= ra_off;
      fin_q    <= a1_valid && a1_last;
      if (a1_valid && a1_last) fin_bank <= a1_bank;
      ex_wr_q  <= fin_q;
      if (fin_q) begin
        ex_wr_bank          <= fin_bank;
        bank_ready[fin_bank] <= 1'b1;
      end

      if (rd_issue) begin
        if (ra_valid) pending[ra_col] <= 1'b1;
        if (rd_entry == '0) begin
          bank_busy[rd_bank]  <= 1'b1;
          bank_layer[rd_bank] <= rd_layer;
          bank_iter[rd_bank]  <= rd_iter;
        end
        if (rd_last) begin
          rd_entry <= '0;
          rd_bank  <= !rd_bank;
          if (rd_layer == m - 1'b1) begin
            rd_layer <= '0;
            rd_iter  <= rd_iter + 1'b1;
          end else begin
            rd_layer <= rd_layer + 1'b1;
          end
        end else begin
          rd_entry <= rd_entry + 1'b1;
        end
      end

      if (wr_on) begin
        if (rb_valid) pending[rb_col] <= 1'b0;
        if (b_last) begin
          wr_entry            <= '0;
          wr_bank             <= !wr_bank;
          bank_busy[wr_bank]  <= 1'b0;
          bank_ready[wr_bank] <= 1'b0;
        end else begin
          wr_entry <= wr_entry + 1'b1;
        end
      end

      if (term) begin
        // decoding finished: drop any partly read layer, start output
        st         <= S_OUT;
        out_start  <= 1'b1;
        dec_iters  <= bank_iter[wr_bank] + 1'b1;
        dec_early  <= et_stop;
        rd_layer <= '0; rd_entry <= '0; rd_bank <= 1'b0; rd_iter <= '0;
        bank_busy <= '0; bank_ready <= '0; pending <= '0;
        a1_valid <= 1'b0; fin_q <= 1'b0; ex_wr_q <= 1'b0;
        wr_bank <= 1'b0; wr_entry <= '0;
      end
    end
  end
endmodule
