// tb_central_controller: the controller alone, with the code tables, the
// input beats, the early-termination flag and the output handshake modelled
// here. For several codewords it checks: the load sequence; the order of
// phase-A entries (layer by layer, iteration by iteration) with their
// columns, offsets, first / padded / first-iteration flags; that the same
// entries are written back in the same order; that no column is read again
// before the layer that read it has written it back; one finalisation, one
// EX read and one EX write per layer at the right address; and termination
// after max_iter iterations or at the early-termination flag, with the
// reported iteration count and the output start.
module tb_central_controller;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [MODEW-1:0] mode_in = 3'd4, mode;
  logic [ITW-1:0] max_iter_in = 5'd3, dec_iters;
  logic [ZW-1:0] z;
  logic [LAYW-1:0] m, ra_layer, rb_layer, ex_addr;
  logic in_en, in_fire = 0, in_done = 0;
  logic [ENTW-1:0] ra_entry, rb_entry, a1_entry, b_entry;
  logic ra_valid, rb_valid;
  logic [COLW-1:0] ra_col, rb_col, llr_rd_addr, llr_wr_addr, kb;
  logic [ZW-1:0] ra_off, rb_off, a1_off, b_off;
  logic [ENTW:0] deg;
  logic llr_rd_en, a1_valid, a1_first, a1_bank, a1_pad, a1_zero, fin, fin_bank;
  logic ex_en, ex_we, ex_bank, b_valid, b_bank, b_pad, b_last, llr_wr_en;
  logic et_clear, et_stop, out_start, out_done = 0, busy, dec_done, dec_early;
  logic stall_hazard, stall_bank, stall_ex, overlap;
  central_controller dut (.*);

  localparam int DC = 5;
  int tv [MMAX][DMAX], tc [MMAX][DMAX], to [MMAX][DMAX];
  assign deg      = 6'(DC);
  assign ra_valid = tv[ra_layer][ra_entry][0];
  assign ra_col   = 5'(tc[ra_layer][ra_entry]);
  assign ra_off   = 9'(to[ra_layer][ra_entry]);
  assign rb_valid = tv[rb_layer][rb_entry][0];
  assign rb_col   = 5'(tc[rb_layer][rb_entry]);
  assign rb_off   = 9'(to[rb_layer][rb_entry]);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // monitors
  int a_seq, b_seq, n_fin, n_exr, n_exw, stop_at;
  bit pend [NB];
  int n_hz = 0, n_ov = 0;
  int a_layer_q, a_iter_q;
  always @(posedge clk) if (rst_n && dut.st == 2'd2) begin
    automatic int a_it = a_seq / (4 * DC), al = (a_seq / DC) % 4, aj = a_seq % DC;
    automatic int bl = (b_seq / DC) % 4, bj = b_seq % DC;
    if (stall_hazard) n_hz++;
    if (overlap) n_ov++;
    if (llr_rd_en) begin
      check(!pend[llr_rd_addr], $sformatf("column %0d read while pending", llr_rd_addr));
      pend[llr_rd_addr] = 1;
    end
    if (a1_valid) begin
      check(int'(a1_entry) == aj && a1_first == (aj == 0) && a1_pad == !tv[al][aj] &&
            a1_zero == (a_it == 0) && int'(a1_off) == to[al][aj],
            $sformatf("phase A entry %0d of layer %0d iteration %0d", aj, al, a_it));
      a_seq++;
    end
    if (b_valid) begin
      check(int'(b_entry) == bj && b_pad == !tv[bl][bj] && b_last == (bj == DC - 1) &&
            llr_wr_en == tv[bl][bj][0] && (!llr_wr_en || int'(llr_wr_addr) == tc[bl][bj]) &&
            int'(b_off) == to[bl][bj], $sformatf("write-back entry %0d of layer %0d", bj, bl));
      if (llr_wr_en) pend[llr_wr_addr] = 0;
      b_seq++;
    end
    if (fin) n_fin++;
    if (ex_en && !ex_we) begin
      check(int'(ex_addr) == (a_seq / DC) % 4 && ra_entry == 0, "EX read address");
      n_exr++;
    end
    if (ex_en && ex_we) begin
      check(int'(ex_addr) == n_exw % 4, "EX write address");
      n_exw++;
    end
  end
  // early-termination flag at the last write-back entry of layer stop_at
  assign et_stop = b_valid && b_last && (b_seq / DC == stop_at);

  task automatic run(input int maxit, input int stop_layer);
    int cyc = 0;
    a_seq = 0; b_seq = 0; n_fin = 0; n_exr = 0; n_exw = 0; stop_at = stop_layer;
    for (int c = 0; c < NB; c++) pend[c] = 0;
    for (int l = 0; l < MMAX; l++) begin
      int perm [NB];
      for (int c = 0; c < NB; c++) perm[c] = c;
      perm.shuffle();
      for (int j = 0; j < DMAX; j++) begin
        tv[l][j] = (j == 0) || ($urandom_range(5, 0) != 0);
        tc[l][j] = (l % 2) ? perm[j] : perm[DC - 1 - j];
        to[l][j] = $urandom_range(47, 0);
      end
    end
    @(negedge clk);
    max_iter_in = 5'(maxit);
    check(in_en && !busy, "idle accepts input");
    for (int c = 0; c < NB; c++) begin
      in_fire = 1; in_done = (c == NB - 1);
      @(negedge clk);
    end
    in_fire = 0; in_done = 0;
    check(dut.st == 2'd2 && !in_en, "decoding after load");
    while (!out_start && cyc < 5000) begin @(negedge clk); cyc++; end
    // out_start seen
    begin
      int layers = (stop_layer >= 0) ? stop_layer + 1 : maxit * 4;
      check(b_seq == layers * DC, $sformatf("written entries %0d, expected %0d", b_seq, layers * DC));
      check(n_exw == layers || n_exw == layers + 1, $sformatf("EX writes %0d for %0d layers", n_exw, layers));
      check(n_fin >= layers && n_exr >= layers, "finalisations / EX reads");
      check(int'(dec_iters) == ((stop_layer >= 0) ? stop_layer / 4 + 1 : maxit), $sformatf("iterations %0d", dec_iters));
      check(dec_early == (stop_layer >= 0), "early flag");
      check(int'(kb) == NB - 4, "kb");
    end
    repeat (3) @(negedge clk);
    out_done = 1;
    @(negedge clk);
    out_done = 0;
    check(dec_done, "dec_done after output");
    @(negedge clk);
    check(!busy, "idle again");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3, -1);
    run(5, 6);
    run(2, 0);
    run(4, -1);
    check(n_hz > 0 && n_ov > 0, "hazard stall and overlap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
