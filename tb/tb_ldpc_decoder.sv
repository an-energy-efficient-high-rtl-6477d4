// tb_ldpc_decoder: end-to-end test of the decoder at its full size
// (360 processing units, all parameters at their defaults).
//
// The code tables are random quasi-cyclic structures (distinct block
// columns per layer, random offsets, some padded entries), written through
// the configuration port. Each codeword is the all-zero codeword sent with
// BPSK over a noisy channel, quantised to the 6-bit LLR format. A reference
// model in this file runs plain sequential layered normalised min-sum with
// the same arithmetic and the same early-termination rule; the decoder's
// output bits, iteration count and early-termination flag must match it
// exactly. The decoding time of each codeword is checked against the
// bounds of one entry per cycle (fastest) and of fully serial read and
// write-back phases (slowest). Every mechanism (early termination,
// max-iteration stop, hazard stall, bank stall, EX-port stall, overlapped
// read/write-back, padded entries, disabled lanes, mode switch, output
// back-pressure) must occur at least once.
`timescale 1ns/1ps
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we_entry = 0, cfg_we_deg = 0, cfg_valid = 0;
  logic [MODEW-1:0] cfg_mode = '0, mode_in = '0;
  logic [LAYW-1:0]  cfg_layer = '0;
  logic [ENTW-1:0]  cfg_entry = '0;
  logic [COLW-1:0]  cfg_col = '0;
  logic [ZW-1:0]    cfg_off = '0;
  logic [ITW-1:0]   max_iter_in = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, busy, dec_done, dec_early;
  logic signed [QW-1:0] in_llr [ZMAX];
  logic [COLW-1:0] out_col;
  logic [ZMAX-1:0] out_bits;
  logic [ITW-1:0]  dec_iters;
  logic st_hz, st_bk, st_ex, st_ov;

  ldpc_decoder dut (
    .clk, .rst_n, .cfg_we_entry, .cfg_we_deg, .cfg_mode, .cfg_layer, .cfg_entry,
    .cfg_valid, .cfg_col, .cfg_off, .mode_in, .max_iter_in,
    .in_valid, .in_ready, .in_llr, .out_valid, .out_ready, .out_col, .out_bits,
    .busy, .dec_done, .dec_iters, .dec_early,
    .stat_stall_hazard(st_hz), .stat_stall_bank(st_bk), .stat_stall_ex(st_ex),
    .stat_overlap(st_ov)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- code tables ----------------
  int tval [NMODE][MMAX][DMAX];
  int tcol [NMODE][MMAX][DMAX];
  int toff [NMODE][MMAX][DMAX];
  int tdeg [NMODE];

  task automatic make_code(input int md, input int dc, input int pad_pct);
    mode_info_t mi = mode_info(3'(md));
    int perm [NB];
    tdeg[md] = dc;
    for (int l = 0; l < int'(mi.m); l++) begin
      for (int c = 0; c < NB; c++) perm[c] = c;
      for (int c = NB - 1; c > 0; c--) begin
        automatic int k = $urandom_range(c, 0);
        automatic int t = perm[c]; perm[c] = perm[k]; perm[k] = t;
      end
      for (int j = 0; j < DMAX; j++) begin
        tcol[md][l][j] = perm[j % NB];
        toff[md][l][j] = $urandom_range(int'(mi.z) - 1, 0);
        tval[md][l][j] = (j < dc) && !(($urandom_range(99, 0) < pad_pct) && j > 1);
      end
    end
  endtask

  task automatic load_code(input int md);
    mode_info_t mi = mode_info(3'(md));
    @(negedge clk);
    cfg_mode = 3'(md);
    for (int l = 0; l < int'(mi.m); l++)
      for (int j = 0; j < DMAX; j++) begin
        cfg_we_entry = 1; cfg_layer = 4'(l); cfg_entry = 5'(j);
        cfg_valid = tval[md][l][j][0]; cfg_col = 5'(tcol[md][l][j]); cfg_off = 9'(toff[md][l][j]);
        @(negedge clk);
      end
    cfg_we_entry = 0;
    cfg_we_deg = 1; cfg_off = 9'(tdeg[md]);
    @(negedge clk);
    cfg_we_deg = 0;
  endtask

  // ---------------- reference model ----------------
  int ch   [NB][ZMAX];
  int rl   [NB][ZMAX];
  int rmin [MMAX][ZMAX], rsub [MMAX][ZMAX], ridx [MMAX][ZMAX];
  bit rsg  [MMAX][ZMAX][DMAX];
  int ref_iters; bit ref_early;

  function automatic int sat(input int v);
    return v > 31 ? 31 : (v < -31 ? -31 : v);
  endfunction
  function automatic int scl(input int v);
    return v - (v / 4);
  endfunction

  task automatic reference(input int md, input int maxit);
    mode_info_t mi = mode_info(3'(md));
    int z = int'(mi.z), mm = int'(mi.m), dc = tdeg[md];
    int et = 0;
    int q [DMAX];
    for (int c = 0; c < NB; c++) for (int r = 0; r < z; r++) rl[c][r] = ch[c][r];
    ref_iters = maxit; ref_early = 0;
    for (int it = 0; it < maxit; it++) begin
      for (int l = 0; l < mm; l++) begin
        automatic bit same = 1;
        for (int r = 0; r < z; r++) begin
          automatic int mn = 0, sb = 0, ix = 0, mg; automatic bit sg = 0;
          for (int j = 0; j < dc; j++) begin
            if (tval[md][l][j]) begin
              automatic int lv = rl[tcol[md][l][j]][(r + toff[md][l][j]) % z];
              automatic int ro = 0;
              if (it > 0) begin
                ro = (j == ridx[l][r]) ? rsub[l][r] : rmin[l][r];
                if (rsg[l][r][j]) ro = -ro;
              end
              q[j] = sat(lv - ro);
            end else q[j] = 31;
            mg = q[j] < 0 ? -q[j] : q[j];
            if (j == 0) begin mn = mg; sb = 31; ix = 0; sg = q[j] < 0; end
            else begin
              if (mg < mn) begin sb = mn; mn = mg; ix = j; end
              else if (mg < sb) sb = mg;
              sg ^= (q[j] < 0);
            end
          end
          rmin[l][r] = scl(mn); rsub[l][r] = scl(sb); ridx[l][r] = ix;
          for (int j = 0; j < dc; j++) begin
            automatic bit s = (q[j] < 0) ^ sg;
            automatic int rn = (j == ix) ? rsub[l][r] : rmin[l][r];
            rsg[l][r][j] = s;
            if (tval[md][l][j]) begin
              automatic int c = tcol[md][l][j], p = (r + toff[md][l][j]) % z;
              automatic int nv = sat(q[j] + (s ? -rn : rn));
              if ((nv < 0) != (rl[c][p] < 0)) same = 0;
              rl[c][p] = nv;
            end
          end
        end
        et = same ? et + 1 : 0;
        if (et == mm) begin
          ref_iters = it + 1; ref_early = 1;
          return;
        end
      end
    end
  endtask

  // ---------------- event counters ----------------
  int n_hz = 0, n_bk = 0, n_ex = 0, n_ov = 0, n_pad = 0, n_bp = 0, n_gated = 0;
  int n_early = 0, n_maxit = 0, n_switch = 0;
  int dec_cycles = 0;
  always @(posedge clk) begin
    if (st_hz) n_hz++;
    if (st_bk) n_bk++;
    if (st_ex) n_ex++;
    if (st_ov) n_ov++;
    if (dut.a1_valid && dut.a1_pad) n_pad++;
    if (out_valid && !out_ready) n_bp++;
    if (dut.u_ctrl.st == 2'd2) dec_cycles++;
  end

  // ---------------- one codeword ----------------
  int last_mode = -1;
  task automatic run_codeword(input int md, input int maxit, input real mu, input real sigma);
    mode_info_t mi = mode_info(3'(md));
    int z = int'(mi.z), mm = int'(mi.m), kb = NB - int'(mi.m);
    int ncol = 0, bit_err = 0, ch_err = 0, got_iters, got_early, dc;
    int emin, emax;
    bit done_seen = 0;
    dc = tdeg[md];
    if (z < int'(ZMAX)) n_gated++;
    if (last_mode >= 0 && last_mode != md) n_switch++;
    last_mode = md;
    for (int c = 0; c < NB; c++)
      for (int r = 0; r < z; r++) begin
        automatic real g = 0.0;
        for (int k = 0; k < 4; k++) g += $urandom_range(9999, 0) / 10000.0;
        g = (g - 2.0) * 1.7320508;
        ch[c][r] = sat(int'(8.0 * (mu + sigma * g)));
        if (ch[c][r] < 0) ch_err++;
      end
    reference(md, maxit);
    dec_cycles = 0;
    // send 24 columns
    @(negedge clk);
    mode_in = 3'(md); max_iter_in = 5'(maxit);
    for (int c = 0; c < NB; c++) begin
      for (int r = 0; r < int'(ZMAX); r++) in_llr[r] = (r < z) ? 6'(ch[c][r]) : 6'($urandom);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    // collect the output with random back-pressure
    while (!done_seen) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(int'(out_col) == ncol, $sformatf("output column order %0d vs %0d", out_col, ncol));
        for (int r = 0; r < z; r++) begin
          automatic bit exp = rl[ncol][r] < 0;
          if (out_bits[r] != exp) bit_err++;
        end
        check(bit_err == 0, $sformatf("mode %0d column %0d bits differ from reference", md, ncol));
        ncol++;
      end
      if (dec_done) begin
        done_seen = 1;
        got_iters = int'(dec_iters); got_early = int'(dec_early);
      end
    end
    out_ready = 0;
    check(ncol == kb, $sformatf("mode %0d: %0d output columns, expected %0d", md, ncol, kb));
    check(got_iters == ref_iters, $sformatf("mode %0d: iterations %0d, reference %0d", md, got_iters, ref_iters));
    check(got_early == int'(ref_early), $sformatf("mode %0d: early flag %0d, reference %0d", md, got_early, ref_early));
    // decoding time: at least one entry per cycle, at most serial phases
    emin = ref_iters * mm * dc;
    emax = ref_iters * mm * (2 * dc + 4) + 8;
    check(dec_cycles >= emin && dec_cycles <= emax,
          $sformatf("mode %0d: %0d decode cycles outside %0d..%0d", md, dec_cycles, emin, emax));
    if (ref_early) n_early++; else n_maxit++;
    bit_err = 0;
    for (int c = 0; c < kb; c++) for (int r = 0; r < z; r++) if (rl[c][r] < 0) bit_err++;
    $display("mode %0d Z=%0d M=%0d dc=%0d: channel errors %0d, info errors after decoding %0d, iterations %0d%s, %0d decode cycles (%0d entries)",
             md, z, mm, dc, ch_err, bit_err, ref_iters, ref_early ? " (early stop)" : "", dec_cycles, ref_iters * mm * dc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    make_code(4, 20, 0);  load_code(4);
    make_code(1, 8, 15);  load_code(1);
    make_code(2, 12, 10); load_code(2);
    make_code(0, 7, 10);  load_code(0);
    make_code(3, 14, 10); load_code(3);
    make_code(5, 20, 5);  load_code(5);
    run_codeword(4, 10, 1.0, 0.05);   // clean channel: early termination
    run_codeword(1, 3, 0.6, 0.6);     // noisy, full width, stops at max_iter
    run_codeword(2, 10, 0.9, 0.45);
    run_codeword(1, 10, 0.9, 0.35);
    run_codeword(0, 10, 0.8, 0.4);
    run_codeword(3, 10, 0.9, 0.35);
    run_codeword(5, 10, 1.0, 0.5);
    run_codeword(4, 10, 1.0, 0.45);
    check(n_early > 0, "early termination never happened");
    check(n_maxit > 0, "max-iteration stop never happened");
    check(n_hz > 0, "hazard stall never happened");
    check(n_bk > 0, "bank stall never happened");
    check(n_ex > 0, "EX-port stall never happened");
    check(n_ov > 0, "overlapped read and write-back never happened");
    check(n_pad > 0, "padded entry never processed");
    check(n_gated > 0, "no codeword with disabled lanes");
    check(n_switch > 0, "no mode switch");
    check(n_bp > 0, "output back-pressure never happened");
    $display("events: early=%0d maxit=%0d hazard=%0d bank=%0d ex=%0d overlap=%0d pad=%0d gated=%0d switch=%0d backpressure=%0d",
             n_early, n_maxit, n_hz, n_bk, n_ex, n_ov, n_pad, n_gated, n_switch, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
