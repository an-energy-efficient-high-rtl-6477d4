// tb_pu: one processing unit driven through random layers. For each layer
// a random compressed record and random LLRs are given in phase A (with
// random padded entries and stall cycles), then the layer is finalised and
// every entry's updated LLR (phase B) and the new compressed record are
// compared with a model of layered normalised min-sum. Layers alternate
// banks and the next layer's phase A runs while the previous layer's
// phase B outputs are checked.
module tb_pu;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 1, a_valid = 0, a_first = 0, a_bank = 0, a_pad = 0, a_zero = 0;
  logic [ENTW-1:0] a_entry = '0, b_entry = '0;
  logic signed [QW-1:0] a_llr = '0, b_llr;
  ex_rec_t ex_in, ex_out;
  logic fin = 0, fin_bank = 0, b_bank = 0, ex_bank = 0;
  int checks = 0, failures = 0;
  pu dut (.*);

  function automatic int sat(input int v);
    return v > 31 ? 31 : (v < -31 ? -31 : v);
  endfunction

  // model results per bank
  int exp_llr [2][DMAX];
  int exp_min [2], exp_sub [2], exp_idx [2], exp_dc [2];
  bit exp_sg [2][DMAX];
  bit exp_pad [2][DMAX];

  task automatic phase_a(input int bank);
    int dc = $urandom_range(DMAX, 2);
    int q [DMAX];
    int mn = 0, sb = 0, ix = 0; automatic bit sg = 0;
    bit zero = $urandom_range(3, 0) == 0;
    ex_rec_t rec = ex_rec_t'({$urandom, $urandom});
    rec.idx = 5'($urandom_range(dc - 1, 0));
    for (int j = 0; j < dc; j++) begin
      automatic int l = $urandom_range(62, 0) - 31;
      automatic int ro = zero ? 0 : ((j == rec.idx) ? int'(rec.sub) : int'(rec.min));
      automatic bit pad = ($urandom_range(7, 0) == 0) && j > 0;
      int mg;
      if (!zero && rec.signs[j]) ro = -ro;
      q[j] = pad ? 31 : sat(l - ro);
      mg = q[j] < 0 ? -q[j] : q[j];
      if (j == 0) begin mn = mg; sb = 31; ix = 0; sg = q[j] < 0; end
      else begin
        if (mg < mn) begin sb = mn; mn = mg; ix = j; end else if (mg < sb) sb = mg;
        sg ^= (q[j] < 0);
      end
      exp_pad[bank][j] = pad;
      @(negedge clk);
      a_valid = 1; a_first = (j == 0); a_entry = 5'(j); a_bank = bank[0]; a_pad = pad;
      a_zero = zero; a_llr = 6'(l); ex_in = (j == 0) ? rec : ex_rec_t'({$urandom, $urandom});
      if ($urandom_range(5, 0) == 0) begin @(negedge clk); a_valid = 0; end
    end
    @(negedge clk);
    a_valid = 0;
    fin = 1; fin_bank = bank[0];
    exp_min[bank] = mn - mn / 4; exp_sub[bank] = sb - sb / 4; exp_idx[bank] = ix; exp_dc[bank] = dc;
    for (int j = 0; j < dc; j++) begin
      automatic int rn = (j == ix) ? exp_sub[bank] : exp_min[bank];
      automatic bit s = (q[j] < 0) ^ sg;
      exp_sg[bank][j] = s;
      exp_llr[bank][j] = sat(q[j] + (s ? -rn : rn));
    end
    @(negedge clk);
    fin = 0;
  endtask

  task automatic phase_b(input int bank);
    ex_bank = bank[0];
    for (int j = 0; j < exp_dc[bank]; j++) begin
      b_bank = bank[0]; b_entry = 5'(j);
      #1;
      if (!exp_pad[bank][j]) begin
        checks++;
        if (int'(b_llr) != exp_llr[bank][j]) begin
          failures++;
          $display("FAIL bank %0d entry %0d: llr %0d exp %0d", bank, j, b_llr, exp_llr[bank][j]);
        end
        checks++;
        if (ex_out.signs[j] != exp_sg[bank][j]) failures++;
      end
    end
    checks++;
    if (int'(ex_out.min) != exp_min[bank] || int'(ex_out.sub) != exp_sub[bank] ||
        int'(ex_out.idx) != exp_idx[bank]) begin
      failures++;
      $display("FAIL record: %0d %0d %0d exp %0d %0d %0d", ex_out.min, ex_out.sub, ex_out.idx,
               exp_min[bank], exp_sub[bank], exp_idx[bank]);
    end
  endtask

  initial begin
    phase_a(0);
    for (int layer = 1; layer < 200; layer++) begin
      fork
        phase_a(layer % 2);
        phase_b((layer - 1) % 2);
      join
    end
    phase_b(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
