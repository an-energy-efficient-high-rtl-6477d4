// tb_pu_array: a reduced row of 12 processing units with z = 7 active
// lanes. Random layers are run through phase A and B; active lanes are
// compared with a min-sum model, disabled lanes must output +31 and keep
// their state when z is raised again.
module tb_pu_array;
  import ldpc_pkg::*;
  localparam int L = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [ZW-1:0] z = 9'd7;
  logic a_valid = 0, a_first = 0, a_bank = 0, a_pad = 0, a_zero = 1;
  logic [ENTW-1:0] a_entry = '0, b_entry = '0;
  logic signed [QW-1:0] a_llr [L], b_llr [L];
  ex_rec_t ex_in [L], ex_out [L];
  logic fin = 0, fin_bank = 0, b_bank = 0, ex_bank = 0;
  int checks = 0, failures = 0;
  int qv [L][DMAX];
  int exp_llr [L][DMAX];
  pu_array #(.LANES(L)) dut (.*);

  function automatic int sat(input int v);
    return v > 31 ? 31 : (v < -31 ? -31 : v);
  endfunction

  initial begin
    for (int i = 0; i < L; i++) ex_in[i] = '0;
    for (int layer = 0; layer < 100; layer++) begin
      automatic int dc = $urandom_range(DMAX, 2);
      automatic int bank = layer % 2;
      z = (layer == 99) ? 9'(L) : 9'd7;
      for (int j = 0; j < dc; j++) begin
        @(negedge clk);
        a_valid = 1; a_first = (j == 0); a_entry = 5'(j); a_bank = bank[0];
        for (int i = 0; i < L; i++) begin
          qv[i][j] = $urandom_range(62, 0) - 31;
          a_llr[i] = 6'(qv[i][j]);
        end
      end
      @(negedge clk);
      a_valid = 0; fin = 1; fin_bank = bank[0];
      @(negedge clk);
      fin = 0;
      for (int i = 0; i < L; i++) begin
        automatic int mn = 99, sb = 99, ix = 0; automatic bit sg = 0;
        for (int j = 0; j < dc; j++) begin
          automatic int mg = qv[i][j] < 0 ? -qv[i][j] : qv[i][j];
          if (mg < mn) begin sb = mn; mn = mg; ix = j; end else if (mg < sb) sb = mg;
          sg ^= qv[i][j] < 0;
        end
        for (int j = 0; j < dc; j++) begin
          automatic int rn = (j == ix) ? sb - sb / 4 : mn - mn / 4;
          exp_llr[i][j] = sat(qv[i][j] + (((qv[i][j] < 0) ^ sg) ? -rn : rn));
        end
      end
      for (int j = 0; j < dc; j++) begin
        b_bank = bank[0]; b_entry = 5'(j);
        #1;
        for (int i = 0; i < L; i++) begin
          checks++;
          if (i < int'(z) && int'(b_llr[i]) != exp_llr[i][j]) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d entry %0d: %0d exp %0d", i, j, b_llr[i], exp_llr[i][j]);
          end
          if (i >= int'(z) && b_llr[i] != QMAX) begin
            failures++;
            $display("FAIL disabled lane %0d not +31", i);
          end
        end
      end
    end
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
