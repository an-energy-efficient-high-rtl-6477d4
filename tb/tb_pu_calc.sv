// tb_pu_calc: feeds random layers of magnitudes and signs to the calculate
// unit, back to back, and compares min, second min (both scaled by 0.75,
// rounded as m - floor(m/4)), min index and sign product with a model.
module tb_pu_calc;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 1, in_valid = 0, in_first = 0, in_sign = 0;
  logic [ENTW-1:0] in_entry = '0;
  logic [MAGW-1:0] in_mag = '0, min_s, sub_s;
  logic [ENTW-1:0] idx;
  logic sgn;
  int checks = 0, failures = 0;
  pu_calc dut (.clk, .en, .in_valid, .in_first, .in_entry, .in_mag, .in_sign,
               .min_s, .sub_s, .idx, .sgn);
  initial begin
    for (int layer = 0; layer < 300; layer++) begin
      automatic int d = $urandom_range(DMAX, 2);
      automatic int mn = 99, sb = 99, ix = 0; automatic bit sg = 0;
      for (int j = 0; j < d; j++) begin
        automatic int mg = $urandom_range(31, 0);
        automatic bit s = $urandom_range(1, 0);
        @(negedge clk);
        in_valid = 1; in_first = (j == 0); in_entry = 5'(j); in_mag = 5'(mg); in_sign = s;
        if (mg < mn) begin sb = mn; mn = mg; ix = j; end
        else if (mg < sb) sb = mg;
        sg ^= s;
        // a stall cycle now and then
        if ($urandom_range(4, 0) == 0) begin @(negedge clk); in_valid = 0; end
      end
      if (sb == 99) sb = 31;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (int'(min_s) != mn - mn / 4 || int'(sub_s) != sb - sb / 4 || int'(idx) != ix || sgn != sg) begin
        failures++;
        $display("FAIL layer %0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d", layer,
                 min_s, sub_s, idx, sgn, mn - mn / 4, sb - sb / 4, ix, sg);
      end
    end
    // disabled unit holds its state
    begin
      logic [MAGW-1:0] keep;
      keep = min_s;
      @(negedge clk);
      en = 0; in_valid = 1; in_first = 1; in_mag = keep + 5'd1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (min_s != keep) begin failures++; $display("FAIL: disabled unit changed"); end
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
