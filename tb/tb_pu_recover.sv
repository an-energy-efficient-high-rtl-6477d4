// tb_pu_recover: exhaustive-ish random test of the recover unit against a
// direct expansion of the compressed record.
module tb_pu_recover;
  import ldpc_pkg::*;
  ex_rec_t rec;
  logic [ENTW-1:0] entry;
  logic zero;
  logic signed [QW-1:0] r;
  int checks = 0, failures = 0;
  pu_recover dut (.rec, .entry, .zero, .r);
  initial begin
    for (int t = 0; t < 2000; t++) begin
      int mag, expv;
      rec = ex_rec_t'({$urandom, $urandom});
      rec.idx = 5'($urandom_range(DMAX - 1, 0));
      entry = (t % 3 == 0) ? rec.idx : 5'($urandom_range(DMAX - 1, 0));
      zero = ($urandom_range(7, 0) == 0);
      #1;
      mag  = (entry == rec.idx) ? int'(rec.sub) : int'(rec.min);
      expv = zero ? 0 : (rec.signs[entry] ? -mag : mag);
      checks++;
      if (int'(r) != expv) begin
        failures++;
        $display("FAIL entry=%0d idx=%0d got %0d exp %0d", entry, rec.idx, r, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
