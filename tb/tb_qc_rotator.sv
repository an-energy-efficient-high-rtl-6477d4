// tb_qc_rotator: random forward and inverse cyclic shifts for random z,
// checked lane by lane against out[i] = in[(i+s) mod z], plus forward then
// inverse giving back the input.
module tb_qc_rotator;
  import ldpc_pkg::*;
  localparam int L = 40;
  logic [ZW-1:0] z, s;
  logic inverse;
  logic signed [QW-1:0] din [L], dout [L], back [L];
  int checks = 0, failures = 0;
  qc_rotator #(.LANES(L)) fwd (.z, .s, .inverse, .din, .dout);
  qc_rotator #(.LANES(L)) inv (.z, .s, .inverse(1'b1), .din(dout), .dout(back));
  initial begin
    for (int t = 0; t < 1500; t++) begin
      automatic int zi = (t % 5 == 0) ? L : $urandom_range(L, 1);
      automatic int si = (t % 7 == 0) ? 0 : $urandom_range(zi - 1, 0);
      z = 9'(zi); s = 9'(si); inverse = (t % 2);
      for (int i = 0; i < L; i++) din[i] = 6'($urandom_range(62, 0) - 31);
      #1;
      for (int i = 0; i < L; i++) begin
        int e;
        if (i >= zi) e = 31;
        else if (!inverse) e = din[(i + si) % zi];
        else e = din[(i - si + zi) % zi];
        checks++;
        if (int'(dout[i]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL z=%0d s=%0d inv=%0d lane %0d: %0d vs %0d", zi, si, inverse, i, dout[i], e);
        end
        if (!inverse && i < zi) begin
          checks++;
          if (back[i] != din[i]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
