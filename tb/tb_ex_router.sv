// tb_ex_router: random compressed records, limited to the field widths of
// each code class, are packed here bit by bit at the class's stride
// (21, 28 or 35 bits per lane) and compared with the EX router at full size.
module tb_ex_router;
  import ldpc_pkg::*;
  localparam int L = ZMAX;
  logic [1:0] cls;
  logic [EXWORD-1:0] word, expw;
  ex_rec_t rec [L], recx [L];
  int checks = 0, failures = 0;
  ex_router dut (.cls, .word(expw), .rec);
  initial begin
    for (int t = 0; t < 30; t++) begin
      automatic int c = t % 3;
      automatic int iw = (c == 0) ? 3 : ((c == 1) ? 4 : 5);
      automatic int sw = (c == 0) ? 8 : ((c == 1) ? 14 : 20);
      automatic int w = 10 + iw + sw;
      automatic int nl = 7680 / w;
      cls = 2'(c);
      expw = '0;
      for (int i = 0; i < L; i++) begin
        recx[i] = ex_rec_t'({$urandom, $urandom});
        recx[i].idx = 5'($urandom_range((1 << iw) - 1, 0));
        for (int k = sw; k < DMAX; k++) recx[i].signs[k] = 1'b0;
        if (i >= nl) recx[i] = '0;
        else begin
          for (int k = 0; k < 5; k++) expw[i*w + k] = recx[i].min[k];
          for (int k = 0; k < 5; k++) expw[i*w + 5 + k] = recx[i].sub[k];
          for (int k = 0; k < iw; k++) expw[i*w + 10 + k] = recx[i].idx[k];
          for (int k = 0; k < sw; k++) expw[i*w + 10 + iw + k] = recx[i].signs[k];
        end
      end
      #1;
      for (int i = 0; i < L; i++) begin
        checks++;
        if (rec[i] != recx[i]) begin
          failures++;
          if (failures < 5) $display("FAIL class %0d lane %0d", c, i);
        end
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
