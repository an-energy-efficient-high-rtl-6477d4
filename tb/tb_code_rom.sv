// tb_code_rom: writes random tables for every mode through the
// configuration port and reads them back through both lookup ports.
module tb_code_rom;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic cfg_we_entry = 0, cfg_we_deg = 0, cfg_valid = 0;
  logic [MODEW-1:0] cfg_mode = '0, mode = '0;
  logic [LAYW-1:0] cfg_layer = '0, a_layer = '0, b_layer = '0;
  logic [ENTW-1:0] cfg_entry = '0, a_entry = '0, b_entry = '0;
  logic [COLW-1:0] cfg_col = '0, a_col, b_col;
  logic [ZW-1:0] cfg_off = '0, a_off, b_off;
  logic a_valid, b_valid;
  logic [ENTW:0] deg;
  int tv [NMODE][MMAX][DMAX], tc [NMODE][MMAX][DMAX], to [NMODE][MMAX][DMAX], td [NMODE];
  int checks = 0, failures = 0;
  code_rom dut (.*);
  initial begin
    for (int md = 0; md < NMODE; md++) begin
      for (int l = 0; l < MMAX; l++) for (int j = 0; j < DMAX; j++) begin
        @(negedge clk);
        tv[md][l][j] = $urandom_range(1, 0); tc[md][l][j] = $urandom_range(NB - 1, 0);
        to[md][l][j] = $urandom_range(359, 0);
        cfg_we_entry = 1; cfg_mode = 3'(md); cfg_layer = 4'(l); cfg_entry = 5'(j);
        cfg_valid = tv[md][l][j][0]; cfg_col = 5'(tc[md][l][j]); cfg_off = 9'(to[md][l][j]);
      end
      @(negedge clk);
      cfg_we_entry = 0; cfg_we_deg = 1; td[md] = $urandom_range(DMAX, 1); cfg_off = 9'(td[md]);
      @(negedge clk);
      cfg_we_deg = 0;
    end
    for (int t = 0; t < 3000; t++) begin
      automatic int md = $urandom_range(NMODE - 1, 0);
      automatic int la = $urandom_range(MMAX - 1, 0), ea = $urandom_range(DMAX - 1, 0);
      automatic int lb = $urandom_range(MMAX - 1, 0), eb = $urandom_range(DMAX - 1, 0);
      mode = 3'(md); a_layer = 4'(la); a_entry = 5'(ea); b_layer = 4'(lb); b_entry = 5'(eb);
      #1;
      checks++;
      if (int'(a_valid) != tv[md][la][ea] || int'(a_col) != tc[md][la][ea] || int'(a_off) != to[md][la][ea] ||
          int'(b_valid) != tv[md][lb][eb] || int'(b_col) != tc[md][lb][eb] || int'(b_off) != to[md][lb][eb] ||
          int'(deg) != td[md]) begin
        failures++;
        if (failures < 10) $display("FAIL mode %0d a(%0d,%0d) b(%0d,%0d)", md, la, ea, lb, eb);
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
