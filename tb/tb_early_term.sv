// tb_early_term: random layers of stored and updated signs, with a chosen
// fraction of layers unchanged, against a model of the et_flag counter:
// +1 per unchanged layer, 0 otherwise, stop when it reaches m. Changes in
// padded entries or in lanes at or above z must be ignored.
module tb_early_term;
  import ldpc_pkg::*;
  localparam int L = 16;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;
  logic [ZW-1:0] z = 9'd12;
  logic [LAYW-1:0] m = 4'd4, et_flag;
  logic a_valid = 0, a_bank = 0, b_valid = 0, b_bank = 0, b_pad = 0, b_last = 0, stop;
  logic [ENTW-1:0] a_entry = '0, b_entry = '0;
  logic [L-1:0] a_sign = '0, b_sign = '0;
  logic [L-1:0] old_s [DMAX];
  int checks = 0, failures = 0, nstop = 0;
  early_term #(.LANES(L)) dut (.*);
  initial begin
    int et = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int layer = 0; layer < 400; layer++) begin
      automatic int dc = $urandom_range(8, 2);
      automatic bit change = ($urandom_range(3, 0) == 0);
      automatic int cj = $urandom_range(dc - 1, 0);
      automatic bit same = 1;
      for (int j = 0; j < dc; j++) begin
        @(negedge clk);
        a_valid = 1; a_bank = layer[0]; a_entry = 5'(j); a_sign = L'($urandom);
        old_s[j] = a_sign;
      end
      @(negedge clk);
      a_valid = 0;
      for (int j = 0; j < dc; j++) begin
        automatic logic [L-1:0] ns = old_s[j];
        automatic bit pad = (j != cj) && ($urandom_range(4, 0) == 0);
        if (pad) ns = ~ns;                          // ignored
        ns[L - 1 - $urandom_range(3, 0)] ^= 1'b1;   // lanes >= z: ignored
        if (change && j == cj) begin ns[$urandom_range(11, 0)] ^= 1'b1; same = 0; end
        b_valid = 1; b_bank = layer[0]; b_entry = 5'(j); b_pad = pad; b_sign = ns;
        b_last = (j == dc - 1);
        #1;
        if (b_last) begin
          et = same ? et + 1 : 0;
          checks++;
          if (stop != (et == int'(m))) begin failures++; $display("FAIL stop at layer %0d", layer); end
          if (stop) nstop++;
        end
        @(negedge clk);
        if (b_last) begin
          checks++;
          if (int'(et_flag) != et) begin failures++; $display("FAIL et_flag %0d exp %0d", et_flag, et); end
          if (et == int'(m)) begin
            clear = 1; et = 0;
            @(negedge clk);
            clear = 0;
          end
        end
      end
      b_valid = 0; b_last = 0; b_pad = 0;
    end
    checks++;
    if (nstop == 0) begin failures++; $display("FAIL: stop never raised"); end
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
