// tb_input_module: pushes codewords of random LLRs (including -32) with
// random gaps; checks column addresses 0..23, clipping to -31, +31 in lanes
// at or above z, the done pulse on the 24th column and ready = enable.
module tb_input_module;
  import ldpc_pkg::*;
  localparam int L = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 0, in_valid = 0, in_ready, wr_en, done;
  logic [ZW-1:0] z = 9'd15;
  logic signed [QW-1:0] in_llr [L], wr_data [L];
  logic [COLW-1:0] wr_addr;
  int checks = 0, failures = 0;
  input_module #(.LANES(L)) dut (.*);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cw = 0; cw < 20; cw++) begin
      z = 9'($urandom_range(L, 1));
      enable = 1;
      for (int c = 0; c < NB; c++) begin
        while ($urandom_range(2, 0) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        for (int i = 0; i < L; i++) in_llr[i] = 6'($urandom);
        #1;
        checks++;
        if (!(in_ready && wr_en && int'(wr_addr) == c && done == (c == NB - 1))) begin
          failures++; $display("FAIL control at column %0d", c);
        end
        for (int i = 0; i < L; i++) begin
          automatic int e = (i >= int'(z)) ? 31 : ((in_llr[i] == -6'sd32) ? -31 : int'(in_llr[i]));
          checks++;
          if (int'(wr_data[i]) != e) begin failures++; $display("FAIL lane %0d", i); end
        end
        @(negedge clk);
      end
      in_valid = 0; enable = 0;
      #1;
      checks++;
      if (in_ready || wr_en) begin failures++; $display("FAIL: accepts while disabled"); end
      @(negedge clk);
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
