// tb_output_module: a memory model answers the module's reads one cycle
// later; with random back-pressure every column 0..kb-1 must come out once,
// in order, with the sign bits of the stored LLRs (0 in lanes >= z), and
// done must pulse with the last one.
module tb_output_module;
  import ldpc_pkg::*;
  localparam int L = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, rd_en, out_valid, out_ready = 0, done;
  logic [COLW-1:0] kb = 5'd12, rd_addr, out_col;
  logic [ZW-1:0] z = 9'd17;
  logic signed [QW-1:0] rd_data [L];
  logic [L-1:0] out_bits;
  int mem [NB][L];
  int checks = 0, failures = 0;
  output_module #(.LANES(L)) dut (.*);
  always_ff @(posedge clk) if (rd_en) for (int i = 0; i < L; i++) rd_data[i] <= 6'(mem[rd_addr][i]);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cw = 0; cw < 10; cw++) begin
      automatic int col = 0; automatic bit fin = 0;
      kb = 5'($urandom_range(20, 1)); z = 9'($urandom_range(L, 1));
      for (int c = 0; c < NB; c++) for (int i = 0; i < L; i++) mem[c][i] = $urandom_range(62, 0) - 31;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!fin) begin
        out_ready = $urandom_range(2, 0) != 0;
        #1;
        if (out_valid && out_ready) begin
          checks++;
          if (int'(out_col) != col) begin failures++; $display("FAIL column %0d vs %0d", out_col, col); end
          for (int i = 0; i < L; i++) begin
            checks++;
            if (out_bits[i] != ((i < int'(z)) && mem[col][i] < 0)) failures++;
          end
          checks++;
          if (done != (col == int'(kb) - 1)) begin failures++; $display("FAIL done"); end
          if (done) fin = 1;
          col++;
        end
        @(negedge clk);
      end
      out_ready = 0;
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
