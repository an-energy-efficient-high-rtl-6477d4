// tb_llr_mem: random simultaneous reads and writes of the banked two-port
// LLR memory at a reduced lane count, checked against a shadow array;
// checks the one-cycle read latency and read-old-data on a same-address
// collision.
module tb_llr_mem;
  import ldpc_pkg::*;
  localparam int L = 50;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [COLW-1:0] wr_addr = '0, rd_addr = '0;
  logic signed [QW-1:0] wr_data [L], rd_data [L];
  int shadow [NB][L];
  int expv [L];
  bit pend = 0;
  int checks = 0, failures = 0;
  llr_mem #(.LANES(L)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);
  initial begin
    for (int c = 0; c < NB; c++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(c);
      for (int i = 0; i < L; i++) begin wr_data[i] = 6'($urandom); shadow[c][i] = int'(wr_data[i]); end
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (pend) begin
        for (int i = 0; i < L; i++) begin
          checks++;
          if (int'(rd_data[i]) != expv[i]) failures++;
        end
      end
      rd_en = $urandom_range(1, 0); rd_addr = 5'($urandom_range(NB - 1, 0));
      wr_en = $urandom_range(1, 0);
      wr_addr = (t % 4 == 0) ? rd_addr : 5'($urandom_range(NB - 1, 0));
      for (int i = 0; i < L; i++) wr_data[i] = 6'($urandom);
      pend = rd_en;
      if (rd_en) for (int i = 0; i < L; i++) expv[i] = shadow[rd_addr][i];
      if (wr_en) for (int i = 0; i < L; i++) shadow[wr_addr][i] = int'(wr_data[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
