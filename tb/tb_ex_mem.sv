// tb_ex_mem: random reads and writes of the single-port EX memory (reduced
// to 3 banks) against a shadow array; a write cycle performs no read and
// read data appear one cycle after the read.
module tb_ex_mem;
  import ldpc_pkg::*;
  localparam int NBK = 3, W = NBK * 120;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [LAYW-1:0] addr = '0;
  logic [W-1:0] wdata, rdata, expv;
  logic [W-1:0] shadow [MMAX];
  bit pend = 0;
  int checks = 0, failures = 0;
  ex_mem #(.NBANK(NBK)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int k = 0; k < W; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction
  initial begin
    for (int a = 0; a < MMAX; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 4'(a); wdata = rnd(); shadow[a] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata != expv) failures++;
      end
      en = $urandom_range(3, 0) != 0; we = $urandom_range(1, 0);
      addr = 4'($urandom_range(MMAX - 1, 0)); wdata = rnd();
      pend = en && !we;
      if (pend) expv = shadow[addr];
      if (en && we) shadow[addr] = wdata;
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
