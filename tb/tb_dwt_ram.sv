// tb_dwt_ram -- checks the banked LL memory: per-bank write enables, the
// one-clock registered read, and read-old-data when a word is written and
// read in the same clock, against a behavioural array.
module tb_dwt_ram;
  import dwt_pkg::*;

  localparam int N = 8;
  localparam int D = N * N / 8;
  localparam int AW = $clog2(D);

  logic clk = 1'b0;
  logic [1:0] we = '0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  pair_t wdata = '0, rdata;
  logic re = 1'b0;
  int checks = 0, failures = 0;
  sample_t mem_e [D], mem_o [D];
  pair_t expected;
  logic exp_valid = 1'b0;

  always #5 clk = ~clk;

  dwt_ram #(.N(N)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill both banks
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 2'b11; waddr = AW'(a);
      wdata = '{e: sample_t'($urandom), o: sample_t'($urandom)};
      mem_e[a] = wdata.e; mem_o[a] = wdata.o;
    end
    @(negedge clk) we = '0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (rdata != expected) begin
          failures++;
          $display("FAIL: read got %h exp %h", rdata, expected);
        end
      end
      re    = ($urandom_range(0, 3) != 0);
      raddr = AW'($urandom_range(0, D - 1));
      we    = 2'($urandom);
      waddr = (t % 5 == 0) ? raddr : AW'($urandom_range(0, D - 1));
      wdata = '{e: sample_t'($urandom), o: sample_t'($urandom)};
      if (re) expected = '{e: mem_e[raddr], o: mem_o[raddr]};
      exp_valid = re;
      if (we[0]) mem_e[waddr] = wdata.e;
      if (we[1]) mem_o[waddr] = wdata.o;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
