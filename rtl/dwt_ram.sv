// dwt_ram -- the (N/2 x N/2) coefficient memory of the single transform
// module, holding the LL band between decomposition (or reconstruction)
// levels.
//
// Organised as two banks, even columns and odd columns, of N/2 rows x N/4
// words each, so that one read returns the horizontal pair (2p, 2p+1) that
// the row filters consume per clock. Word address = row * (N/4) + p. The
// write port has one enable per bank: the analysis side writes one LL
// coefficient at a time (bank = column parity), the synthesis side writes a
// reconstructed pair to both banks at once.
//
// Timing: synchronous write; registered read, data valid the clock after
// re. A read and a write of the same word in one clock return the old data.
// Total capacity N*N/4 words of DATA_W bits, as the architecture specifies;
// the banking is this design's choice.
module dwt_ram
  import dwt_pkg::*;
#(
  parameter int N = 8
) (
  input  logic                       clk,
  input  logic [1:0]                 we,     // [0] even bank, [1] odd bank
  input  logic [$clog2(N*N/8)-1:0]   waddr,
  input  pair_t                      wdata,
  input  logic                       re,
  input  logic [$clog2(N*N/8)-1:0]   raddr,
  output pair_t                      rdata
);

  localparam int DEPTH = N * N / 8;

  sample_t bank_e [DEPTH];
  sample_t bank_o [DEPTH];

  always_ff @(posedge clk) begin
    if (we[0]) bank_e[waddr] <= wdata.e;
    if (we[1]) bank_o[waddr] <= wdata.o;
    if (re) begin
      rdata.e <= bank_e[raddr];
      rdata.o <= bank_o[raddr];
    end
  end

endmodule
