// idwt_system -- single transform module for the J-level 2-D IDWT of an
// N x N image: sequencer, LL source multiplexer, inverse transform module
// and an (N/2 x N/2) LL memory.
//
// Synthesis runs from the coarsest level to the finest. In the first step
// all four subbands come from the external coefficient source (the entropy
// decoder side); in each later step the multiplexer takes the LL band from
// the internal RAM, where the previous step wrote its reconstruction, and
// LH/HL/HH from the external source. The last step's output, the image, is
// presented on pix_* two samples per clock, tagged with row and pair index;
// rows come out in the order 2, 3, ..., N-1, 0, 1 and pair 0 of each row
// after the row's other pairs.
//
// Interface: start (pulse), busy, done (pulse). ext_rd_* requests the
// coefficients of level ext_rd_level at (row, col); ext_rd_data must hold
// them the next clock (its ll field is used in the first step only).
// Timing for N = 8, J = 3: 42 output-producing clocks, 61 clocks busy.
//
// The sequencer, multiplexer, RAM and inverse transform module are the
// parts of the published single transform module; the interfaces, the
// output order and the RAM layout are this design's choices.
module idwt_system
  import dwt_pkg::*;
#(
  parameter int N = 8,
  parameter int J = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   busy,
  output logic   done,
  // external coefficient source
  output logic   ext_rd_en,
  output level_t ext_rd_level,
  output idx_t   ext_rd_row,
  output idx_t   ext_rd_col,
  input  quad_t  ext_rd_data,
  // reconstructed image
  output logic   pix_valid,
  output idx_t   pix_row,
  output idx_t   pix_col,
  output pair_t  pix_pair
);

  localparam int AW  = $clog2(N * N / 8);
  localparam int WPR = N / 4;

  logic   cmd_valid, cmd_last_col, rd_coef, rd_ll_ram, last_step;
  vcmd_e  cmd_op;
  idx_t   cmd_q, cmd_c, rd_ll_addr, out_row_off;
  level_t rd_level;

  idwt_addr_gen #(.N(N), .J(J)) u_seq (
    .clk, .rst_n, .start, .busy, .done,
    .cmd_valid, .cmd_op, .cmd_q, .cmd_c, .cmd_last_col,
    .rd_coef, .rd_level, .rd_ll_ram, .rd_ll_addr,
    .last_step, .out_row_off);

  assign ext_rd_en    = rd_coef;
  assign ext_rd_level = rd_level;
  assign ext_rd_row   = cmd_q;
  assign ext_rd_col   = cmd_c;

  // command aligned with the read data
  logic  d_valid, d_last_col, d_ll_ram;
  vcmd_e d_op;
  idx_t  d_q, d_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid    <= 1'b0;
      d_op       <= OP_COEF;
      d_q        <= '0;
      d_c        <= '0;
      d_last_col <= 1'b0;
      d_ll_ram   <= 1'b0;
    end else begin
      d_valid    <= cmd_valid;
      d_op       <= cmd_op;
      d_q        <= cmd_q;
      d_c        <= cmd_c;
      d_last_col <= cmd_last_col;
      d_ll_ram   <= rd_ll_ram;
    end
  end

  // LL source multiplexer
  pair_t ram_rdata;
  quad_t coef;
  always_comb begin
    coef = ext_rd_data;
    if (d_ll_ram) coef.ll = d_c[0] ? ram_rdata.o : ram_rdata.e;
  end

  logic  o_valid;
  idx_t  o_row, o_col;
  pair_t o_pair;

  idwt_core #(.N(N)) u_core (
    .clk, .rst_n,
    .cmd_valid(d_valid), .cmd_op(d_op), .cmd_q(d_q), .cmd_c(d_c),
    .cmd_last_col(d_last_col), .in_q(coef),
    .out_valid(o_valid), .out_row(o_row), .out_col(o_col), .out_pair(o_pair));

  // intermediate LL images to the RAM, the final image out
  logic [1:0] ram_we;
  assign ram_we = (o_valid && !last_step) ? 2'b11 : 2'b00;

  dwt_ram #(.N(N)) u_ram (
    .clk, .we(ram_we),
    .waddr(AW'((out_row_off + o_row) * idx_t'(WPR) + o_col)), .wdata(o_pair),
    .re(rd_ll_ram), .raddr(AW'(rd_ll_addr)), .rdata(ram_rdata));

  assign pix_valid = o_valid && last_step;
  assign pix_row   = o_row;
  assign pix_col   = o_col;
  assign pix_pair  = o_pair;

endmodule
