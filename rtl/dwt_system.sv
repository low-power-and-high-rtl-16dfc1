// dwt_system -- single transform module for the J-level 2-D DWT of an
// N x N image: address sequencer, source multiplexer, transform module and
// an (N/2 x N/2) LL memory.
//
// One transform module serves all levels. Level 1 streams the image from an
// external frame memory (ext_rd_* request, data the next clock); the LL band
// of each level is written into the internal RAM and read back, through the
// multiplexer, as the input of the next level. LL coefficients of level j
// overwrite LL of level j-1 in place (row m of level j is written only after
// rows up to 2m+3 of level j-1 have been read). The next level's reads
// start right after the last read of a level; the system counts the LL
// rows already written (ll_rows_q) and holds back a read of a row that is
// not yet there (row_ok), so the vertical wrap-around flush of one level
// runs while the next level's first row pair streams in. Every computed coefficient
// quadruple (LL, LH, HL, HH) is also presented on out_*, tagged with level,
// row and column; a coder keeps LH/HL/HH of every level and LL of level J.
//
// Throughput: two input samples per clock. Input clocks per transform are
// (2/3)(1 - 4^-J) N^2 (42 for 8 x 8, J = 3). The flushes overlap the next
// level where its data allow; the small levels still wait for rows that
// were just produced, and the last flush and the pipeline add their
// latency, so an 8 x 8, 3-level transform is busy for 54 clocks.
//
// Interface: start (pulse, when idle), busy, done (pulse). ext_rd_data is
// the pixel pair (x(r,2p), x(r,2p+1)) requested one clock earlier, pixels
// zero-extended to DATA_W bits.
//
// The memory, multiplexer, transform module and address generator are the
// parts of the published single transform module; the in-place LL layout,
// the external read interface and the row-by-row hold-back are this
// design's choices.
module dwt_system
  import dwt_pkg::*;
#(
  parameter int N = 8,  // image width and height
  parameter int J = 3   // decomposition levels
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   busy,
  output logic   done,
  // external frame memory
  output logic   ext_rd_en,
  output idx_t   ext_rd_row,
  output idx_t   ext_rd_col,
  input  pair_t  ext_rd_data,
  // coefficient output
  output logic   out_valid,
  output level_t out_level,
  output idx_t   out_row,
  output idx_t   out_col,
  output quad_t  out_q
);

  localparam int AW  = $clog2(N * N / 8);
  localparam int WPR = N / 4;   // RAM words per row

  logic   rd_valid, rd_last_col, rd_last_row, lvl_done, core_busy, row_ok;
  level_t rd_level;
  idx_t   rd_row, rd_col;

  dwt_addr_gen #(.N(N), .J(J)) u_addr (
    .clk, .rst_n, .start, .lvl_done, .row_ok,
    .rd_valid, .rd_level, .rd_row, .rd_col, .rd_last_col, .rd_last_row,
    .busy, .done);

  // read requests
  logic          ram_re;
  logic [AW-1:0] ram_raddr;
  pair_t         ram_rdata;

  assign ext_rd_en  = rd_valid && (rd_level == level_t'(1));
  assign ext_rd_row = rd_row;
  assign ext_rd_col = rd_col;
  assign ram_re     = rd_valid && (rd_level != level_t'(1));
  assign ram_raddr  = AW'(rd_row * idx_t'(WPR) + rd_col);

  // request tags, aligned with the read data
  logic   d_valid, d_ext, d_last_col, d_last_row;
  idx_t   d_row, d_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid    <= 1'b0;
      d_ext      <= 1'b0;
      d_last_col <= 1'b0;
      d_last_row <= 1'b0;
      d_row      <= '0;
      d_col      <= '0;
    end else begin
      d_valid    <= rd_valid;
      d_ext      <= (rd_level == level_t'(1));
      d_last_col <= rd_last_col;
      d_last_row <= rd_last_row;
      d_row      <= rd_row;
      d_col      <= rd_col;
    end
  end

  // source multiplexer
  pair_t src_pair;
  assign src_pair = d_ext ? ext_rd_data : ram_rdata;

  dwt_core #(.N(N)) u_core (
    .clk, .rst_n,
    .in_valid(d_valid), .in_pair(src_pair), .in_row(d_row), .in_col(d_col),
    .in_last_col(d_last_col), .in_last_row(d_last_row),
    .busy(core_busy),
    .out_valid, .out_row, .out_col, .out_q, .out_done(lvl_done));

  // level of the coefficients leaving the transform module, and the number
  // of complete LL rows of that level already written to the RAM
  level_t out_lvl_q;
  idx_t   ll_rows_q;
  logic   out_row_end;

  assign out_level   = out_lvl_q;
  assign out_row_end = out_valid && (out_col == (idx_t'(N) >> out_lvl_q) - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_lvl_q <= level_t'(1);
      ll_rows_q <= '0;
    end else if (start && !busy) begin
      out_lvl_q <= level_t'(1);
      ll_rows_q <= '0;
    end else if (lvl_done) begin
      if (out_lvl_q != level_t'(J)) out_lvl_q <= out_lvl_q + 1'b1;
      ll_rows_q <= '0;
    end else if (out_row_end) begin
      ll_rows_q <= ll_rows_q + 1'b1;
    end
  end

  // a read of LL row r of level j-1 waits until that row has been written;
  // once level j-1's flush is over, all of its rows are there
  assign row_ok = (rd_level == level_t'(1)) || (out_lvl_q >= rd_level) ||
                  (ll_rows_q > rd_row);

  // LL band back into the RAM for the next level
  logic [1:0]    ram_we;
  logic [AW-1:0] ram_waddr;

  assign ram_we    = (out_valid && out_level != level_t'(J))
                     ? (out_col[0] ? 2'b10 : 2'b01) : 2'b00;
  assign ram_waddr = AW'(out_row * idx_t'(WPR) + (out_col >> 1));

  dwt_ram #(.N(N)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata('{e: out_q.ll, o: out_q.ll}),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata));

  // the last flush is over when the sequencer reports done
  a_done_after_flush : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !core_busy);
  // the sequencer is never more than one level ahead of the outputs
  a_one_level_ahead : assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid |-> (rd_level <= out_lvl_q + 1'b1));

endmodule
