// dwt_addr_gen -- address sequencer of the 2-D DWT single transform module.
//
// After start it walks the J decomposition levels. For level j (image size
// S = N / 2^(j-1)) it issues one read per clock, row-major over S rows of
// S/2 horizontal pairs: level 1 reads the input image from the external
// frame memory, later levels read the LL band from the internal RAM. Each
// read carries the tags the transform module needs (row, pair index, last
// pair of row, last row). The next level starts in the clock after the
// last read of a level, but a read of LL row r is held back until row_ok
// says that row is already in the RAM (the system tracks which LL rows are
// complete); the last row of a level always waits for the previous level's
// wrap-around flush. After level J it waits for the transform module's
// done pulse (lvl_done, end of the last flush); done pulses then.
//
// Read clocks: sum over levels of S*S/2 = (2/3)(1 - 4^-J) N^2, i.e. 42 for
// N = 8, J = 3. The read hold-back is this design's addition; it costs
// clocks only at the small levels, where the next level needs rows that
// the previous one has just produced.
module dwt_addr_gen
  import dwt_pkg::*;
#(
  parameter int N = 8,
  parameter int J = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   lvl_done,
  input  logic   row_ok,     // LL row rd_row of level rd_level-1 is in the RAM
  output logic   rd_valid,
  output level_t rd_level,
  output idx_t   rd_row,
  output idx_t   rd_col,
  output logic   rd_last_col,
  output logic   rd_last_row,
  output logic   busy,
  output logic   done
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT} state_e;
  state_e state_q;
  level_t level_q;
  idx_t   row_q, col_q;
  idx_t   size;

  always_comb begin
    size        = idx_t'(N) >> (level_q - 1'b1);
    rd_valid    = (state_q == S_READ) && row_ok;
    rd_level    = level_q;
    rd_row      = row_q;
    rd_col      = col_q;
    rd_last_col = (col_q == (size >> 1) - 1'b1);
    rd_last_row = (row_q == size - 1'b1);
    busy        = (state_q != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      level_q <= level_t'(1);
      row_q   <= '0;
      col_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_READ;
          level_q <= level_t'(1);
          row_q   <= '0;
          col_q   <= '0;
        end
        S_READ: if (row_ok) begin
          if (rd_last_col) begin
            col_q <= '0;
            if (rd_last_row) begin
              row_q <= '0;
              if (level_q == level_t'(J)) state_q <= S_WAIT;
              else level_q <= level_q + 1'b1;
            end else begin
              row_q <= row_q + 1'b1;
            end
          end else begin
            col_q <= col_q + 1'b1;
          end
        end
        S_WAIT: if (lvl_done) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
