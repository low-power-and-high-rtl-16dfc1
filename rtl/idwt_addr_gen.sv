// idwt_addr_gen -- sequencer of the 2-D IDWT single transform module.
//
// Walks the J synthesis steps from the coarsest level down. Step s (1..J)
// rebuilds an image of size 2M x 2M, M = N / 2^(J-s+1), from four M x M
// subbands. Per step it issues, one per clock:
//   coefficient row 0:        M COEF commands (buffered, no output yet)
//   coefficient rows 1..M-1:  M COEF commands, then M ODD commands
//   wrap-around:              M FLE commands, then M FLO commands
//   drain:                    DRAIN idle clocks, so the step's last results
//                             are in the RAM before the next step reads them
// Each COEF command requests LH, HL, HH of (q, c) from the external
// coefficient source, and the LL coefficient from the same source in step 1
// or from the internal RAM afterwards (rd_ll_ram, rd_ll_addr).
//
// RAM layout: the LL image of a step with output size S is written at row
// offset 0 if S = N/2 and at row offset S otherwise; a step reads its input
// where the previous step wrote it. With these offsets no write lands on a
// row that is still to be read. The final step's output leaves the module.
//
// Clocks per step: 2M^2 + M + DRAIN; the 2M^2 of them that deliver output
// give the (2/3)(1 - 4^-J) N^2 total of the architecture (42 for N = 8).
//
// The step order and the clock budget follow the published architecture;
// the command schedule, the RAM offsets and DRAIN are this design's choices.
module idwt_addr_gen
  import dwt_pkg::*;
#(
  parameter int N     = 8,
  parameter int J     = 3,
  parameter int DRAIN = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   busy,
  output logic   done,
  // command to the transform module (before the one-clock read latency)
  output logic   cmd_valid,
  output vcmd_e  cmd_op,
  output idx_t   cmd_q,
  output idx_t   cmd_c,
  output logic   cmd_last_col,
  // coefficient reads
  output logic   rd_coef,       // external LH/HL/HH (and LL in step 1)
  output level_t rd_level,      // decomposition level of the subbands read
  output logic   rd_ll_ram,     // LL from the internal RAM
  output idx_t   rd_ll_addr,    // RAM word address of the LL coefficient
  // where the current step's output goes
  output logic   last_step,
  output idx_t   out_row_off
);

  typedef enum logic [2:0] {S_IDLE, S_COEF, S_ODD, S_FLE, S_FLO, S_DRAIN} state_e;
  state_e state_q;
  level_t step_q;            // 1..J
  idx_t   q_q, c_q, cnt_q;
  idx_t   m, in_off;
  logic   last_c;

  localparam int WPR = N / 4;   // RAM words per row

  always_comb begin
    m            = idx_t'(N) >> (level_t'(J) - step_q + 1'b1);
    in_off       = (m == idx_t'(N / 2)) ? '0 : m;
    out_row_off  = ((m << 1) == idx_t'(N / 2)) ? '0 : (m << 1);
    last_step    = (step_q == level_t'(J));
    last_c       = (c_q == m - 1'b1);
    busy         = (state_q != S_IDLE);
    cmd_valid    = (state_q inside {S_COEF, S_ODD, S_FLE, S_FLO});
    cmd_q        = q_q;
    cmd_c        = c_q;
    cmd_last_col = last_c;
    unique case (state_q)
      S_ODD:   cmd_op = OP_ODD;
      S_FLE:   cmd_op = OP_FLE;
      S_FLO:   cmd_op = OP_FLO;
      default: cmd_op = OP_COEF;
    endcase
    rd_coef    = (state_q == S_COEF);
    rd_level   = level_t'(J) - step_q + 1'b1;
    rd_ll_ram  = rd_coef && step_q != level_t'(1);
    rd_ll_addr = (in_off + q_q) * idx_t'(WPR) + (c_q >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      step_q  <= level_t'(1);
      q_q     <= '0;
      c_q     <= '0;
      cnt_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cmd_valid) c_q <= last_c ? '0 : c_q + 1'b1;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_COEF;
          step_q  <= level_t'(1);
          q_q     <= '0;
          c_q     <= '0;
        end
        S_COEF: if (last_c) begin
          if (q_q != '0)                 state_q <= S_ODD;
          else if (m == idx_t'(1))       state_q <= S_FLE;
          else                           q_q     <= idx_t'(1);
        end
        S_ODD: if (last_c) begin
          if (q_q == m - 1'b1) begin
            state_q <= S_FLE;
            q_q     <= '0;
          end else begin
            q_q     <= q_q + 1'b1;
            state_q <= S_COEF;
          end
        end
        S_FLE: if (last_c) begin
          state_q <= S_FLO;
          q_q     <= '0;
        end
        S_FLO: if (last_c) begin
          state_q <= S_DRAIN;
          cnt_q   <= '0;
        end
        S_DRAIN: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == idx_t'(DRAIN - 1)) begin
            q_q <= '0;
            if (last_step) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end else begin
              step_q  <= step_q + 1'b1;
              state_q <= S_COEF;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
