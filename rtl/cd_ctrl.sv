// cd_ctrl: SIMD sequencer of the Centralized Diamond matrix-vector multiplier.
//
// The array is SIMD: all PEs of one level do the same thing in the same step.
// The sequencer follows the document's flowchart. On start it places U in the
// leaves (load_u, same cycle). Then, for num_rows steps, it takes one row of A
// per step into the leaves and has them multiply (en_mul, row index on
// row_idx). Each row then climbs one level per step: level 2 adds it in the
// next step (en_l2), level 1 in the step after (en_l1) and the central PE in
// the step after that (en_l0). All levels work at once on different rows, so
// m rows need m + 3 steps. When no rows are left the sequencer drains the
// levels and pulses done in the cycle the last result is presented.
//
// The per-level valid pipeline, the row tags, the start/done handshake and
// accepting start only when idle are this design's choices; the document
// gives only the order of the operations.
//
// Timing: start in cycle t loads U at edge t and the first row is taken in
// cycle t+1. The row taken in cycle s is presented on res_valid/res_row in
// cycle s+4. done is high in the cycle the last result is presented (or the
// cycle after start when num_rows is 0).
module cd_ctrl #(
  parameter int ROW_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [ROW_W-1:0] num_rows,
  output logic             busy,
  output logic             load_u,
  output logic             en_mul,
  output logic [ROW_W-1:0] row_idx,
  output logic             en_l2,
  output logic             en_l1,
  output logic             en_l0,
  output logic             res_valid,
  output logic [ROW_W-1:0] res_row,
  output logic             done
);

  import cd_pkg::*;

  ctrl_state_e      state;
  logic [ROW_W-1:0] rows_q;
  logic [ROW_W-1:0] row2_q, row1_q, row0_q;

  assign busy   = (state != CTRL_IDLE);
  assign load_u = (state == CTRL_IDLE) && start;
  assign en_mul = (state == CTRL_RUN);
  assign done   = (state == CTRL_DRAIN) && !en_l2 && !en_l1 && !en_l0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= CTRL_IDLE;
      rows_q    <= '0;
      row_idx   <= '0;
      en_l2     <= 1'b0;
      en_l1     <= 1'b0;
      en_l0     <= 1'b0;
      res_valid <= 1'b0;
      row2_q    <= '0;
      row1_q    <= '0;
      row0_q    <= '0;
      res_row   <= '0;
    end else begin
      // Level pipeline: a row moves up one level per step.
      en_l2     <= en_mul;
      en_l1     <= en_l2;
      en_l0     <= en_l1;
      res_valid <= en_l0;
      row2_q    <= row_idx;
      row1_q    <= row2_q;
      row0_q    <= row1_q;
      res_row   <= row0_q;

      unique case (state)
        CTRL_IDLE: begin
          if (start) begin
            rows_q  <= num_rows;
            row_idx <= '0;
            state   <= (num_rows == '0) ? CTRL_DRAIN : CTRL_RUN;
          end
        end
        CTRL_RUN: begin
          if (row_idx == rows_q - 1'b1) state <= CTRL_DRAIN;
          else                          row_idx <= row_idx + 1'b1;
        end
        CTRL_DRAIN: begin
          if (done) state <= CTRL_IDLE;
        end
        default: state <= CTRL_IDLE;
      endcase
    end
  end

  // A row is only issued while running, and results never outnumber rows.
  a_issue_only_running: assert property (@(posedge clk) disable iff (!rst_n)
    en_mul |-> busy);
  a_done_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);

endmodule
