// ldpc_ctrl: sequencer of the iterative decoder.
//
// A start pulse in ST_IDLE loads the intrinsic messages (load = 1 in that
// cycle) and begins iteration 1. The iteration body depends on the schedule:
//   flooding (COLUMN_LAYERED = 0), three cycles per iteration: ST_HOR
//     (hor_en: all check nodes compute R), ST_VER (ver_en: all variable
//     nodes compute L, Lv and the hard decisions), ST_CHK;
//   column layered (COLUMN_LAYERED = 1), N + 1 cycles per iteration: N
//     cycles of ST_COL (col_en, col_idx = 0 .. N-1: column col_idx is
//     updated from the current messages), then ST_CHK.
// In ST_CHK the parity test of the hard decisions is read. Decoding stops
// there when the word is a valid codeword or when MAX_ITER iterations have
// run; otherwise the next iteration starts. done is a one-cycle pulse in the
// cycle after the last ST_CHK, so a decode of k iterations ends 3k+1
// (flooding) or (N+1)k+1 (column layered) cycles after the start cycle.
// converged and iterations are held until the next start. A start while busy
// is ignored. The iteration loop and the stop rule follow the decoding
// algorithm; the cycle schedule and the handshake are this design's choice.
module ldpc_ctrl #(
  parameter int MAX_ITER       = ldpc_pkg::MAX_ITER,
  parameter int N              = ldpc_pkg::N_DEF,
  parameter bit COLUMN_LAYERED = 1'b0,
  parameter int IW             = $clog2(MAX_ITER + 1),
  parameter int CW             = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,       // begin decoding the presented samples
  input  logic          valid,       // parity test of the current hard bits
  output logic          load,        // capture intrinsic messages
  output logic          hor_en,      // flooding: register all R messages
  output logic          ver_en,      // flooding: register all L messages
  output logic          col_en,      // column layered: update column col_idx
  output logic [CW-1:0] col_idx,     // column being updated
  output logic          busy,        // a decode is in progress
  output logic          done,        // pulse: decoding finished
  output logic          converged,   // last decode ended on a valid codeword
  output logic [IW-1:0] iterations   // iterations the last decode used
);

  import ldpc_pkg::*;

  dec_state_e state;

  assign load   = (state == ST_IDLE) && start;
  // Gated by the schedule parameter so that synthesis drops the unused one.
  assign hor_en = !COLUMN_LAYERED && (state == ST_HOR);
  assign ver_en = !COLUMN_LAYERED && (state == ST_VER);
  assign col_en =  COLUMN_LAYERED && (state == ST_COL);
  assign busy   = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      done       <= 1'b0;
      converged  <= 1'b0;
      iterations <= '0;
      col_idx    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state      <= COLUMN_LAYERED ? ST_COL : ST_HOR;
          col_idx    <= '0;
          iterations <= IW'(1);
          converged  <= 1'b0;
        end
        ST_HOR: state <= ST_VER;
        ST_VER: state <= ST_CHK;
        ST_COL: begin
          if (col_idx == CW'(N - 1)) begin
            state   <= ST_CHK;
            col_idx <= '0;
          end else begin
            col_idx <= col_idx + CW'(1);
          end
        end
        ST_CHK: begin
          if (valid || iterations == IW'(MAX_ITER)) begin
            state     <= ST_IDLE;
            done      <= 1'b1;
            converged <= valid;
          end else begin
            state      <= COLUMN_LAYERED ? ST_COL : ST_HOR;
            iterations <= iterations + IW'(1);
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The iteration count never passes the limit, done never overlaps a
  // decode in progress, and only the states of the chosen schedule occur.
  a_iter_limit: assert property (@(posedge clk) disable iff (!rst_n)
                                 iterations <= IW'(MAX_ITER));
  a_done_idle:  assert property (@(posedge clk) disable iff (!rst_n)
                                 done |-> !busy);
  a_schedule:   assert property (@(posedge clk) disable iff (!rst_n)
                                 COLUMN_LAYERED ? !(hor_en || ver_en) : !col_en);

endmodule
