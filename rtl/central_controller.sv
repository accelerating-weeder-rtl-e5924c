// central_controller: state machine that walks the report events in order
// and splits them into input sequences.
//
// Events: the host (or the matcher) writes event lines into the event RAM at
// consecutive circular addresses; the controller counts those writes
// (ev_written) and reads lines in the same order, so the lines written but
// not yet read are pending.  ev_free tells the writer how many lines are
// still free.
//
// Per event line the controller compares the offset with range(seq), the
// end of the current sequence seq:
//   offset <  range(seq): the line belongs to seq; calc_ena makes the
//                         accumulator add it (one line per cycle while lines
//                         are pending);
//   offset >= range(seq): seq is finished.  If it had events, the controller
//                         waits for read_finish (Score_calc has taken the
//                         previous counts), then raises write_ena (counts to
//                         the buffer pool, accumulator cleared) and in the
//                         next cycle read_ena with calc_len = length(seq);
//                         the two are never high together.  Then seq+1 is
//                         tried against the same line; sequences without
//                         events cost one cycle each and are not scored.
// start (when idle or done) begins a pass at sequence 0 and event line 0.  When finish is high and no
// line is pending, the last sequence is handed over the same way and
// calc_finish is raised and held until the next start.
module central_controller #(
  parameter int unsigned DEPTH   = 500,
  parameter int unsigned MAX_SEQ = 166666,
  parameter int unsigned LEN_W   = 16,
  parameter int unsigned OFF_W   = 64,
  localparam int unsigned EA_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned SA_W   = (MAX_SEQ > 1) ? $clog2(MAX_SEQ) : 1,
  localparam int unsigned CNT_W  = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             finish,
  // writes into the event RAM
  input  logic             ev_write,
  output logic [CNT_W-1:0] ev_free,
  // event RAM read port (data one cycle after re)
  output logic             ev_re,
  output logic [EA_W-1:0]  ev_raddr,
  input  logic [OFF_W-1:0] ev_offset,
  // sequence tables
  output logic [SA_W-1:0]  seq_idx,
  input  logic [OFF_W-1:0] seq_range,
  input  logic [LEN_W-1:0] seq_len,
  // accumulator, buffer pool, Score_calc
  output logic             calc_ena,
  output logic             write_ena,
  output logic             read_ena,
  output logic [LEN_W-1:0] calc_len,
  input  logic             read_finish,
  output logic             calc_finish
);

  typedef enum logic [2:0] {C_IDLE, C_FETCH, C_EVAL, C_HAND, C_RD, C_DONE} cstate_t;
  cstate_t st;

  logic [CNT_W-1:0] pending;      // lines written, not yet read
  logic             has_ev;       // current sequence has accumulated lines
  logic             flushing;     // hand-over of the last sequence

  // read issued this cycle
  logic issue;
  always_comb begin
    issue = 1'b0;
    case (st)
      C_FETCH: issue = (pending != '0);
      C_EVAL:  issue = (ev_offset < seq_range) && (pending != '0);
      default: issue = 1'b0;
    endcase
  end
  assign ev_re = issue;

  assign calc_ena  = (st == C_EVAL) && (ev_offset < seq_range);
  assign write_ena = (st == C_HAND) && read_finish;
  assign read_ena  = (st == C_RD);
  assign calc_len  = seq_len;
  assign ev_free   = CNT_W'(DEPTH) - pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= C_IDLE;
      pending     <= '0;
      ev_raddr    <= '0;
      seq_idx     <= '0;
      has_ev      <= 1'b0;
      flushing    <= 1'b0;
      calc_finish <= 1'b0;
    end else begin
      pending <= pending + CNT_W'(ev_write) - CNT_W'(issue);
      if ((st == C_IDLE || st == C_DONE) && start)
        ev_raddr <= '0;
      else if (issue)
        ev_raddr <= (ev_raddr == EA_W'(DEPTH - 1)) ? '0 : ev_raddr + 1'b1;
      case (st)
        C_IDLE, C_DONE: if (start) begin
          seq_idx     <= '0;
          has_ev      <= 1'b0;
          flushing    <= 1'b0;
          calc_finish <= 1'b0;
          st          <= C_FETCH;
        end
        C_FETCH: begin
          if (pending != '0) begin
            st <= C_EVAL;
          end else if (finish) begin
            flushing    <= 1'b1;
            st          <= has_ev ? C_HAND : C_DONE;
            calc_finish <= !has_ev;
          end
        end
        C_EVAL: begin
          if (ev_offset < seq_range) begin
            has_ev <= 1'b1;
            if (pending == '0) st <= C_FETCH;
          end else if (has_ev) begin
            st <= C_HAND;
          end else begin
            seq_idx <= seq_idx + 1'b1;
          end
        end
        C_HAND: if (read_finish) st <= C_RD;
        C_RD: begin
          has_ev  <= 1'b0;
          seq_idx <= seq_idx + 1'b1;
          st      <= flushing ? C_DONE : C_EVAL;
          if (flushing) calc_finish <= 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  ev_write |-> (pending != CNT_W'(DEPTH)) || issue);
  a_hand_excl:   assert property (@(posedge clk) disable iff (!rst_n)
                                  !(calc_ena && write_ena));
  a_rw_excl:     assert property (@(posedge clk) disable iff (!rst_n)
                                  !(write_ena && read_ena));
  a_seq_bound:   assert property (@(posedge clk) disable iff (!rst_n)
                                  (st == C_EVAL) |-> (int'(seq_idx) < MAX_SEQ));

endmodule
