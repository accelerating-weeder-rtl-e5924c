// weeder_postproc: post-processing circuit that turns the report events of
// the pattern matcher into Weeder scores for NUM_PAT candidate patterns with
// up to D substitutions each (2D+1 report elements per pattern).
//
// Data flow: event lines (offset + output vector) are written through
// ram_ena/wena/waddr into the event RAM.  The central controller reads them
// in order and compares each offset with the length range of the current
// input sequence.  Lines of the current sequence go to the accumulator, which
// counts per report element.  At the end of a sequence the counts move to the
// buffer pool and Score_calc turns them, with length(i) from the length RAM
// and f(p,b) from the frequency RAM, into one ln term per pattern that it
// adds to the pattern's score.  Accumulating sequence i+1 overlaps the score
// calculation of sequence i.
//
// Use: load lengths/ranges (length_wena ...) and frequencies (freq_wena ...),
// pulse start (also clears the scores), write event lines at consecutive
// circular addresses 0,1,..,NUM_EV-1,0,.. while ev_free > 0, raise finish
// after the last line, wait for workdone, then read scores with get_score /
// score_addr (score one cycle later, signed, LN_FRAC fraction bits).
// The pin set follows the published block diagram; rst_n, score_addr,
// score_valid and ev_free are additions of this design.
module weeder_postproc
  import weeder_pkg::*;
#(
  parameter int unsigned NUM_PAT = 4095,
  parameter int unsigned D       = 1,
  parameter int unsigned NUM_EV  = 500,
  parameter int unsigned MAX_SEQ = 166666,
  parameter int unsigned CNT_W   = 8,
  parameter int unsigned LEN_W   = 16,
  parameter int unsigned FREQ_W  = 32,
  parameter int unsigned OFF_W   = 64,
  parameter int unsigned SCORE_W = 48,
  localparam int unsigned R      = 2 * D + 1,
  localparam int unsigned EA_W   = (NUM_EV > 1) ? $clog2(NUM_EV) : 1,
  localparam int unsigned SA_W   = (MAX_SEQ > 1) ? $clog2(MAX_SEQ) : 1,
  localparam int unsigned FA_W   = (NUM_PAT * (D + 1) > 1) ? $clog2(NUM_PAT * (D + 1)) : 1,
  localparam int unsigned PA_W   = (NUM_PAT > 1) ? $clog2(NUM_PAT) : 1,
  localparam int unsigned EC_W   = $clog2(NUM_EV + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      finish,
  // event lines
  input  logic                      ram_ena,
  input  logic                      wena,
  input  logic [EA_W-1:0]           waddr,
  input  logic [R-1:0]              vectorin [NUM_PAT],
  input  logic [OFF_W-1:0]          offsetin,
  output logic [EC_W-1:0]           ev_free,
  // length and length range RAMs
  input  logic                      length_wena,
  input  logic [SA_W-1:0]           waddr_length,
  input  logic [LEN_W-1:0]          lengthin,
  input  logic [OFF_W-1:0]          lengthrangein,
  // frequency RAM
  input  logic                      freq_wena,
  input  logic [FA_W-1:0]           waddr_freq,
  input  logic [FREQ_W-1:0]         freqin,
  // results
  output logic                      workdone,
  input  logic                      get_score,
  input  logic [PA_W-1:0]           score_addr,
  output logic signed [SCORE_W-1:0] score,
  output logic                      score_valid
);

  logic                             ev_re;
  logic [EA_W-1:0]                  ev_raddr;
  logic [R-1:0]                     ev_vector [NUM_PAT];
  logic [OFF_W-1:0]                 ev_offset;
  logic [SA_W-1:0]                  seq_idx;
  logic [OFF_W-1:0]                 seq_range;
  logic [LEN_W-1:0]                 seq_len;
  logic                             calc_ena, write_ena, read_ena, read_finish, calc_finish;
  logic [LEN_W-1:0]                 calc_len;
  logic [CNT_W-1:0]                 acc_cnt [NUM_PAT][R];
  logic [CNT_W-1:0]                 bp_data [NUM_PAT][R];
  logic                             bp_read, bp_full;
  logic [FREQ_W-1:0]                freq_all [NUM_PAT][D+1];

  event_ram #(.DEPTH(NUM_EV), .NUM_PAT(NUM_PAT), .GRP_W(R), .OFF_W(OFF_W)) u_event_ram (
    .clk(clk), .ram_ena(ram_ena), .wena(wena), .waddr(waddr),
    .vector_in(vectorin), .offset_in(offsetin),
    .re(ev_re), .raddr(ev_raddr), .vector_out(ev_vector), .offset_out(ev_offset)
  );

  seq_ram #(.MAX_SEQ(MAX_SEQ), .LEN_W(LEN_W), .OFF_W(OFF_W)) u_seq_ram (
    .clk(clk), .length_wena(length_wena), .waddr_length(waddr_length),
    .lengthin(lengthin), .lengthrangein(lengthrangein),
    .raddr(seq_idx), .length_out(seq_len), .range_out(seq_range)
  );

  frequency_ram #(.NUM_PAT(NUM_PAT), .D(D), .FREQ_W(FREQ_W)) u_freq_ram (
    .clk(clk), .freq_wena(freq_wena), .waddr_freq(waddr_freq), .freqin(freqin),
    .freq_all(freq_all)
  );

  central_controller #(.DEPTH(NUM_EV), .MAX_SEQ(MAX_SEQ), .LEN_W(LEN_W), .OFF_W(OFF_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .finish(finish),
    .ev_write(ram_ena && wena), .ev_free(ev_free),
    .ev_re(ev_re), .ev_raddr(ev_raddr), .ev_offset(ev_offset),
    .seq_idx(seq_idx), .seq_range(seq_range), .seq_len(seq_len),
    .calc_ena(calc_ena), .write_ena(write_ena), .read_ena(read_ena), .calc_len(calc_len),
    .read_finish(read_finish), .calc_finish(calc_finish)
  );

  accumulator #(.NUM_PAT(NUM_PAT), .GRP_W(R), .CNT_W(CNT_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .calc_ena(calc_ena), .vector(ev_vector),
    .write_ena(write_ena), .cnt(acc_cnt)
  );

  buffer_pool #(.NUM_PAT(NUM_PAT), .GRP_W(R), .CNT_W(CNT_W)) u_pool (
    .clk(clk), .rst_n(rst_n), .write_ena(write_ena), .din(acc_cnt),
    .read_ena(bp_read), .data(bp_data), .full(bp_full)
  );

  score_calc #(
    .NUM_PAT(NUM_PAT), .D(D), .CNT_W(CNT_W), .LEN_W(LEN_W), .FREQ_W(FREQ_W), .SCORE_W(SCORE_W)
  ) u_score (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .read_ena(read_ena), .len_in(calc_len), .bp_data(bp_data),
    .bp_read(bp_read), .read_finish(read_finish), .freq_all(freq_all),
    .finish(calc_finish), .work_done(workdone), .calc_busy(),
    .get_score(get_score), .score_addr(score_addr), .score(score), .score_valid(score_valid)
  );

  // Score_calc is told about every filling of the buffer pool
  a_pool_told: assert property (@(posedge clk) disable iff (!rst_n)
                                write_ena |=> read_ena);

endmodule
