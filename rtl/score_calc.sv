// score_calc: computes the Weeder score of every candidate pattern,
//   Score(p) = sum over sequences i with an occurrence of
//              ln( Obs(p,i,b_i) / (f(p,b_i) * length(i)) ),
// with one score_lane per pattern working in parallel.
//
// Hand-shake with the central controller: read_ena (one cycle, with the
// sequence length on len_in) says the buffer pool holds the counts of a
// finished sequence.  As soon as all lanes are idle, Score_calc copies the
// pool into its lanes (bp_read, one cycle) and starts them; read_finish is
// high whenever no copy is outstanding, i.e. the pool may be written again.
// finish says no more sequences will come; work_done rises once finish is
// high, no copy is outstanding and every lane is idle.  clear resets the
// scores (start of a pass).  Score RAM read-out: get_score with score_addr
// gives score one cycle later with score_valid.  A pass through a lane takes
// a fixed number of cycles (see score_lane), so all lanes finish together.
module score_calc
  import weeder_pkg::*;
#(
  parameter int unsigned NUM_PAT = 4095,
  parameter int unsigned D       = 1,
  parameter int unsigned CNT_W   = 8,
  parameter int unsigned LEN_W   = 16,
  parameter int unsigned FREQ_W  = 32,
  parameter int unsigned SCORE_W = 48,
  localparam int unsigned R      = 2 * D + 1,
  localparam int unsigned PA_W   = (NUM_PAT > 1) ? $clog2(NUM_PAT) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  clear,
  input  logic                                  read_ena,
  input  logic [LEN_W-1:0]                      len_in,
  input  logic [CNT_W-1:0]                      bp_data [NUM_PAT][R],
  output logic                                  bp_read,
  output logic                                  read_finish,
  input  logic [FREQ_W-1:0]                     freq_all [NUM_PAT][D+1],
  input  logic                                  finish,
  output logic                                  work_done,
  output logic                                  calc_busy,
  input  logic                                  get_score,
  input  logic [PA_W-1:0]                       score_addr,
  output logic signed [SCORE_W-1:0]             score,
  output logic                                  score_valid
);

  logic                         pending;
  logic [LEN_W-1:0]             pend_len;
  logic [NUM_PAT-1:0]           lane_busy;
  logic signed [SCORE_W-1:0]    lane_score [NUM_PAT];

  assign calc_busy = |lane_busy;
  assign bp_read   = pending && !calc_busy;

  for (genvar p = 0; p < NUM_PAT; p++) begin : g_lane
    score_lane #(
      .D(D), .CNT_W(CNT_W), .LEN_W(LEN_W), .FREQ_W(FREQ_W), .SCORE_W(SCORE_W)
    ) u_lane (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .start (bp_read),
      .counts(bp_data[p]),
      .freq  (freq_all[p]),
      .len   (pend_len),
      .busy  (lane_busy[p]),
      .score (lane_score[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending     <= 1'b0;
      pend_len    <= '0;
      work_done   <= 1'b0;
      score       <= '0;
      score_valid <= 1'b0;
    end else begin
      if (read_ena) begin
        pending  <= 1'b1;
        pend_len <= len_in;
      end else if (bp_read) begin
        pending  <= 1'b0;
      end
      work_done   <= finish && !pending && !read_ena && !bp_read && !calc_busy;
      score_valid <= get_score;
      if (get_score) score <= lane_score[score_addr];
    end
  end

  assign read_finish = !pending;

  a_no_lost_request: assert property (@(posedge clk) disable iff (!rst_n)
                                      read_ena |-> !pending);

endmodule
