// weeder_ap_top: accelerated oligo_scan datapath for one candidate length.
// The matcher (NUM_PAT Hamming automata of K symbols with up to D
// substitutions) scans the concatenated input sequences; every symbol on
// which some automaton reports produces an event line that goes straight
// into the post-processing circuit, which scores each candidate over all
// sequences.
//
// Host sequence: load candidates (pat_we/pat_addr/pat_in; reloading them is
// the symbol replacement between passes), sequence lengths and ranges, and
// frequencies; pulse start (clears matcher state, offset counter and
// scores); stream symbols with sym_valid while sym_ready, flag the last one
// with stream_end; wait for workdone; read scores with get_score/score_addr.
// sym_ready drops when the event RAM has fewer than 4 free lines, so symbols
// stall instead of losing events.  Events are written at consecutive circular
// addresses.
module weeder_ap_top
  import weeder_pkg::*;
#(
  parameter int unsigned NUM_PAT = 4095,
  parameter int unsigned K       = 6,
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
  // candidates / symbol replacement
  input  logic                      pat_we,
  input  logic [PA_W-1:0]           pat_addr,
  input  sym_t [K-1:0]              pat_in,
  // sequence tables and frequencies
  input  logic                      length_wena,
  input  logic [SA_W-1:0]           waddr_length,
  input  logic [LEN_W-1:0]          lengthin,
  input  logic [OFF_W-1:0]          lengthrangein,
  input  logic                      freq_wena,
  input  logic [FA_W-1:0]           waddr_freq,
  input  logic [FREQ_W-1:0]         freqin,
  // pass control and symbol stream
  input  logic                      start,
  input  logic                      sym_valid,
  input  sym_t                      sym,
  input  logic                      stream_end,
  output logic                      sym_ready,
  // results
  output logic                      workdone,
  input  logic                      get_score,
  input  logic [PA_W-1:0]           score_addr,
  output logic signed [SCORE_W-1:0] score,
  output logic                      score_valid
);

  logic               ev_valid, ev_end;
  logic [OFF_W-1:0]   ev_offset;
  logic [R-1:0]       ev_vector [NUM_PAT];
  logic [EA_W-1:0]    ev_waddr;
  logic [EC_W-1:0]    ev_free;
  logic               finish;

  ap_pattern_matcher #(.NUM_PAT(NUM_PAT), .K(K), .D(D), .OFF_W(OFF_W)) u_match (
    .clk(clk), .rst_n(rst_n),
    .pat_we(pat_we), .pat_addr(pat_addr), .pat_in(pat_in),
    .stream_start(start), .sym_valid(sym_valid && sym_ready), .sym(sym),
    .stream_end(stream_end),
    .ev_valid(ev_valid), .ev_offset(ev_offset), .ev_vector(ev_vector), .ev_end(ev_end)
  );

  // circular write address and end-of-stream flag
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_waddr <= '0;
      finish   <= 1'b0;
    end else begin
      if (start) begin
        ev_waddr <= '0;
        finish   <= 1'b0;
      end else begin
        if (ev_valid) ev_waddr <= (ev_waddr == EA_W'(NUM_EV - 1)) ? '0 : ev_waddr + 1'b1;
        if (ev_end)   finish   <= 1'b1;
      end
    end
  end

  assign sym_ready = (ev_free > EC_W'(3));

  weeder_postproc #(
    .NUM_PAT(NUM_PAT), .D(D), .NUM_EV(NUM_EV), .MAX_SEQ(MAX_SEQ), .CNT_W(CNT_W),
    .LEN_W(LEN_W), .FREQ_W(FREQ_W), .OFF_W(OFF_W), .SCORE_W(SCORE_W)
  ) u_post (
    .clk(clk), .rst_n(rst_n), .start(start), .finish(finish),
    .ram_ena(1'b1), .wena(ev_valid), .waddr(ev_waddr),
    .vectorin(ev_vector), .offsetin(ev_offset), .ev_free(ev_free),
    .length_wena(length_wena), .waddr_length(waddr_length),
    .lengthin(lengthin), .lengthrangein(lengthrangein),
    .freq_wena(freq_wena), .waddr_freq(waddr_freq), .freqin(freqin),
    .workdone(workdone), .get_score(get_score), .score_addr(score_addr),
    .score(score), .score_valid(score_valid)
  );

endmodule
