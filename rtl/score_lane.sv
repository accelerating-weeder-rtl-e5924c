// score_lane: Score_calc datapath for one candidate pattern.  On start it
// takes the pattern's report counts of one input sequence (one count per
// report row, rows 2m-1 and 2m meaning m substitutions), finds the best
// substitution count b (the smallest with a report) and Obs (the number of
// reports with b substitutions).  If the pattern occurs in the sequence it
// computes  ln( Obs / (f(p,b) * length) )  and adds it to the pattern's
// score register; otherwise the score is left alone (I(p,i) = 0).
//
// Datapath: MUL (f * length, one cycle) -> DIV (serial_divider, N_W cycles)
// -> Ln (fx_ln, LN_FRAC+2 cycles) -> Acc.  busy is high from the cycle after
// start until the score is updated; a pattern without occurrence is never
// busy.  Formats: f has FREQ_W fraction bits, the score LN_FRAC fraction
// bits (signed).  The fixed-point datapath replaces the floating-point units
// of the original circuit.
module score_lane
  import weeder_pkg::*;
#(
  parameter int unsigned D       = 1,
  parameter int unsigned CNT_W   = 8,
  parameter int unsigned LEN_W   = 16,
  parameter int unsigned FREQ_W  = 32,
  parameter int unsigned SCORE_W = 48,
  localparam int unsigned R      = 2 * D + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,     // score := 0
  input  logic                          start,
  input  logic [CNT_W-1:0]              counts [R],
  input  logic [FREQ_W-1:0]             freq [D+1],
  input  logic [LEN_W-1:0]              len,
  output logic                          busy,
  output logic signed [SCORE_W-1:0]     score
);

  localparam int unsigned OBS_W = CNT_W + 1;
  localparam int unsigned E_W   = FREQ_W + LEN_W;
  localparam int unsigned N_W   = OBS_W + FREQ_W + LN_FRAC;
  localparam int unsigned LN_W  = 32;

  // Patmis / Patcount: best substitution count and its number of reports
  logic [OBS_W-1:0] obs_c;
  logic [$clog2(D+1)-1:0] b_c;
  logic             hit_c;
  always_comb begin
    obs_c = '0;
    b_c   = '0;
    hit_c = 1'b0;
    for (int m = D; m >= 0; m--) begin
      logic [OBS_W-1:0] s;
      s = OBS_W'(counts[(m == 0) ? 0 : 2*m-1]) + ((m == 0) ? '0 : OBS_W'(counts[2*m]));
      if (s != '0) begin
        obs_c = s;
        b_c   = $bits(b_c)'(m);
        hit_c = 1'b1;
      end
    end
  end

  typedef enum logic [2:0] {L_IDLE, L_MUL, L_DIV, L_LN, L_ACC} lstate_t;
  lstate_t st;

  logic [OBS_W-1:0]  patcount;
  logic [FREQ_W-1:0] f_sel;
  logic [LEN_W-1:0]  len_r;
  logic [E_W-1:0]    expect_r;
  logic              div_start, div_done;
  logic [N_W-1:0]    ratio;
  logic              ln_start, ln_done;
  logic signed [LN_W-1:0] ln_v;

  serial_divider #(.N_W(N_W), .D_W(E_W)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start),
    .num({patcount, {(FREQ_W + LN_FRAC){1'b0}}}), .den(expect_r),
    .busy(), .done(div_done), .quot(ratio)
  );

  fx_ln #(.IN_W(N_W), .FRAC(LN_FRAC), .OUT_W(LN_W)) u_ln (
    .clk(clk), .rst_n(rst_n), .start(ln_start), .x(ratio),
    .busy(), .done(ln_done), .ln_out(ln_v)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= L_IDLE;
      patcount  <= '0;
      f_sel     <= '0;
      len_r     <= '0;
      expect_r  <= '0;
      div_start <= 1'b0;
      ln_start  <= 1'b0;
      score     <= '0;
    end else begin
      div_start <= 1'b0;
      ln_start  <= 1'b0;
      if (clear) score <= '0;
      case (st)
        L_IDLE: if (start && hit_c) begin
          patcount <= obs_c;
          f_sel    <= freq[b_c];       // freqarray selected by Patmis
          len_r    <= len;
          st       <= L_MUL;
        end
        L_MUL: begin
          expect_r  <= f_sel * len_r;
          div_start <= 1'b1;
          st        <= L_DIV;
        end
        L_DIV: if (div_done) begin
          ln_start <= 1'b1;
          st       <= L_LN;
        end
        L_LN: if (ln_done) st <= L_ACC;
        L_ACC: begin
          score <= score + SCORE_W'(ln_v);
          st    <= L_IDLE;
        end
        default: st <= L_IDLE;
      endcase
    end
  end

  assign busy = (st != L_IDLE);

endmodule
