// fx_ln: natural logarithm of an unsigned fixed-point number x with FRAC
// fraction bits (x > 0), result signed with FRAC fraction bits.
//
// Method: the position e of the leading one gives the integer part of
// log2(x) (e - FRAC); x shifted so that this one sits at bit FRAC is a
// mantissa m in [1,2).  FRAC squaring steps give the fraction bits of
// log2(m): m := m*m, and if m >= 2 the bit is 1 and m := m/2.  Finally
// ln(x) = log2(x) * ln(2).  Latency: start, then FRAC+2 cycles until done
// pulses (normalise, FRAC squarings, scale by ln 2).  The algorithm is this
// design's choice.
module fx_ln
  import weeder_pkg::*;
#(
  parameter int unsigned IN_W  = 57,
  parameter int unsigned FRAC  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [IN_W-1:0]         x,
  output logic                    busy,
  output logic                    done,
  output logic signed [OUT_W-1:0] ln_out
);

  localparam int unsigned E_W = $clog2(IN_W) + 2;
  localparam int unsigned L_W = E_W + FRAC + 1;      // signed log2 width

  typedef enum logic [1:0] {S_IDLE, S_NORM, S_SQ, S_SCALE} state_t;
  state_t state;

  logic [IN_W-1:0]         xr;
  logic [FRAC:0]           m;        // Q1.FRAC mantissa
  logic signed [L_W-1:0]   log2v;    // Q.FRAC
  logic [$clog2(FRAC+1)-1:0] step;

  // leading-one position of xr
  logic [E_W-1:0] lead;
  always_comb begin
    lead = '0;
    for (int unsigned i = 0; i < IN_W; i++) if (xr[i]) lead = E_W'(i);
  end

  logic [2*FRAC+1:0] sq;
  assign sq = m * m;

  logic [IN_W+FRAC-1:0] xs;  // x with its leading one moved to bit FRAC
  assign xs = {xr, {FRAC{1'b0}}} >> lead;

  logic signed [L_W+32:0] scaled;
  assign scaled = log2v * $signed({1'b0, LN2_Q32});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      xr     <= '0;
      m      <= '0;
      log2v  <= '0;
      step   <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      ln_out <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          xr    <= x;
          busy  <= 1'b1;
          state <= S_NORM;
        end
        S_NORM: begin
          m     <= xs[FRAC:0];
          log2v <= $signed({{(L_W-E_W){1'b0}}, lead} - L_W'(FRAC)) <<< FRAC;
          step  <= '0;
          state <= S_SQ;
        end
        S_SQ: begin
          if (sq[2*FRAC+1]) begin
            m     <= sq[2*FRAC+1:FRAC+1];
            log2v <= log2v | (L_W'(1) << (FRAC - 1 - int'(step)));
          end else begin
            m     <= sq[2*FRAC:FRAC];
          end
          step <= step + 1'b1;
          if (step == $bits(step)'(FRAC - 1)) state <= S_SCALE;
        end
        S_SCALE: begin
          ln_out <= OUT_W'(scaled >>> 32);
          busy   <= 1'b0;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
