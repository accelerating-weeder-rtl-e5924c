// hamming_automaton: homogeneous-NFA automaton that reports every window of
// K symbols whose Hamming distance from a stored K-mer is at most D.
//
// The automaton is a grid of state transition elements (STEs) with 2D+1
// rows and K columns.  Row 0 holds "symbol equals pattern[c]" STEs; row 2m-1
// holds "symbol differs from pattern[c]" STEs (the m-th substitution); row 2m
// holds "symbol equals pattern[c]" STEs after m substitutions.  Rows 0 and 1
// of column 0 are enabled on every symbol (all-input start), so a window
// starting at every stream position is tracked.  An active STE in match row m
// or mismatch row m enables, in the next column, the STE of match row m and
// of mismatch row m+1.  The last STE of each row is a report element: report[r]
// is 1 after the symbol that ends a window with mism_of_row(r) substitutions.
// The grid uses (2D+1)K - D^2 STEs; the row layout for D=1 follows the
// published 6-mer example, the generalisation to D>1 is this design's.
// Mismatch STEs accept every byte but the pattern symbol, separators included.
//
// Timing: one symbol per cycle when sym_valid; report is registered and valid
// the cycle after the symbol.  clear (new stream) deactivates every STE.
// Symbol replacement: pat_we loads a new K-mer (pattern[0] is the first
// symbol of the window) and also clears the state.
module hamming_automaton
  import weeder_pkg::*;
#(
  parameter int unsigned K = 6,
  parameter int unsigned D = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 pat_we,
  input  sym_t [K-1:0]         pat_in,
  input  logic                 sym_valid,
  input  sym_t                 sym,
  output logic [2*D:0]         report
);

  localparam int unsigned R = 2 * D + 1;

  sym_t [K-1:0]        pattern;
  logic [R-1:0][K-1:0] active, active_nxt;

  always_comb begin
    logic en;
    logic hit;
    for (int unsigned r = 0; r < R; r++) begin
      for (int unsigned c = 0; c < K; c++) begin
        // enable from predecessors in column c-1
        if (c == 0) begin
          en = (r <= 1);
        end else if (r == 0) begin
          en = active[0][c-1];
        end else if (r % 2 == 0) begin           // match row m = r/2
          en = active[r][c-1] | active[r-1][c-1];
        end else if (r == 1) begin              // first mismatch row
          en = active[0][c-1];
        end else begin                          // mismatch row m = (r+1)/2
          en = active[r-1][c-1] | active[r-2][c-1];
        end
        hit = (r % 2 == 1) ? (sym != pattern[c]) : (sym == pattern[c]);
        active_nxt[r][c] = en & hit & ste_present(r, c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= '0;
      pattern <= '0;
    end else begin
      if (pat_we) pattern <= pat_in;
      if (clear || pat_we) active <= '0;
      else if (sym_valid)  active <= active_nxt;
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < R; r++) report[r] = active[r][K-1];
  end

endmodule
