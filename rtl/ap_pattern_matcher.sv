// ap_pattern_matcher: the pattern-matching stage.  NUM_PAT Hamming automata
// see the same symbol stream in parallel; their report bits form the output
// vector (pattern p owns bits p*(2D+1) .. p*(2D+1)+2D, row order).
//
// Event capture: after every consumed symbol on which at least one report
// element fires, ev_valid is high for one cycle with ev_offset = 0-based
// stream position of that symbol and ev_vector = all report bits, held as
// one (2D+1)-bit group per pattern (ev_vector[p][r] is row r of pattern p).  This is
// the (offset, output vector) pair the post-processing reads.
//
// Symbol replacement: pat_we writes the K-mer pat_in into automaton pat_addr
// without changing any connection, the way candidates of one length are
// swapped between passes.  stream_start clears every automaton and the
// offset counter before a new pass.  stream_end marks the last symbol of a
// pass; ev_end follows it with the event latency (one cycle).
module ap_pattern_matcher
  import weeder_pkg::*;
#(
  parameter int unsigned NUM_PAT = 4095,
  parameter int unsigned K       = 6,
  parameter int unsigned D       = 1,
  parameter int unsigned OFF_W   = 64,
  localparam int unsigned R      = 2 * D + 1,
  localparam int unsigned PA_W   = (NUM_PAT > 1) ? $clog2(NUM_PAT) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // symbol replacement
  input  logic               pat_we,
  input  logic [PA_W-1:0]    pat_addr,
  input  sym_t [K-1:0]       pat_in,
  // symbol stream
  input  logic               stream_start,
  input  logic               sym_valid,
  input  sym_t               sym,
  input  logic               stream_end,
  // report events
  output logic               ev_valid,
  output logic [OFF_W-1:0]   ev_offset,
  output logic [R-1:0]       ev_vector [NUM_PAT],
  output logic               ev_end
);

  logic [R-1:0]     rep [NUM_PAT];
  logic             any_rep;
  logic [OFF_W-1:0] pos;       // offset of the next symbol
  logic             consumed;  // a symbol was consumed last cycle
  logic [OFF_W-1:0] last_pos;

  for (genvar p = 0; p < NUM_PAT; p++) begin : g_pat
    hamming_automaton #(.K(K), .D(D)) u_ha (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (stream_start),
      .pat_we   (pat_we && (pat_addr == PA_W'(p))),
      .pat_in   (pat_in),
      .sym_valid(sym_valid),
      .sym      (sym),
      .report   (rep[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos      <= '0;
      consumed <= 1'b0;
      last_pos <= '0;
      ev_end   <= 1'b0;
    end else begin
      consumed <= sym_valid && !stream_start;
      ev_end   <= sym_valid && !stream_start && stream_end;
      if (stream_start) begin
        pos <= '0;
      end else if (sym_valid) begin
        last_pos <= pos;
        pos      <= pos + 1'b1;
      end
    end
  end

  always_comb begin
    any_rep = 1'b0;
    for (int unsigned p = 0; p < NUM_PAT; p++) any_rep |= |rep[p];
  end

  assign ev_valid  = consumed && any_rep;
  assign ev_offset = last_pos;
  assign ev_vector = rep;

endmodule
