// frequency_ram: expected frequencies f(p,b) of every candidate pattern p
// for every substitution count b = 0..D, computed by the host from the
// species background files and loaded before post-processing.
//
// Write port: freq_wena, waddr_freq = p*(D+1)+b, freqin.  The score lanes of
// all patterns need their value at the same time, so the whole table is also
// presented in parallel on freq_all[p][b], the "freqarray" each
// lane selects from with its best substitution count.  Values are unsigned
// fractions with FREQ_W fraction bits.  Taking f independent of the input
// sequence and the fixed-point format are this design's choices.
module frequency_ram #(
  parameter int unsigned NUM_PAT = 4095,
  parameter int unsigned D       = 1,
  parameter int unsigned FREQ_W  = 32,
  localparam int unsigned N      = NUM_PAT * (D + 1),
  localparam int unsigned A_W    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     freq_wena,
  input  logic [A_W-1:0]           waddr_freq,
  input  logic [FREQ_W-1:0]        freqin,
  output logic [FREQ_W-1:0]        freq_all [NUM_PAT][D+1]
);

  always_ff @(posedge clk) begin
    if (freq_wena) freq_all[int'(waddr_freq) / (D + 1)][int'(waddr_freq) % (D + 1)] <= freqin;
  end

endmodule
