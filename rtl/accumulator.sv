// accumulator: counts, per report element, how often it fired within the
// current input sequence.  It holds one CNT_W-bit counter per output-vector
// bit (cnt[p][r] for row r of pattern p).  In every cycle with calc_ena high
// it adds one output-vector line to the counters bit-wise
// (cnt[p][r] += vector[p][r]); so one line is absorbed
// per cycle.  With write_ena the counters are presented to the buffer pool
// (cnt is the value they hold in that cycle) and restart from zero; a line
// given in that same cycle starts the new count.
//
// Counters saturate at their maximum, a choice of this design.
module accumulator #(
  parameter int unsigned NUM_PAT = 4095,
  parameter int unsigned GRP_W   = 3,
  parameter int unsigned CNT_W   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    calc_ena,
  input  logic [GRP_W-1:0]        vector [NUM_PAT],
  input  logic                    write_ena,
  output logic [CNT_W-1:0]        cnt [NUM_PAT][GRP_W]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NUM_PAT; p++)
        for (int unsigned r = 0; r < GRP_W; r++) cnt[p][r] <= '0;
    end else begin
      for (int unsigned p = 0; p < NUM_PAT; p++) begin
        for (int unsigned r = 0; r < GRP_W; r++) begin
          // the mux of the block diagram: clear or keep, then add
          logic [CNT_W-1:0] base;
          base = write_ena ? '0 : cnt[p][r];
          if (calc_ena && vector[p][r] && (base != {CNT_W{1'b1}}))
            cnt[p][r] <= base + 1'b1;
          else
            cnt[p][r] <= base;
        end
      end
    end
  end

endmodule
