// buffer_pool: one stage of storage between the accumulator and Score_calc.
// It holds the per-report-element counts of one finished input sequence, so
// the accumulator can already count the next sequence while Score_calc is
// still working on the previous one (accumulation and calculation overlap).
//
// write_ena loads all NUM_PAT*GRP_W counts in one cycle and sets full; read_ena
// (Score_calc copying the counts into its pattern arrays) clears full.  The
// contents are read in parallel on data.  The full flag is this design's
// addition, used by the checks of the hand-shake.
module buffer_pool #(
  parameter int unsigned NUM_PAT = 4095,
  parameter int unsigned GRP_W   = 3,
  parameter int unsigned CNT_W   = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        write_ena,
  input  logic [CNT_W-1:0]             din [NUM_PAT][GRP_W],
  input  logic                        read_ena,
  output logic [CNT_W-1:0]             data [NUM_PAT][GRP_W],
  output logic                        full
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NUM_PAT; p++)
        for (int unsigned r = 0; r < GRP_W; r++) data[p][r] <= '0;
      full <= 1'b0;
    end else begin
      if (write_ena) begin
        data <= din;
        full <= 1'b1;
      end else if (read_ena) begin
        full <= 1'b0;
      end
    end
  end

  // Never overwrite counts Score_calc has not copied yet.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
                                   write_ena |-> (!full || read_ena));

endmodule
