// event_ram: the output vector RAM and the offset RAM.  Line n of the two
// arrays describes one report event: the stream offset at which it fired
// (OFF_W bits) and the output vector of all NUM_PAT*GRP_W report elements.
// Both arrays share the write address, as in the published block diagram.
// The output vector is held as NUM_PAT groups of GRP_W report bits (one
// group per candidate pattern).
//
// Write: when ram_ena and wena are high, line waddr takes vector_in and
// offset_in at the clock edge.  Read: when re is high, line raddr appears on
// vector_out / offset_out after the clock edge (one cycle latency) and stays
// there until the next read.  The depth of 500 lines is the size the
// original circuit was simulated with; the read/write timing is this
// design's choice.
module event_ram #(
  parameter int unsigned DEPTH  = 500,
  parameter int unsigned NUM_PAT = 4095,
  parameter int unsigned GRP_W  = 3,
  parameter int unsigned OFF_W  = 64,
  localparam int unsigned A_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             ram_ena,
  input  logic             wena,
  input  logic [A_W-1:0]   waddr,
  input  logic [GRP_W-1:0] vector_in [NUM_PAT],
  input  logic [OFF_W-1:0] offset_in,
  input  logic             re,
  input  logic [A_W-1:0]   raddr,
  output logic [GRP_W-1:0] vector_out [NUM_PAT],
  output logic [OFF_W-1:0] offset_out
);

  logic [GRP_W-1:0] vec_mem [DEPTH][NUM_PAT];
  logic [OFF_W-1:0] off_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ram_ena && wena) begin
      vec_mem[waddr] <= vector_in;
      off_mem[waddr] <= offset_in;
    end
    if (re) begin
      vector_out <= vec_mem[raddr];
      offset_out <= off_mem[raddr];
    end
  end

endmodule
