// seq_ram: per-input-sequence tables loaded by the host before
// post-processing: the length RAM (length(i), used in the score) and the
// length range RAM (range(i), the stream offset of the first symbol after
// sequence i, i.e. its exclusive end with its separator included).  An event
// whose offset is below range(i) and not below range(i-1) belongs to
// sequence i.
//
// Both tables share one write enable and address (length_wena,
// waddr_length) with separate data inputs.  Reads are asynchronous on raddr.
// The boundary convention and the asynchronous read are this design's own.
module seq_ram #(
  parameter int unsigned MAX_SEQ = 166666,
  parameter int unsigned LEN_W   = 16,
  parameter int unsigned OFF_W   = 64,
  localparam int unsigned A_W    = (MAX_SEQ > 1) ? $clog2(MAX_SEQ) : 1
) (
  input  logic             clk,
  input  logic             length_wena,
  input  logic [A_W-1:0]   waddr_length,
  input  logic [LEN_W-1:0] lengthin,
  input  logic [OFF_W-1:0] lengthrangein,
  input  logic [A_W-1:0]   raddr,
  output logic [LEN_W-1:0] length_out,
  output logic [OFF_W-1:0] range_out
);

  logic [LEN_W-1:0] len_mem   [MAX_SEQ];
  logic [OFF_W-1:0] range_mem [MAX_SEQ];

  always_ff @(posedge clk) begin
    if (length_wena) begin
      len_mem[waddr_length]   <= lengthin;
      range_mem[waddr_length] <= lengthrangein;
    end
  end

  assign length_out = len_mem[raddr];
  assign range_out  = range_mem[raddr];

endmodule
