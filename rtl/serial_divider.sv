// serial_divider: unsigned restoring divider producing one quotient bit per
// clock.  start latches num and den; N_W cycles later done pulses for one
// cycle with quot = floor(num/den) (busy is high in between).  A zero
// divisor yields an all-ones quotient.  Used for Obs / (f * length) in the
// score; the fixed-point, bit-serial form is this design's choice.
module serial_divider #(
  parameter int unsigned N_W = 57,
  parameter int unsigned D_W = 48,
  localparam int unsigned C_W = $clog2(N_W + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] num,
  input  logic [D_W-1:0] den,
  output logic           busy,
  output logic           done,
  output logic [N_W-1:0] quot
);

  logic [D_W:0]   rem;
  logic [D_W-1:0] dvs;
  logic [N_W-1:0] q;      // shifts the dividend out and the quotient in
  logic [C_W-1:0] left;

  logic [D_W:0]   rem_sh;
  logic [D_W:0]   rem_sub;
  always_comb begin
    rem_sh  = {rem[D_W-1:0], q[N_W-1]};
    rem_sub = rem_sh - {1'b0, dvs};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dvs  <= '0;
      q    <= '0;
      left <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem  <= '0;
        dvs  <= den;
        q    <= num;
        left <= C_W'(N_W);
        busy <= 1'b1;
      end else if (busy) begin
        if (!rem_sub[D_W]) begin
          rem <= rem_sub;
          q   <= {q[N_W-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          q   <= {q[N_W-2:0], 1'b0};
        end
        left <= left - 1'b1;
        if (left == C_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= (dvs == '0) ? '1 : {q[N_W-2:0], !rem_sub[D_W]};
        end
      end
    end
  end

endmodule
