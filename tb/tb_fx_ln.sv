// tb_fx_ln: natural log of random fixed-point values (16 fraction bits)
// spread over the whole input range, compared with $ln within 2^-13, and a
// check of the FRAC+2 cycle latency.
module tb_fx_ln;
  localparam int IW = 57;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [IW-1:0] x;
  logic signed [31:0] y;

  fx_ln #(.IN_W(IW), .FRAC(16), .OUT_W(32)) dut (.clk, .rst_n, .start, .x, .busy, .done, .ln_out(y));

  task automatic ln1(input logic [IW-1:0] v);
    int cyc = 0;
    real ref_v, got;
    @(negedge clk);
    x = v; start = 1;
    @(negedge clk);
    start = 0; x = '0;
    do begin
      cyc++;
      @(posedge clk); #1;
    end while (!done && cyc < 100);
    ref_v = $ln(real'(v) / 65536.0);
    got = real'(y) / 65536.0;
    checks += 2;
    if (got - ref_v > 1.0/8192 || ref_v - got > 1.0/8192) begin
      failures++; $display("FAIL ln(%0d/65536) = %f exp %f", v, got, ref_v);
    end
    if (cyc != 18) begin
      failures++; $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ln1(57'd65536);        // ln 1 = 0
    ln1(57'd1);            // smallest input
    ln1(57'd131072);       // ln 2
    ln1('1);               // largest input
    ln1(57'd178145);       // about e
    for (int i = 0; i < 400; i++) begin
      logic [IW-1:0] v = {$urandom, $urandom} >> $urandom_range(0, 56);
      if (v == 0) v = 1;
      ln1(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
