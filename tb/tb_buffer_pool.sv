// tb_buffer_pool: random writes and reads following the hand-shake (write
// only when empty or being read); checks the stored counts and the full flag.
module tb_buffer_pool;
  localparam int NP = 5, G = 3;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we, re, full;
  logic [7:0] din [NP][G];
  logic [7:0] data [NP][G];
  logic [7:0] model [NP][G];
  logic mfull;

  buffer_pool #(.NUM_PAT(NP), .GRP_W(G), .CNT_W(8)) dut (.clk, .rst_n, .write_ena(we), .din, .read_ena(re), .data, .full);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; re = 0; mfull = 0;
    foreach (din[p, r]) begin din[p][r] = 0; model[p][r] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      re = mfull && ($urandom_range(0, 2) == 0);
      we = (!mfull || re) && ($urandom_range(0, 1) == 0);
      foreach (din[p, r]) din[p][r] = 8'($urandom);
      @(posedge clk);
      if (we) begin model = din; mfull = 1; end
      else if (re) mfull = 0;
      #1;
      checks++;
      if (data !== model || full !== mfull) begin
        failures++; $display("FAIL t=%0d full=%b/%b", t, full, mfull);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
