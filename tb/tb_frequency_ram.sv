// tb_frequency_ram: writes f(p,b) for every pattern and substitution count
// in random order, overwrites some, and checks the parallel read-out.
module tb_frequency_ram;
  localparam int NP = 7, D = 2, N = NP * (D + 1);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [4:0] waddr;
  logic [31:0] din;
  logic [31:0] fa [NP][D+1];
  logic [31:0] model [N];

  frequency_ram #(.NUM_PAT(NP), .D(D), .FREQ_W(32)) dut (
    .clk, .freq_wena(we), .waddr_freq(waddr), .freqin(din), .freq_all(fa));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; din = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i); din = $urandom; model[i] = din;
    end
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1); waddr = 5'($urandom_range(0, N - 1)); din = $urandom;
      if (we) model[waddr] = din;
      @(posedge clk); #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (fa[j / (D + 1)][j % (D + 1)] !== model[j]) begin failures++; $display("FAIL %0d", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
