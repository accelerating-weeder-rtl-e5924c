// tb_seq_ram: loads lengths and length ranges for every sequence and checks
// the asynchronous read of both tables at random addresses.
module tb_seq_ram;
  localparam int N = 100;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [6:0] waddr, raddr;
  logic [15:0] lin, lout;
  logic [63:0] rin, rout;
  logic [15:0] ml [N];
  logic [63:0] mr [N];

  seq_ram #(.MAX_SEQ(N), .LEN_W(16), .OFF_W(64)) dut (
    .clk, .length_wena(we), .waddr_length(waddr), .lengthin(lin), .lengthrangein(rin),
    .raddr, .length_out(lout), .range_out(rout));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint acc = 0;
    we = 0; waddr = 0; raddr = 0; lin = 0; rin = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      lin = 16'($urandom_range(10, 100));
      acc += lin + 1;
      rin = 64'(acc);
      waddr = 7'(i); we = 1; ml[i] = lin; mr[i] = rin;
    end
    @(negedge clk);
    we = 0; waddr = 5; lin = 16'hFFFF; rin = '1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      raddr = 7'($urandom_range(0, N - 1));
      #1;
      checks++;
      if (lout !== ml[raddr] || rout !== mr[raddr]) begin
        failures++; $display("FAIL %0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
