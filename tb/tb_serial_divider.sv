// tb_serial_divider: random and corner-case divisions (57-bit by 48-bit)
// against the simulator's own division, including divide by zero, and a
// check that done comes exactly N_W cycles after start.
module tb_serial_divider;
  localparam int NW = 57, DW = 48;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [NW-1:0] num, quot, expq;
  logic [DW-1:0] den;

  serial_divider #(.N_W(NW), .D_W(DW)) dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .quot);

  task automatic div1(input logic [NW-1:0] n, input logic [DW-1:0] d);
    int cyc = 0;
    @(negedge clk);
    num = n; den = d; start = 1;
    expq = (d == 0) ? '1 : n / NW'(d);
    @(negedge clk);
    start = 0; num = '1; den = '1;
    do begin
      cyc++;
      @(posedge clk); #1;
    end while (!done && cyc < 200);
    checks += 2;
    if (quot !== expq) begin
      failures++; $display("FAIL %0d / %0d = %0d exp %0d", n, d, quot, expq);
    end
    if (cyc != NW) begin
      failures++; $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; num = 0; den = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    div1(57'd100, 48'd7);
    div1('1, 48'd1);
    div1('1, '1);
    div1(57'd5, 48'd0);
    div1(57'd3, 48'd4);
    for (int i = 0; i < 300; i++) begin
      logic [NW-1:0] n = {$urandom, $urandom};
      logic [DW-1:0] d = {$urandom, $urandom} >> $urandom_range(0, 47);
      div1(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
