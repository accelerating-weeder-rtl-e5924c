// tb_event_ram: writes random event lines (with wena/ram_ena gating),
// reads them back in random order and checks the one-cycle read latency,
// that a blocked write leaves the line unchanged and that the output holds
// between reads.
module tb_event_ram;
  localparam int DEPTH = 40, NP = 30, G = 3, OW = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ram_ena, wena, re;
  logic [5:0] waddr, raddr;
  logic [G-1:0] vin [NP];
  logic [G-1:0] vout [NP];
  logic [OW-1:0] oin, oout;
  logic [G-1:0] mv [DEPTH][NP];
  logic [OW-1:0] mo [DEPTH];

  event_ram #(.DEPTH(DEPTH), .NUM_PAT(NP), .GRP_W(G), .OFF_W(OW)) dut (
    .clk, .ram_ena, .wena, .waddr, .vector_in(vin), .offset_in(oin),
    .re, .raddr, .vector_out(vout), .offset_out(oout));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ram_ena = 0; wena = 0; re = 0; waddr = 0; raddr = 0; oin = 0;
    foreach (vin[p]) vin[p] = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      waddr = 6'(a); foreach (vin[p]) vin[p] = G'($urandom); oin = {$urandom, $urandom};
      ram_ena = 1; wena = 1; mv[a] = vin; mo[a] = oin;
    end
    // blocked writes
    @(negedge clk);
    waddr = 3; foreach (vin[p]) vin[p] = '1; oin = '1; ram_ena = 0; wena = 1;
    @(negedge clk);
    ram_ena = 1; wena = 0;
    @(negedge clk);
    ram_ena = 0; wena = 0;
    // both blocked writes must have left line 3 alone
    raddr = 3; re = 1;
    @(posedge clk); #1;
    checks++;
    if (vout !== mv[3] || oout !== mo[3]) begin
      failures++; $display("FAIL blocked write changed line 3");
    end
    @(negedge clk);
    re = 0;
    for (int i = 0; i < 200; i++) begin
      int a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      raddr = 6'(a); re = 1;
      // overwrite a different line in the same cycle
      if (i % 3 == 0) begin
        int b = (a + 1) % DEPTH;
        waddr = 6'(b); foreach (vin[p]) vin[p] = G'($urandom); oin = {$urandom, $urandom};
        ram_ena = 1; wena = 1; mv[b] = vin; mo[b] = oin;
      end else begin
        ram_ena = 0; wena = 0;
      end
      @(posedge clk); #1;
      checks++;
      if (vout !== mv[a] || oout !== mo[a]) begin
        failures++; $display("FAIL read %0d", a);
      end
      @(negedge clk);
      re = 0; ram_ena = 0; wena = 0; raddr = 6'((a + 5) % DEPTH);
      @(posedge clk); #1;
      checks++;
      if (vout !== mv[a] || oout !== mo[a]) begin
        failures++; $display("FAIL hold %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
