// tb_accumulator: feeds random output-vector lines with random calc_ena,
// pushes the counts out with write_ena at random points and compares every
// counter with a software count; also drives one counter into saturation.
module tb_accumulator;
  localparam int NP = 8, G = 3, VW = NP * G;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic calc_ena, write_ena;
  logic [VW-1:0] vec;
  logic [G-1:0] vec_a [NP];
  logic [7:0] cnt [NP][G];
  always_comb for (int p = 0; p < NP; p++) vec_a[p] = vec[p*G +: G];
  int model [VW];

  accumulator #(.NUM_PAT(NP), .GRP_W(G), .CNT_W(8)) dut (.clk, .rst_n, .calc_ena, .vector(vec_a), .write_ena, .cnt);

  task automatic compare();
    for (int j = 0; j < VW; j++) begin
      checks++;
      if (cnt[j / G][j % G] !== 8'(model[j])) begin
        failures++;
        if (failures < 10) $display("FAIL j=%0d got %0d exp %0d", j, cnt[j / G][j % G], model[j]);
      end
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    calc_ena = 0; write_ena = 0; vec = 0;
    foreach (model[j]) model[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      calc_ena = ($urandom_range(0, 3) != 0);
      vec = VW'({$urandom, $urandom});
      write_ena = ($urandom_range(0, 30) == 0);
      #1;
      if (write_ena) compare();            // the value handed to the pool
      @(posedge clk);
      if (write_ena) foreach (model[j]) model[j] = 0;
      if (calc_ena) for (int j = 0; j < VW; j++) if (vec[j] && model[j] < 255) model[j]++;
      #1;
      compare();
    end
    // saturation: 300 lines with bit 0 set
    @(negedge clk);
    write_ena = 1; calc_ena = 0;
    @(negedge clk);
    write_ena = 0;
    foreach (model[j]) model[j] = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk); calc_ena = 1; vec = VW'(1);
    end
    @(negedge clk); calc_ena = 0;
    model[0] = 255;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
