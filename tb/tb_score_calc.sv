// tb_score_calc: acts as central controller and buffer pool for Score_calc
// with 6 patterns and 2 substitutions (5 report rows).  For a series of
// sequences it presents random report counts and lengths, issues read_ena,
// and checks: the copy hand-shake (read_finish), the fixed lane latency,
// every pattern's accumulated score against a real-valued evaluation of
// sum ln(Obs / (f * length)), the score clear, and work_done after finish.
module tb_score_calc;
  import weeder_pkg::*;
  localparam int NP = 6, D = 2, R = 5;
  localparam int LANE_BUSY = 81;  // MUL 1, DIV start 1 + 57 + 1, Ln 1 + 18 + 1, Acc 1

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, read_ena, bp_read, read_finish, finish, work_done, calc_busy, get_score, score_valid;
  logic [15:0] len_in;
  logic [7:0] bp_data [NP][R];
  logic [31:0] freq_all [NP][D+1];
  logic [2:0] score_addr;
  logic signed [47:0] score;

  score_calc #(.NUM_PAT(NP), .D(D), .CNT_W(8), .LEN_W(16), .FREQ_W(32), .SCORE_W(48)) dut (
    .clk, .rst_n, .clear, .read_ena, .len_in, .bp_data, .bp_read, .read_finish, .freq_all,
    .finish, .work_done, .calc_busy, .get_score, .score_addr, .score, .score_valid);

  real model [NP];
  real tol [NP];
  int busy_cycles, runs;

  always @(posedge clk) if (calc_busy) busy_cycles++;

  task automatic one_seq(input bit check_latency);
    int len;
    @(negedge clk);
    while (!read_finish) @(negedge clk);
    len = $urandom_range(20, 200);
    foreach (bp_data[p, r]) bp_data[p][r] = ($urandom_range(0, 2) == 0) ? 8'($urandom_range(1, 9)) : 8'd0;
    // model, computed from the counts before they are handed over
    for (int p = 0; p < NP; p++) begin
      for (int m = 0; m <= D; m++) begin
        int obs = (m == 0) ? bp_data[p][0] : bp_data[p][2*m-1] + bp_data[p][2*m];
        if (obs > 0) begin
          real e = real'(freq_all[p][m]) / 4294967296.0 * len;
          real ratio = obs / e;
          model[p] += $ln(ratio);
          tol[p] += 1.0/4096 + 4.0/65536/ratio;
          break;
        end
      end
    end
    len_in = 16'(len);
    read_ena = 1;
    @(negedge clk);
    read_ena = 0;
    checks++;
    if (read_finish) begin failures++; $display("FAIL read_finish stays high"); end
    busy_cycles = 0;
    while (!read_finish) @(negedge clk);
    // scramble the pool: Score_calc must have copied it
    foreach (bp_data[p, r]) bp_data[p][r] = 8'($urandom);
    if (check_latency) begin
      while (calc_busy) @(negedge clk);
      checks++;
      if (busy_cycles != LANE_BUSY) begin
        failures++; $display("FAIL lane busy %0d cycles, expected %0d", busy_cycles, LANE_BUSY);
      end
    end
    runs++;
  endtask

  task automatic check_scores();
    for (int p = 0; p < NP; p++) begin
      real got;
      @(negedge clk);
      get_score = 1; score_addr = 3'(p);
      @(negedge clk);
      get_score = 0;
      got = real'(score) / 65536.0;
      checks += 2;
      if (!score_valid) failures++;
      if (got - model[p] > tol[p] || model[p] - got > tol[p]) begin
        failures++; $display("FAIL score[%0d] = %f expected %f (tol %f)", p, got, model[p], tol[p]);
      end
    end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; read_ena = 0; finish = 0; get_score = 0; score_addr = 0; len_in = 0;
    foreach (bp_data[p, r]) bp_data[p][r] = 0;
    foreach (freq_all[p, b]) freq_all[p][b] = 32'($urandom_range(2000000, 400000000));
    foreach (model[p]) begin model[p] = 0.0; tol[p] = 0.0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    one_seq(1);
    one_seq(1);
    // back-to-back requests: the second waits for the lanes
    for (int i = 0; i < 20; i++) one_seq(0);
    checks++;
    if (work_done) begin failures++; $display("FAIL work_done before finish"); end
    @(negedge clk);
    finish = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (work_done) begin failures++; $display("FAIL work_done while busy"); end
    while (!work_done) @(negedge clk);
    check_scores();
    // clear restarts the scores
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    foreach (model[p]) begin model[p] = 0.0; tol[p] = 1.0/65536; end
    finish = 0;
    one_seq(0);
    finish = 1;
    while (!work_done) @(negedge clk);
    check_scores();
    $display("sequences=%0d", runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
