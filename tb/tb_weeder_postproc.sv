// tb_weeder_postproc: drives the post-processing circuit through its own
// pins, as the host would: sequence lengths and ranges, frequencies, start,
// then random event lines (offset + output vector, 5 patterns x 5 report
// rows for 2 substitutions) written at circular addresses whenever ev_free
// allows, finish, workdone, and score read-out.  Scores are compared with a
// real-valued reference computed from the same event lines; two passes
// check that start clears the scores and rewinds the event addresses.
module tb_weeder_postproc;
  import weeder_pkg::*;
  localparam int NP = 5, D = 2, R = 5, NEV = 8, MAXS = 32, NSEQ = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, finish, ram_ena, wena, length_wena, freq_wena, workdone, get_score, score_valid;
  logic [2:0] waddr, score_addr;
  logic [R-1:0] vectorin [NP];
  logic [63:0] offsetin, lengthrangein;
  logic [3:0] ev_free;
  logic [4:0] waddr_length;
  logic [15:0] lengthin;
  logic [3:0] waddr_freq;
  logic [31:0] freqin;
  logic signed [47:0] score;

  weeder_postproc #(.NUM_PAT(NP), .D(D), .NUM_EV(NEV), .MAX_SEQ(MAXS)) dut (
    .clk, .rst_n, .start, .finish, .ram_ena, .wena, .waddr, .vectorin, .offsetin, .ev_free,
    .length_wena, .waddr_length, .lengthin, .lengthrangein, .freq_wena, .waddr_freq, .freqin,
    .workdone, .get_score, .score_addr, .score, .score_valid);

  int  lens [NSEQ];
  longint ends [NSEQ];
  logic [31:0] ffx [NP][D+1];
  int  cnt [NSEQ][NP][R];

  task automatic run_pass(input int pass);
    longint base = 0;
    int wp = 0;
    real sc [NP], tol [NP];
    foreach (cnt[i, p, r]) cnt[i][p][r] = 0;
    for (int i = 0; i < NSEQ; i++) begin
      lens[i] = $urandom_range(20, 80);
      base += lens[i] + 1;
      ends[i] = base;
      @(negedge clk);
      length_wena = 1; waddr_length = 5'(i); lengthin = 16'(lens[i]); lengthrangein = 64'(ends[i]);
    end
    @(negedge clk); length_wena = 0;
    for (int a = 0; a < NP * (D + 1); a++) begin
      @(negedge clk);
      ffx[a / (D + 1)][a % (D + 1)] = 32'($urandom_range(4000000, 300000000));
      freq_wena = 1; waddr_freq = 4'(a); freqin = ffx[a / (D + 1)][a % (D + 1)];
    end
    @(negedge clk); freq_wena = 0;
    start = 1;
    @(negedge clk); start = 0;
    // event lines, in offset order; sequence 3 of every 4 gets none
    for (int i = 0; i < NSEQ; i++) begin
      longint lo = (i == 0) ? 0 : ends[i-1];
      if (i % 4 == 3) continue;
      for (longint o = lo; o < ends[i]; o += $urandom_range(1, 9)) begin
        while (ev_free == 0) @(negedge clk);
        foreach (vectorin[p]) begin
          vectorin[p] = '0;
          if ($urandom_range(0, 2) == 0) vectorin[p][$urandom_range(0, R - 1)] = 1'b1;
        end
        vectorin[0][0] = 1'b1;    // every line has a report
        foreach (vectorin[p, r]) if (vectorin[p][r]) cnt[i][p][r]++;
        offsetin = 64'(o);
        waddr = 3'(wp);
        wp = (wp + 1) % NEV;
        ram_ena = 1;
        wena = ($urandom_range(0, 3) != 0);
        while (!wena) begin        // a held-back write does not count
          @(negedge clk);
          wena = 1;
        end
        @(negedge clk);
        wena = 0; ram_ena = ($urandom_range(0, 1) == 1);
      end
    end
    finish = 1;
    while (!workdone) @(negedge clk);
    finish = 0;
    // reference
    foreach (sc[p]) begin sc[p] = 0.0; tol[p] = 1.0/65536; end
    for (int i = 0; i < NSEQ; i++)
      for (int p = 0; p < NP; p++)
        for (int m = 0; m <= D; m++) begin
          int obs = (m == 0) ? cnt[i][p][0] : cnt[i][p][2*m-1] + cnt[i][p][2*m];
          if (obs > 0) begin
            real ratio = obs / (real'(ffx[p][m]) / 4294967296.0 * lens[i]);
            sc[p] += $ln(ratio);
            tol[p] += 1.0/4096 + 4.0/65536/ratio;
            break;
          end
        end
    for (int p = 0; p < NP; p++) begin
      real got;
      @(negedge clk); get_score = 1; score_addr = 3'(p);
      @(negedge clk); get_score = 0;
      got = real'(score) / 65536.0;
      checks += 2;
      if (!score_valid) failures++;
      if (got - sc[p] > tol[p] || sc[p] - got > tol[p]) begin
        failures++; $display("FAIL pass %0d score[%0d] = %f expected %f", pass, p, got, sc[p]);
      end
    end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; finish = 0; ram_ena = 0; wena = 0; length_wena = 0; freq_wena = 0; get_score = 0;
    waddr = 0; score_addr = 0; offsetin = 0; lengthrangein = 0; waddr_length = 0; lengthin = 0;
    waddr_freq = 0; freqin = 0;
    foreach (vectorin[p]) vectorin[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_pass(0);
    run_pass(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
