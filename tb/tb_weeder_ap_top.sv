// tb_weeder_ap_top: end-to-end run of the matcher and post-processing.
// Two passes with different candidate sets (symbol replacement).  Each pass
// loads the candidates, the sequence lengths and ranges and f(p,b), streams
// random DNA sequences joined by '#' separators (some sequences carry
// planted near-copies of candidates, some consist of G only and report on
// every symbol, some are kept apart so that they have no report at all), waits for workdone and compares every score with a
// real-valued reference:
//   Score(p) = sum_i ln(Obs(p,i,b_i) / (f(p,b_i) * length(i)))
// where the reference finds the reports itself by Hamming distance on the
// stream.  It counts how often each mechanism happened and fails if one
// never did: stream stall on a full event RAM, event RAM wrap-around, the
// controller waiting for Score_calc (accumulation overlapping calculation),
// a sequence skipped for having no report, and a symbol-replacement pass.
module tb_weeder_ap_top;
  import weeder_pkg::*;
  localparam int NP = 8, K = 6, D = 1, R = 3, NEV = 16, MAXS = 64;
  localparam int NSEQ = 24, SEQ_LEN = 30, PASSES = 2;
  localparam int PA_W = $clog2(NP), SA_W = $clog2(MAXS), FA_W = $clog2(NP * (D + 1));

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pat_we, length_wena, freq_wena, start, sym_valid, stream_end, sym_ready;
  logic workdone, get_score, score_valid;
  logic [PA_W-1:0] pat_addr, score_addr;
  sym_t [K-1:0] pat_in;
  logic [SA_W-1:0] waddr_length;
  logic [15:0] lengthin;
  logic [63:0] lengthrangein;
  logic [FA_W-1:0] waddr_freq;
  logic [31:0] freqin;
  sym_t sym;
  logic signed [47:0] score;

  weeder_ap_top #(.NUM_PAT(NP), .K(K), .D(D), .NUM_EV(NEV), .MAX_SEQ(MAXS)) dut (
    .clk, .rst_n, .pat_we, .pat_addr, .pat_in, .length_wena, .waddr_length, .lengthin,
    .lengthrangein, .freq_wena, .waddr_freq, .freqin, .start, .sym_valid, .sym,
    .stream_end, .sym_ready, .workdone, .get_score, .score_addr, .score, .score_valid);

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_wrap = 0, n_wait = 0, n_skip = 0, n_replace = 0, n_events = 0;
  logic rf_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (sym_valid && !sym_ready) n_stall++;
    if (dut.ev_valid) n_events++;
    if (dut.ev_valid && dut.ev_waddr == NEV - 1) n_wrap++;
    if (dut.u_post.write_ena && !rf_q) n_wait++;
    rf_q <= dut.u_post.read_finish;
  end

  // ---------------- stimulus and reference ----------------
  sym_t pats [NP][K];
  sym_t stream[$];
  int   seq_end [NSEQ];          // exclusive end offset (separator included)
  real  freq [NP][D+1];
  logic [31:0] freq_fx [NP][D+1];

  function automatic sym_t base(int v);
    case (v & 3)
      0: return "A";
      1: return "C";
      2: return "G";
      default: return "T";
    endcase
  endfunction

  task automatic make_pass();
    int quiet;
    stream.delete();
    for (int p = 0; p < NP; p++)
      for (int c = 0; c < K; c++) pats[p][c] = base($urandom);
    for (int i = 0; i < NSEQ; i++) begin
      quiet = (i % 5 == 3);
      for (int j = 0; j < SEQ_LEN; j++) begin
        // "quiet" sequences use only A/C, candidates below always contain G or T
        // "dense" sequences (all G) match candidate 0 = GGGGTG at every position
        if (i % 5 == 1) stream.push_back("G");
        else stream.push_back(quiet ? base($urandom_range(0, 1)) : base($urandom));
      end
      if (!quiet && i % 5 != 1) begin
        // plant near-copies of candidates
        for (int n = 0; n < 6; n++) begin
          int p = $urandom_range(0, NP - 1);
          int at = stream.size() - SEQ_LEN + $urandom_range(0, SEQ_LEN - K);
          for (int c = 0; c < K; c++) stream[at + c] = pats[p][c];
          if ($urandom_range(0, 1) == 1) stream[at + $urandom_range(0, K - 1)] = base($urandom);
        end
      end
      stream.push_back("#");
      seq_end[i] = stream.size();
    end
    // candidates always hold a G and a T so that quiet sequences stay quiet
    for (int p = 0; p < NP; p++) begin
      pats[p][1] = "G";
      pats[p][4] = "T";
    end
    for (int c = 0; c < K; c++) pats[0][c] = (c == 4) ? "T" : "G";
    for (int p = 0; p < NP; p++)
      for (int b = 0; b <= D; b++) begin
        freq_fx[p][b] = 32'($urandom_range(4000000, 200000000));
        freq[p][b] = real'(freq_fx[p][b]) / 4294967296.0;
      end
  endtask

  // reference scores from the stream
  task automatic reference(output real sc [NP], output real tol [NP]);
    for (int p = 0; p < NP; p++) begin sc[p] = 0.0; tol[p] = 0.0; end
    for (int i = 0; i < NSEQ; i++) begin
      int lo = (i == 0) ? 0 : seq_end[i-1];
      for (int p = 0; p < NP; p++) begin
        int cnt [D+1];
        for (int m = 0; m <= D; m++) cnt[m] = 0;
        for (int e = lo; e < seq_end[i]; e++) begin
          int hd = 0;
          if (e < K - 1) continue;
          for (int c = 0; c < K; c++) if (stream[e - K + 1 + c] != pats[p][c]) hd++;
          if (hd <= D) cnt[hd]++;
        end
        for (int m = 0; m <= D; m++) if (cnt[m] > 0) begin
          real ratio = cnt[m] / (freq[p][m] * SEQ_LEN);
          sc[p] += $ln(ratio);
          tol[p] += 1.0/4096 + 4.0/65536/ratio;
          break;
        end
      end
    end
  endtask

  task automatic run_pass(input int pass);
    real sc [NP], tol [NP];
    int t;
    make_pass();
    // symbol replacement: write the new candidates
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      pat_we = 1; pat_addr = PA_W'(p);
      for (int c = 0; c < K; c++) pat_in[c] = pats[p][c];
    end
    @(negedge clk); pat_we = 0;
    if (pass > 0) n_replace++;
    for (int i = 0; i < NSEQ; i++) begin
      @(negedge clk);
      length_wena = 1; waddr_length = SA_W'(i); lengthin = 16'(SEQ_LEN);
      lengthrangein = 64'(seq_end[i]);
    end
    for (int a = 0; a < NP * (D + 1); a++) begin
      @(negedge clk);
      length_wena = 0;
      freq_wena = 1; waddr_freq = FA_W'(a); freqin = freq_fx[a / (D + 1)][a % (D + 1)];
    end
    @(negedge clk); freq_wena = 0;
    start = 1;
    @(negedge clk); start = 0;
    t = 0;
    while (t < stream.size()) begin
      sym_valid = 1; sym = stream[t]; stream_end = (t == stream.size() - 1);
      @(posedge clk);
      if (sym_ready) t++;
      @(negedge clk);
    end
    sym_valid = 0; stream_end = 0;
    while (!workdone) @(negedge clk);
    reference(sc, tol);
    for (int p = 0; p < NP; p++) begin
      real got;
      @(negedge clk); get_score = 1; score_addr = PA_W'(p);
      @(negedge clk); get_score = 0;
      got = real'(score) / 65536.0;
      checks += 2;
      if (!score_valid) failures++;
      if (got - sc[p] > tol[p] || sc[p] - got > tol[p]) begin
        failures++; $display("FAIL pass %0d score[%0d] = %f expected %f", pass, p, got, sc[p]);
      end
    end
  endtask

  // sequences with no report: counted from the controller's skips
  always @(posedge clk) if (rst_n && dut.u_post.u_ctrl.st == 3'd2 && !dut.u_post.calc_ena
                            && !dut.u_post.u_ctrl.has_ev) n_skip++;

  initial begin
    #50000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pat_we = 0; length_wena = 0; freq_wena = 0; start = 0; sym_valid = 0; stream_end = 0;
    get_score = 0; pat_addr = 0; score_addr = 0; pat_in = '0; waddr_length = 0; lengthin = 0;
    lengthrangein = 0; waddr_freq = 0; freqin = 0; sym = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < PASSES; pass++) run_pass(pass);
    $display("events=%0d stalls=%0d wraps=%0d waits=%0d skips=%0d replacements=%0d",
             n_events, n_stall, n_wrap, n_wait, n_skip, n_replace);
    checks += 5;
    if (n_stall == 0)   begin failures++; $display("FAIL no stall"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL no wrap-around"); end
    if (n_wait == 0)    begin failures++; $display("FAIL never waited for Score_calc"); end
    if (n_skip == 0)    begin failures++; $display("FAIL no sequence without reports"); end
    if (n_replace == 0) begin failures++; $display("FAIL no replacement"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
