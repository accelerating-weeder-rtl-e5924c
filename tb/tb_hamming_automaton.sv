// tb_hamming_automaton: drives random DNA streams (with separators) into two
// automata, the 6-mer ACGTAT with 1 substitution and a random 8-mer with 2
// substitutions, and compares every report row with a Hamming-distance
// reference computed on the stream history.  Also checks symbol replacement
// and clearing.
module tb_hamming_automaton;
  import weeder_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, pat_we, sym_valid;
  sym_t sym;
  sym_t [5:0] pat6;
  sym_t [7:0] pat8;
  logic [2:0] rep6;
  logic [4:0] rep8;

  hamming_automaton #(.K(6), .D(1)) dut6 (
    .clk, .rst_n, .clear, .pat_we, .pat_in(pat6), .sym_valid, .sym, .report(rep6));
  hamming_automaton #(.K(8), .D(2)) dut8 (
    .clk, .rst_n, .clear, .pat_we, .pat_in(pat8), .sym_valid, .sym, .report(rep8));

  sym_t hist[$];

  function automatic sym_t rand_sym();
    case ($urandom_range(0, 9))
      0, 1: return "A";
      2, 3: return "C";
      4, 5: return "G";
      6, 7: return "T";
      default: return (($urandom_range(0, 3) == 0) ? "#" : "A");
    endcase
  endfunction

  // expected report rows for the window ending at the newest symbol
  function automatic logic [4:0] expect_rep(int k, int d, sym_t p[]);
    logic [4:0] e = '0;
    int hd = 0;
    if (hist.size() < k) return e;
    for (int c = 0; c < k; c++)
      if (hist[hist.size() - k + c] != p[c]) hd++;
    if (hd <= d) begin
      if (hd == 0) e[0] = 1'b1;
      else if (hist[hist.size() - 1] != p[k - 1]) e[2 * hd - 1] = 1'b1;
      else e[2 * hd] = 1'b1;
    end
    return e;
  endfunction

  sym_t p6[] = new[6];
  sym_t p8[] = new[8];
  int hits6 = 0, hits8 = 0, hits8_row [5];

  task automatic load(input bit random_pats);
    @(negedge clk);
    for (int c = 0; c < 6; c++) begin
      p6[c] = random_pats ? rand_sym() : sym_t'("ACGTAT" >> (8 * (5 - c)));
      pat6[c] = p6[c];
    end
    for (int c = 0; c < 8; c++) begin
      p8[c] = (c < 6) ? p6[c] : rand_sym();
      if (p8[c] == "#") p8[c] = "G";
      pat8[c] = p8[c];
    end
    pat_we = 1'b1;
    @(negedge clk);
    pat_we = 1'b0;
    hist.delete();
  endtask

  task automatic run(input int n);
    logic [4:0] e6, e8;
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      // every 4th symbol: copy the pattern with 0..2 substitutions
      sym = rand_sym();
      if (hist.size() >= 7 && $urandom_range(0, 2) == 0) sym = p8[$urandom_range(0, 7)];
      sym_valid = ($urandom_range(0, 7) != 0);
      @(posedge clk);
      if (sym_valid) hist.push_back(sym);
      #1;
      if (sym_valid) begin
        e6 = expect_rep(6, 1, p6);
        e8 = expect_rep(8, 2, p8);
        checks += 2;
        if (rep6 !== e6[2:0]) begin
          failures++;
          if (failures < 10) $display("FAIL k6 t=%0d rep=%b exp=%b", t, rep6, e6[2:0]);
        end
        if (rep8 !== e8) begin
          failures++;
          if (failures < 10) $display("FAIL k8 t=%0d rep=%b exp=%b", t, rep8, e8);
        end
        if (|e6) hits6++;
        for (int r = 0; r < 5; r++) if (e8[r]) hits8_row[r]++;
      end
    end
    @(negedge clk);
    sym_valid = 1'b0;
  endtask

  // pattern-planted stream: with the fixed ACGTAT pattern
  task automatic plant(input string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk);
      sym = s[i];
      sym_valid = 1'b1;
      @(posedge clk);
      hist.push_back(sym);
      #1;
      checks++;
      if (rep6 !== expect_rep(6, 1, p6)) begin
        failures++;
        $display("FAIL plant %s i=%0d rep=%b", s, i, rep6);
      end
    end
    @(negedge clk);
    sym_valid = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; pat_we = 1'b0; sym_valid = 1'b0; sym = '0; pat6 = '0; pat8 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (ste_count(6, 1) != 17 || ste_count(10, 3) != 61) failures++;
    load(1'b0);
    // the document's example: exact match and one substitution in each place
    plant("ACGTAT#ACGTAA#TCGTAT#ACCTAT#ACGTTT#AAGTATT");
    checks++;
    if (rep6 !== 3'b000 && rep6 !== 3'b100 && rep6 !== 3'b010 && rep6 !== 3'b001) failures++;
    run(1500);
    // clear drops every partial window
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    hist.delete();
    checks++;
    if (rep6 !== '0 || rep8 !== '0) failures++;
    // symbol replacement with random candidates
    for (int i = 0; i < 4; i++) begin
      load(1'b1);
      run(1000);
    end
    checks++;
    if (hits6 == 0 || hits8_row[0] == 0 || hits8_row[1] == 0 || hits8_row[2] == 0 ||
        hits8_row[3] == 0 || hits8_row[4] == 0) begin
      failures++;
      $display("FAIL coverage %0d %p", hits6, hits8_row);
    end
    $display("reports: k6=%0d k8 rows=%p", hits6, hits8_row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
