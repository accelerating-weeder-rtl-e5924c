// tb_ap_pattern_matcher: loads 6 candidate 6-mers (1 substitution) through
// symbol replacement, streams random DNA with separators and checks each
// event (offset and full output vector) and the absence of events against a
// Hamming-distance reference, then replaces the candidates and repeats.
module tb_ap_pattern_matcher;
  import weeder_pkg::*;
  localparam int NP = 6, K = 6, D = 1, R = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, events = 0;

  logic pat_we, stream_start, sym_valid, stream_end;
  logic [2:0] pat_addr;
  sym_t [K-1:0] pat_in;
  sym_t sym;
  logic ev_valid, ev_end;
  logic [63:0] ev_offset;
  logic [R-1:0] ev_vector [NP];
  logic [NP*R-1:0] ev_flat;
  always_comb for (int p = 0; p < NP; p++) ev_flat[p*R +: R] = ev_vector[p];

  ap_pattern_matcher #(.NUM_PAT(NP), .K(K), .D(D), .OFF_W(64)) dut (
    .clk, .rst_n, .pat_we, .pat_addr, .pat_in, .stream_start, .sym_valid, .sym,
    .stream_end, .ev_valid, .ev_offset, .ev_vector, .ev_end);

  sym_t pats [NP][K];
  sym_t hist[$];

  function automatic sym_t rs();
    case ($urandom_range(0, 8))
      0, 1: return "A";
      2, 3: return "C";
      4, 5: return "G";
      6, 7: return "T";
      default: return "#";
    endcase
  endfunction

  function automatic logic [NP*R-1:0] expect_vec();
    logic [NP*R-1:0] v = '0;
    if (hist.size() < K) return v;
    for (int p = 0; p < NP; p++) begin
      int hd = 0;
      for (int c = 0; c < K; c++) if (hist[hist.size() - K + c] != pats[p][c]) hd++;
      if (hd == 0) v[p*R] = 1'b1;
      else if (hd == 1) v[p*R + ((hist[hist.size()-1] != pats[p][K-1]) ? 1 : 2)] = 1'b1;
    end
    return v;
  endfunction

  task automatic load_all();
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      for (int c = 0; c < K; c++) begin
        pats[p][c] = rs();
        if (pats[p][c] == "#") pats[p][c] = "C";
        pat_in[c] = pats[p][c];
      end
      pat_addr = 3'(p);
      pat_we = 1'b1;
    end
    @(negedge clk);
    pat_we = 1'b0;
  endtask

  task automatic pass(input int n);
    logic [NP*R-1:0] ev;
    longint pos = 0;
    @(negedge clk);
    stream_start = 1'b1;
    @(negedge clk);
    stream_start = 1'b0;
    hist.delete();
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      sym_valid = ($urandom_range(0, 5) != 0);
      sym = rs();
      if (sym_valid && $urandom_range(0, 3) == 0) sym = pats[$urandom_range(0, NP-1)][K-1];
      stream_end = sym_valid && (t == n - 1);
      if (t == n - 1) sym_valid = 1'b1;
      stream_end = (t == n - 1);
      @(posedge clk);
      if (sym_valid) hist.push_back(sym);
      #1;
      if (sym_valid) begin
        ev = expect_vec();
        checks++;
        if (ev_valid !== (|ev) || (ev_valid && (ev_flat !== ev || ev_offset !== 64'(pos)))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d valid=%b off=%0d/%0d vec=%h exp=%h",
                                      t, ev_valid, ev_offset, pos, ev_flat, ev);
        end
        if (ev_valid) events++;
        checks++;
        if (ev_end !== (t == n - 1)) failures++;
        pos++;
      end else begin
        checks++;
        if (ev_valid !== 1'b0) failures++;
      end
    end
    @(negedge clk);
    sym_valid = 1'b0;
    stream_end = 1'b0;
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pat_we = 0; stream_start = 0; sym_valid = 0; stream_end = 0; pat_addr = 0; pat_in = '0; sym = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      load_all();
      pass(2000);
    end
    checks++;
    if (events < 50) failures++;
    $display("events=%0d", events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
