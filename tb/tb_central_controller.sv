// tb_central_controller: plays event RAM, sequence tables and Score_calc
// around the controller.  Random sorted event offsets are written in bursts
// (some before start, some while it runs) over sequences of random length,
// some without events.  Checks: for every sequence with events one
// write_ena/read_ena with the right length and exactly its number of
// calc_ena cycles, in order; no hand-over while read_finish is low; one
// line per cycle when lines are pending; ev_free; calc_finish at the end.
module tb_central_controller;
  localparam int DEPTH = 16, NSEQ = 40;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, finish, ev_write, ev_re, calc_ena, write_ena, read_ena, read_finish, calc_finish;
  logic [4:0] ev_free;
  logic [3:0] ev_raddr;
  logic [63:0] ev_offset, seq_range;
  logic [5:0] seq_idx;
  logic [15:0] seq_len, calc_len;

  central_controller #(.DEPTH(DEPTH), .MAX_SEQ(64), .LEN_W(16), .OFF_W(64)) dut (
    .clk, .rst_n, .start, .finish, .ev_write, .ev_free, .ev_re, .ev_raddr, .ev_offset,
    .seq_idx, .seq_range, .seq_len, .calc_ena, .write_ena, .read_ena, .calc_len,
    .read_finish, .calc_finish);

  // event RAM model, sequence tables
  logic [63:0] ram [DEPTH];
  logic [63:0] rng [64];
  logic [15:0] lens [64];
  always_ff @(posedge clk) if (ev_re) ev_offset <= ram[ev_raddr];
  assign seq_range = rng[seq_idx];
  assign seq_len   = lens[seq_idx];

  // Score_calc model: busy for a random time after each read_ena
  int sc_busy = 0;
  always_ff @(posedge clk) begin
    if (read_ena) sc_busy <= $urandom_range(1, 30);
    else if (sc_busy > 0) sc_busy <= sc_busy - 1;
  end
  assign read_finish = (sc_busy == 0);

  longint offs[$];
  int exp_cnt [64];
  int exp_seq[$];
  int cur_s;
  logic rf_q = 1'b1;
  int got_cnt = 0, hands = 0, stalls_seen = 0, back_to_back = 0, pending_tb = 0;

  always @(posedge clk) if (rst_n) begin
    if (calc_ena) got_cnt++;
    if (write_ena && !read_finish) begin failures++; $display("FAIL hand-over while busy"); end
    if (read_ena) begin
      checks++;
      if (exp_seq.size() == 0) begin failures++; $display("FAIL extra hand-over"); end
      else begin
        cur_s = exp_seq.pop_front();
        if (calc_len !== lens[cur_s] || got_cnt != exp_cnt[cur_s]) begin
          failures++; $display("FAIL seq %0d len %0d/%0d cnt %0d/%0d", cur_s, calc_len, lens[cur_s], got_cnt, exp_cnt[cur_s]);
        end
      end
      got_cnt = calc_ena ? 1 : 0;
      hands++;
    end
    if (calc_ena && ev_re) back_to_back++;
    if (write_ena && !rf_q) stalls_seen++;   // hand-over right after Score_calc freed up
    rf_q <= read_finish;
  end

  int wr_ptr = 0, written = 0;
  task automatic write_events(input int n);
    for (int i = 0; i < n && written < offs.size(); i++) begin
      @(negedge clk);
      while (ev_free == 0) begin ev_write = 0; @(negedge clk); end
      ram[wr_ptr] = offs[written];
      wr_ptr = (wr_ptr + 1) % DEPTH;
      written++;
      ev_write = 1;
      @(negedge clk);
      ev_write = 0;
    end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint base, o;
    int n;
    base = 0;
    start = 0; finish = 0; ev_write = 0;
    foreach (exp_cnt[s]) exp_cnt[s] = 0;
    for (int s = 0; s < 64; s++) begin
      lens[s] = 16'($urandom_range(10, 60));
      rng[s] = base + 64'(lens[s]) + 1;
      if (s < NSEQ && $urandom_range(0, 3) != 0) begin
        n = $urandom_range(1, 12);
        o = base;
        for (int j = 0; j < n; j++) begin
          o += 64'($urandom_range(0, 3));
          if (o >= rng[s]) break;
          offs.push_back(o);
          exp_cnt[s]++;
        end
        if (exp_cnt[s] > 0) exp_seq.push_back(s);
      end
      base = rng[s];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (ev_free != 5'(DEPTH)) failures++;
    write_events(10);
    checks++;
    if (ev_free != 5'(DEPTH - 10)) begin failures++; $display("FAIL ev_free %0d", ev_free); end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (written < offs.size()) write_events($urandom_range(1, 20));
    @(negedge clk); finish = 1;
    while (!calc_finish) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 4;
    if (exp_seq.size() != 0) begin failures++; $display("FAIL %0d sequences never handed over", exp_seq.size()); end
    if (ev_free != 5'(DEPTH)) failures++;
    if (stalls_seen == 0) begin failures++; $display("FAIL no wait on read_finish"); end
    if (back_to_back == 0) begin failures++; $display("FAIL never one line per cycle"); end
    $display("events=%0d handovers=%0d waits=%0d back_to_back=%0d", offs.size(), hands, stalls_seen, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
