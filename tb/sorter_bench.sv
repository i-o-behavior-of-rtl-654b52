// sorter_bench: stimulus and checker for a systolic_sorter of N processors
// and W-bit data, shared by the end-to-end testbenches.
//
// It holds the sorter in reset for a few ticks, then feeds NSETS sets of N
// numbers, x1 first, with first_in on x1 and last_in on xN. The gap between
// two sets is random: zero (back to back, a set entering while the one
// before is still unloading) or a few idle ticks. Set contents are drawn
// from several patterns: random, random from a tiny range (ties), already
// ascending, descending, and sets holding 0 and the largest W-bit value.
// Each set's ascending order is worked out here by insertion sort.
//
// Checked after every rising edge (outputs are read after the falling
// edge): the first result of a set comes exactly 2N ticks after its first
// element was taken and is marked by first_out; the set's N results follow
// on consecutive ticks in ascending order; last_out is last_in N ticks late.
// Each pattern and both kinds of gap are counted, and one that never
// happened counts as a failure. done rises when every set has come out.
module sorter_bench #(
  parameter int unsigned N     = 8,
  parameter int unsigned W     = 16,
  parameter int unsigned NSETS = 100
) (
  input  logic         clk,
  output logic         rst_n,
  output logic [W-1:0] din,
  output logic         first_in,
  output logic         last_in,
  input  logic [W-1:0] dout,
  input  logic         first_out,
  input  logic         last_out,
  output logic         done,
  output int           checks,
  output int           failures
);

  typedef logic [W-1:0] word_t;
  typedef word_t        set_t [N];

  typedef enum int {
    PAT_RANDOM, PAT_TIES, PAT_ASCENDING, PAT_DESCENDING, PAT_EXTREMES, PAT_COUNT
  } pattern_t;

  localparam int unsigned MAXGAP = 4;
  localparam int unsigned MAXT   = NSETS * (N + MAXGAP) + 3 * N + 16;

  set_t expected_sets [NSETS];
  int   start_edge    [NSETS];
  logic last_hist     [MAXT];

  int n_pattern [PAT_COUNT];
  int n_b2b, n_gap;
  bit gap_was_zero;   // the set just fed is followed by no idle tick

  task automatic check(input logic cond, input string what, input int e);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL edge %0d: %s", e, what);
    end
  endtask

  function automatic set_t make_set(input pattern_t p);
    set_t s;
    word_t top_val;
    top_val = '1;
    for (int k = 0; k < int'(N); k++) begin
      case (p)
        PAT_TIES:       s[k] = word_t'($urandom_range(0, 2));
        PAT_ASCENDING:  s[k] = word_t'(k * 3 + 1);
        PAT_DESCENDING: s[k] = word_t'((N - k) * 5);
        PAT_EXTREMES:   s[k] = (k % 2 == 0) ? top_val : word_t'($urandom);
        default:        s[k] = word_t'($urandom);
      endcase
    end
    if (p == PAT_EXTREMES) s[N-1] = '0;
    return s;
  endfunction

  function automatic set_t sort_up(input set_t s);
    set_t r;
    r = s;
    for (int a = 1; a < int'(N); a++) begin
      word_t key;
      int b;
      key = r[a];
      b = a - 1;
      while (b >= 0 && r[b] > key) begin
        r[b+1] = r[b];
        b--;
      end
      r[b+1] = key;
    end
    return r;
  endfunction

  // Driver and monitor share one loop: after the falling edge that follows
  // rising edge e, read the outputs of edge e, then set the inputs of e+1.
  initial begin
    set_t cur_set;
    int   sets_in, pos, gap;
    int   sets_out, out_pos;
    bit   first_set;
    pattern_t p;
    word_t want;
    sets_in = 0; pos = N; gap = 1;
    sets_out = 0; out_pos = N;
    first_set = 1;
    gap_was_zero = 1'b0;
    checks = 0; failures = 0; done = 1'b0;
    n_b2b = 0; n_gap = 0;
    foreach (n_pattern[q]) n_pattern[q] = 0;
    rst_n = 1'b0; din = '0; first_in = 1'b0; last_in = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < int'(MAXT); e++) begin
      // Inputs sampled at edge e.
      if (pos == int'(N) && sets_in < int'(NSETS) && gap == 0) begin
        p = pattern_t'(sets_in % PAT_COUNT);
        if (sets_in % 7 == 3) p = pattern_t'($urandom_range(0, PAT_COUNT - 1));
        n_pattern[p]++;
        cur_set = make_set(p);
        expected_sets[sets_in] = sort_up(cur_set);
        start_edge[sets_in] = e;
        sets_in++;
        pos = 0;
        gap = ($urandom_range(0, 2) == 0) ? $urandom_range(1, MAXGAP) : 0;
        if (!first_set) begin
          if (gap_was_zero) n_b2b++;
          else              n_gap++;
        end
        first_set = 0;
      end
      if (pos < int'(N)) begin
        din      = cur_set[pos];
        first_in = (pos == 0);
        last_in  = (pos == int'(N) - 1);
        pos++;
        gap_was_zero = (pos == int'(N)) ? (gap == 0) : gap_was_zero;
      end else begin
        din      = word_t'($urandom);
        first_in = 1'b0;
        last_in  = 1'b0;
        if (gap > 0) gap--;
      end
      last_hist[e] = last_in;

      @(negedge clk);

      // Outputs of edge e.
      if (first_out) begin
        check(out_pos == int'(N), "a set ended before all its results came out", e);
        check(sets_out < int'(NSETS), "more sets came out than went in", e);
        if (sets_out < int'(NSETS)) begin
          check(e == start_edge[sets_out] + 2 * int'(N) - 1,
                $sformatf("set %0d: first result %0d ticks after its first input, expected %0d",
                          sets_out, e - start_edge[sets_out] + 1, 2 * N), e);
          out_pos = 0;
          sets_out++;
        end
      end
      if (out_pos < int'(N)) begin
        want = expected_sets[sets_out-1][out_pos];
        check(dout == want, $sformatf("set %0d result %0d: got %0d expected %0d",
                                      sets_out - 1, out_pos, dout, want), e);
        out_pos++;
      end
      if (e >= int'(N) - 1)
        check(last_out == last_hist[e - int'(N) + 1], "last_out is last_in N ticks late", e);
      if (sets_out == int'(NSETS) && out_pos == int'(N)) break;
    end

    check(sets_out == int'(NSETS) && out_pos == int'(N), "every set came out", 0);
    for (int q = 0; q < PAT_COUNT; q++)
      check(n_pattern[q] > 0, $sformatf("pattern %0d exercised", q), 0);
    check(n_b2b > 0, "back-to-back sets exercised", 0);
    check(n_gap > 0, "sets after idle ticks exercised", 0);
    $display("sorter_bench N=%0d: %0d sets sorted, %0d back to back, %0d after a gap",
             N, sets_out, n_b2b, n_gap);
    done = 1'b1;
  end

endmodule
