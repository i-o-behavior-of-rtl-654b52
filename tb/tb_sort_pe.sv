// tb_sort_pe: self-checking testbench for one processor of the sorter.
//
// Drives sets of random length (1 to 6 numbers, values from a small range so
// that ties happen) with random gaps between them, sometimes back to back,
// and checks every output tick against the processor's specification,
// written here in terms of the set rather than of the registers:
//   - inside a set, the k-th element (k >= 2) leaves one tick later as
//     min(largest of the elements before it, the element);
//   - in the tick after a set's last element, the set's largest value leaves;
//   - from then on, including the tick in which the next set starts, every
//     input leaves two ticks after it entered;
//   - first_out is first_in two ticks late, last_out is last_in one tick late.
// Timing: inputs change after a falling edge and are sampled at the next
// rising edge; outputs are read after the falling edge that follows.
module tb_sort_pe;
  import sorter_pkg::*;

  localparam int unsigned W      = 8;
  localparam int unsigned NSETS  = 400;
  localparam int unsigned MAXLEN = 6;

  logic         clk;
  logic         rst_n;
  logic [W-1:0] d_in;
  logic         first_in, last_in;
  logic [W-1:0] d_out;
  logic         first_out, last_out;

  int checks = 0;
  int failures = 0;

  sort_pe #(.W(W)) dut (
    .clk, .rst_n, .d_in, .first_in, .last_in, .d_out, .first_out, .last_out
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("tb_sort_pe: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-edge record of what was sampled, index = rising edge number.
  localparam int unsigned MAXT = NSETS * (MAXLEN + 4) + 16;
  logic [W-1:0] in_hist    [MAXT];
  logic         first_hist [MAXT];
  logic         last_hist  [MAXT];

  task automatic check(input logic cond, input string what, input int e);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL edge %0d: %s", e, what);
    end
  endtask

  // Expected d_out after edge e, worked out from the set structure.
  // Returns 0 when the output is a don't-care.
  function automatic bit expected(input int e, output logic [W-1:0] v);
    int s, l;
    logic [W-1:0] m;
    // The set in progress before edge e: the most recent first_in before e.
    // (A set starting at e does not change what leaves at e.)
    s = -1;
    for (int k = e - 1; k >= 0; k--) if (first_hist[k]) begin s = k; break; end
    if (s < 0) return 0;
    // Last element of that set.
    l = -1;
    for (int k = s; k <= e; k++) if (last_hist[k]) begin l = k; break; end
    if (l < 0 || e <= l) begin
      // Still inside the set: k-th element against the max of those before.
      m = in_hist[s];
      for (int k = s + 1; k < e; k++) if (in_hist[k] > m) m = in_hist[k];
      v = (in_hist[e] < m) ? in_hist[e] : m;
      return 1;
    end
    if (e == l + 1) begin
      m = in_hist[s];
      for (int k = s + 1; k <= l; k++) if (in_hist[k] > m) m = in_hist[k];
      v = m;
      return 1;
    end
    v = in_hist[e-1];
    return 1;
  endfunction

  int edge_no;
  int nsets_done;
  int n_single, n_b2b;

  initial begin
    logic [W-1:0] v;
    int len, pos, gap;
    rst_n = 1'b0; d_in = '0; first_in = 1'b0; last_in = 1'b0;
    repeat (3) @(negedge clk);
    check(d_out == '0 && !first_out && !last_out, "reset state", 0);
    rst_n = 1'b1;
    edge_no = 0;
    len = 0; pos = 0; gap = 2;
    nsets_done = 0; n_single = 0; n_b2b = 0;
    for (int e = 0; e < int'(MAXT); e++) begin
      // Choose the inputs sampled at edge e.
      if (pos == len) begin
        if (gap > 0 || nsets_done >= int'(NSETS)) begin
          d_in = W'($urandom_range(0, 15));
          first_in = 1'b0; last_in = 1'b0;
          gap--;
        end else begin
          len = $urandom_range(1, MAXLEN);
          pos = 0;
          gap = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 5);
          if (gap == 0) n_b2b++;
          if (len == 1) n_single++;
          nsets_done++;
        end
      end
      if (pos < len) begin
        d_in     = W'($urandom_range(0, 15));
        first_in = (pos == 0);
        last_in  = (pos == len - 1);
        pos++;
      end
      in_hist[e] = d_in; first_hist[e] = first_in; last_hist[e] = last_in;
      @(negedge clk);
      // Outputs after edge e.
      if (expected(e, v)) check(d_out == v, $sformatf("d_out %0d expected %0d", d_out, v), e);
      check(last_out == last_in, "last_out is last_in one tick late", e);
      if (e >= 1) check(first_out == first_hist[e-1], "first_out is first_in two ticks late", e);
    end
    check(n_b2b > 0 && n_single > 0, "back-to-back and single-element sets exercised", 0);
    $display("tb_sort_pe: %0d sets, %0d back to back, %0d single", nsets_done, n_b2b, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
