// systolic_sorter: linear systolic array that sorts sets of N numbers, with
// all input at the leftmost and all output at the rightmost processor.
//
// N sort_pe processors are cascaded; each passes data and two control bits
// to its right neighbour. A set enters at din, one number per tick, x1 first:
// first_in is high with x1 and last_in with xN (exactly N-1 ticks later).
// Each processor keeps one of the set's numbers, processor 1 the largest
// and processor N the smallest. After the set's last element each processor
// ejects its value into the data stream, and the results travel right at one
// processor per two ticks, so they leave processor N in ascending order.
//
// Timing: if x1 is at din in tick 1, the smallest number is at dout in tick
// 2N+1, marked by first_out, and the largest in tick 3N. The next set may
// start in tick N+1 (back to back) or any later tick; no reset or
// initialisation is needed between sets. last_out goes high one tick after
// processor N took the last element of a set.
//
// The array, its one-way connections, the two control signals and the
// output order follow the derived architecture; N, W and the reset are this
// design's own choices. An assertion checks that every set is N long.
module systolic_sorter
  import sorter_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         first_in,
  input  logic         last_in,
  output logic [W-1:0] dout,
  output logic         first_out,
  output logic         last_out
);

  // Link k feeds processor k (k = 0..N-1); link N is the array's output.
  logic [W-1:0] d     [N+1];
  logic         first [N+1];
  logic         last  [N+1];

  assign d[0]     = din;
  assign first[0] = first_in;
  assign last[0]  = last_in;

  for (genvar k = 0; k < N; k++) begin : g_pe
    sort_pe #(.W(W)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .d_in     (d[k]),
      .first_in (first[k]),
      .last_in  (last[k]),
      .d_out    (d[k+1]),
      .first_out(first[k+1]),
      .last_out (last[k+1])
    );
  end

  assign dout      = d[N];
  assign first_out = first[N];
  assign last_out  = last[N];

  // A set is exactly N numbers: last_in comes N-1 ticks after first_in, and
  // never without it.
  logic last_expected;

  if (N == 1) begin : g_len_one
    assign last_expected = first_in;
  end else begin : g_len_many
    logic [N-2:0] first_hist;   // first_hist[k]: first_in k+1 ticks ago

    always_ff @(posedge clk) begin
      if (!rst_n) first_hist <= '0;
      else        first_hist <= (N-1)'({first_hist, first_in});
    end

    assign last_expected = first_hist[N-2];
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (last_in == last_expected)
        else $error("systolic_sorter: a set must be exactly %0d numbers long", N);
    end
  end

endmodule
