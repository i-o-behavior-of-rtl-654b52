// sort_pe: one processor of the linear systolic sorter with two control
// signals.
//
// Processor j of an N-processor array handles index points [i, j] of the
// augmented, pipelined bubble-sort domain at tick t = i + j - 1. What it
// computes is picked by two control bits that travel with the data:
//   first_in - d_in is the first element of a new set (the diagonal i = j):
//              the accumulator is loaded with d_in, nothing is compared, and
//              the old accumulator goes out as in PH_FORWARD;
//   last_in  - d_in is the last element of the set (the boundary i = N):
//              a final compare-exchange, after which the accumulator holds
//              this processor's result and the phase turns to PH_FORWARD;
//   neither  - PH_COMPUTE: d_out gets min(acc, d_in), acc keeps the max;
//              PH_FORWARD: d_out gets acc and acc gets d_in, so a result
//              from the left neighbour crosses this processor in two ticks
//              (the dependency [-1,-1] of the pipelined domain).
// When first_in and last_in come together (the rightmost processor), the
// load wins and the phase still turns to PH_FORWARD. In the tick after a
// set's last element, the accumulator (this processor's result) goes out
// first, followed by the results of the processors to its left, the
// nearest first. Processor j sends j results in ticks N+j .. N+2j-1; the
// last of them leaves in the tick in which the next set can reach it, which
// is why the diagonal tick also sends the accumulator.
//
// Control timing: first_in is delayed two ticks (first_out), since the
// diagonal moves one processor every two ticks; last_in is delayed one tick
// (last_out), since the boundary i = N moves one processor per tick. d_out
// is registered, one tick behind d_in.
//
// From the derivation: the schedule t = i + j - 1, allocation a = j, the
// three phases, the two control signals and the augmented output line.
// This design's own choices: the data width, unsigned comparison, a tie
// going to d_in as the larger value, the synchronous active-low reset (to
// PH_FORWARD with all registers cleared), and using the accumulator as the
// second delay register of the forwarding phase.
module sort_pe
  import sorter_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_in,
  input  logic         first_in,
  input  logic         last_in,
  output logic [W-1:0] d_out,
  output logic         first_out,
  output logic         last_out
);

  logic [W-1:0] acc;
  phase_t       phase;
  logic         first_d1;   // first_in one tick ago

  logic         in_larger;
  logic [W-1:0] lo, hi;

  always_comb begin
    in_larger = (d_in >= acc);
    lo        = in_larger ? acc  : d_in;
    hi        = in_larger ? d_in : acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      d_out     <= '0;
      phase     <= PH_FORWARD;
      first_d1  <= 1'b0;
      first_out <= 1'b0;
      last_out  <= 1'b0;
    end else begin
      first_d1  <= first_in;
      first_out <= first_d1;
      last_out  <= last_in;

      if (first_in) begin
        // Diagonal: start a new set. The old accumulator still goes out:
        // with sets back to back it is the last result being forwarded.
        acc   <= d_in;
        d_out <= acc;
        phase <= last_in ? PH_FORWARD : PH_COMPUTE;
      end else if (last_in) begin
        // Boundary i = N: last compare-exchange, then unload.
        acc   <= hi;
        d_out <= lo;
        phase <= PH_FORWARD;
      end else if (phase == PH_COMPUTE) begin
        acc   <= hi;
        d_out <= lo;
      end else begin
        acc   <= d_in;
        d_out <= acc;
      end
    end
  end

endmodule
