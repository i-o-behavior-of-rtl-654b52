// tb_systolic_sorter: end-to-end testbench of the sorter at its default size.
//
// The sorter is instantiated with no parameter overrides; sorter_bench feeds
// it 150 sets of N numbers, back to back and with idle gaps, and checks the
// sorted order of every result, the 2N-tick latency from a set's first input
// to its first result, that back-to-back sets come out every N ticks, and
// the delay of the control bits. A watchdog ends the run if it hangs.
module tb_systolic_sorter;

  localparam int unsigned N = 8;    // the sorter's default size
  localparam int unsigned W = 16;   // the sorter's default width

  logic         clk;
  logic         rst_n;
  logic [W-1:0] din, dout;
  logic         first_in, last_in, first_out, last_out;
  logic         done;
  int           checks, failures;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  systolic_sorter dut (
    .clk, .rst_n, .din, .first_in, .last_in, .dout, .first_out, .last_out
  );

  sorter_bench #(.N(N), .W(W), .NSETS(150)) bench (
    .clk, .rst_n, .din, .first_in, .last_in, .dout, .first_out, .last_out,
    .done, .checks, .failures
  );

  initial begin
    @(posedge clk);   // let the bench clear done first
    fork
      wait (done);
      repeat (200000) @(posedge clk);
    join_any
    if (!done) begin
      $display("tb_systolic_sorter: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    end else begin
      if ($bits(dout) != W) begin
        $display("FAIL: testbench width does not match the sorter");
        $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
      end else
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end

endmodule
