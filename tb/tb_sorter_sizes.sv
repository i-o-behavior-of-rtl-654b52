// tb_sorter_sizes: end-to-end testbench of the sorter at other sizes.
//
// Runs sorter_bench against three sorters side by side: one processor
// (first and last element coincide), two processors, and five processors
// with 8-bit data, so that the control timing is checked where the
// diagonal and the last-element boundary meet early, and at an odd length.
module tb_sorter_sizes;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 3;
  logic done   [NCFG];
  int   checks [NCFG];
  int   fails  [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned N = (c == 0) ? 1 : (c == 1) ? 2 : 5;
    localparam int unsigned W = (c == 2) ? 8 : 12;
    logic         rst_n;
    logic [W-1:0] din, dout;
    logic         first_in, last_in, first_out, last_out;

    systolic_sorter #(.N(N), .W(W)) dut (
      .clk, .rst_n, .din, .first_in, .last_in, .dout, .first_out, .last_out
    );

    sorter_bench #(.N(N), .W(W), .NSETS(120)) bench (
      .clk, .rst_n, .din, .first_in, .last_in, .dout, .first_out, .last_out,
      .done(done[c]), .checks(checks[c]), .failures(fails[c])
    );
  end

  initial begin
    int total_checks, total_fails;
    bit all_done;
    @(posedge clk);
    for (int k = 0; k < 100000; k++) begin
      all_done = 1'b1;
      for (int c = 0; c < NCFG; c++) if (!done[c]) all_done = 1'b0;
      if (all_done) break;
      @(posedge clk);
    end
    total_checks = 0;
    total_fails  = all_done ? 0 : 1;
    if (!all_done) $display("tb_sorter_sizes: watchdog expired");
    for (int c = 0; c < NCFG; c++) begin
      total_checks += checks[c];
      total_fails  += fails[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fails);
    $finish;
  end

endmodule
