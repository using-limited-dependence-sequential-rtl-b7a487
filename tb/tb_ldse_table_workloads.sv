// tb_ldse_table_workloads: the encode-and-load flow at every scan
// configuration of the benchmark-circuit experiments, with 8 tester
// channels, 2 slice registers and 3-input XORs throughout. Chain lengths are
// the cell count divided by the chain count, rounded up:
//   s38584, 1464 cells:      192 x 8,  224 x 7,  256 x 6
//   circuit of 7654 cells:    64 x 120, 128 x 60, 192 x 40
//   circuit of 856 cells:     64 x 14,  128 x 7,  192 x 5
// Each runs 12 random cubes with 0.5 % to 5 % specified bits and prints how
// many could be encoded.
module tb_ldse_table_workloads;
  localparam int NW = 9;
  logic [NW-1:0] done;
  int checks_w[NW], failures_w[NW];

  ldse_encode_harness #(.N(192), .L(8),   .CUBES(12), .NAME("s38584 192x8"))   u0 (.done(done[0]), .checks(checks_w[0]), .failures(failures_w[0]));
  ldse_encode_harness #(.N(224), .L(7),   .CUBES(12), .NAME("s38584 224x7"))   u1 (.done(done[1]), .checks(checks_w[1]), .failures(failures_w[1]));
  ldse_encode_harness #(.N(256), .L(6),   .CUBES(12), .NAME("s38584 256x6"))   u2 (.done(done[2]), .checks(checks_w[2]), .failures(failures_w[2]));
  ldse_encode_harness #(.N(64),  .L(120), .CUBES(12), .NAME("7654-cell 64x120")) u3 (.done(done[3]), .checks(checks_w[3]), .failures(failures_w[3]));
  ldse_encode_harness #(.N(128), .L(60),  .CUBES(12), .NAME("7654-cell 128x60")) u4 (.done(done[4]), .checks(checks_w[4]), .failures(failures_w[4]));
  ldse_encode_harness #(.N(192), .L(40),  .CUBES(12), .NAME("7654-cell 192x40")) u5 (.done(done[5]), .checks(checks_w[5]), .failures(failures_w[5]));
  ldse_encode_harness #(.N(64),  .L(14),  .CUBES(12), .NAME("856-cell 64x14"))   u6 (.done(done[6]), .checks(checks_w[6]), .failures(failures_w[6]));
  ldse_encode_harness #(.N(128), .L(7),   .CUBES(12), .NAME("856-cell 128x7"))   u7 (.done(done[7]), .checks(checks_w[7]), .failures(failures_w[7]));
  ldse_encode_harness #(.N(192), .L(5),   .CUBES(12), .NAME("856-cell 192x5"))   u8 (.done(done[8]), .checks(checks_w[8]), .failures(failures_w[8]));

  function automatic int sum(int a[NW]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks_w), sum(failures_w) + 1);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks_w), sum(failures_w));
    $finish;
  end
endmodule
