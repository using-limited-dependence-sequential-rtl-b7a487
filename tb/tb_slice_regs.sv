// tb_slice_regs: random shift/clear traffic against a queue model of the
// tester-slice registers, including clear-with-shift at a cube boundary.
module tb_slice_regs;
  import ldse_pkg::*;
  localparam int W = TESTER_CHANNELS;
  localparam int D = SLICE_REGS;

  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  logic [W-1:0] slice_in = '0;
  logic [D-1:0][W-1:0] held;
  int checks = 0, failures = 0;
  logic [D-1:0][W-1:0] model;
  int n_clear_shift = 0, n_clear_only = 0;

  slice_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (held !== '0) begin failures++; $display("not zero after reset"); end
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      shift    = ($urandom % 4) != 0;
      clear    = ($urandom % 10) == 0;
      slice_in = W'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int k = D - 1; k >= 1; k--) model[k] = clear ? '0 : model[k-1];
        model[0] = slice_in;
        if (clear) n_clear_shift++;
      end else if (clear) begin
        model = '0;
        n_clear_only++;
      end
      #1;
      checks++;
      if (held !== model) begin
        failures++;
        if (failures < 10) $display("mismatch it=%0d held=%h model=%h", it, held, model);
      end
    end
    checks++;
    if (n_clear_shift == 0 || n_clear_only == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
