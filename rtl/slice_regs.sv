// slice_regs: the tester-slice registers of the sequential decompressor.
//
// A tester slice is the b bits that arrive on the tester channels in one
// clock. The registers keep the last DEPTH (r) slices so that the XOR gates
// can combine free variables from up to r+1 consecutive clocks: held[0] is
// the slice of the previous shift, held[DEPTH-1] the oldest.
//
// The registers are cleared between test cubes so that every cube is encoded
// with its own free variables only. `clear` marks the start of a cube: alone
// it zeroes all registers; together with `shift` it also loads the new cube's
// first slice into held[0] while the older stages are zeroed, so cubes can
// follow each other without an idle clock. Clearing the registers follows
// the design description; the same-cycle load is this design's choice.
//
// Timing: one register stage per shift, updated on the rising clock edge;
// asynchronous active-low reset to zero.
module slice_regs
  import ldse_pkg::*;
#(
  parameter int unsigned WIDTH = TESTER_CHANNELS,
  parameter int unsigned DEPTH = SLICE_REGS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         shift,
  input  logic [WIDTH-1:0]             slice_in,
  output logic [DEPTH-1:0][WIDTH-1:0]  held
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= '0;
    end else if (shift) begin
      held[0] <= slice_in;
      for (int k = 1; k < int'(DEPTH); k++)
        held[k] <= clear ? '0 : held[k-1];
    end else if (clear) begin
      held <= '0;
    end
  end

endmodule
