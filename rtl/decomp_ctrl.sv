// decomp_ctrl: per-test-cube sequencing of the decompressor.
//
// At the start of a test cube the r slice registers are empty, so the first
// r scan slices cannot be produced by the sequential network. Two remedies
// are supported, chosen per cube with `preload_mode`:
//   PRELOAD_BYPASS      the first r slices of the cube select the bypass
//                       network (current tester slice only); the chains shift
//                       on every slice, so a cube takes CHAIN_LEN slices.
//   PRELOAD_EXTRA_SHIFT the first r slices only fill the registers and the
//                       chains hold; a cube takes CHAIN_LEN + r slices.
// In serial mode the chains are concatenated behind the tester channels and
// the decompressor is unused; the load then takes CHAIN_LEN * ceil(n/b)
// shifts, the length of the longest serial chain.
//
// Interface: `cube_start` qualifies the first slice of a cube (or, without
// `slice_valid`, just resets the sequence). `slice_valid` means a tester slice
// is present this clock. `bypass`, `chain_shift` and `regs_clear` are
// combinational decodes of the inputs and the state. `load_done` pulses with
// the shift that completes the load of the chains. The mode inputs must be
// held for the whole cube. Counters reset asynchronously to the "idle, new
// cube pending" state.
module decomp_ctrl
  import ldse_pkg::*;
#(
  parameter int unsigned R         = SLICE_REGS,
  parameter int unsigned CHAIN_LEN = CHAIN_LENGTH,
  parameter int unsigned CHAINS    = SCAN_CHAINS,
  parameter int unsigned CHANNELS  = TESTER_CHANNELS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cube_start,
  input  logic          slice_valid,
  input  preload_mode_e preload_mode,
  input  logic          serial_mode,
  output logic          bypass,       // select the bypass network
  output logic          regs_shift,   // shift a slice into the slice registers
  output logic          regs_clear,   // clear the slice registers
  output logic          chain_shift,  // shift the scan chains
  output logic          load_done     // this shift completes the load
);

  localparam int unsigned SERIAL_LEN = CHAIN_LEN * ((CHAINS + CHANNELS - 1) / CHANNELS);
  localparam int unsigned SW = $clog2(SERIAL_LEN + 1);
  localparam int unsigned FW = $clog2(R + 1) > 0 ? $clog2(R + 1) : 1;

  logic [FW-1:0] fill_q, fill_eff;   // slices received in this cube (sat. at R)
  logic [SW-1:0] shift_q, shift_eff; // chain shifts done in this cube
  logic [SW-1:0] load_len;
  logic          filled;

  assign fill_eff  = cube_start ? '0 : fill_q;
  assign shift_eff = cube_start ? '0 : shift_q;
  assign filled    = (int'(fill_eff) >= int'(R));
  assign load_len  = serial_mode ? SW'(SERIAL_LEN) : SW'(CHAIN_LEN);

  assign regs_clear  = cube_start;
  assign regs_shift  = slice_valid && !serial_mode;
  assign bypass      = !serial_mode && (preload_mode == PRELOAD_BYPASS) && !filled;
  assign chain_shift = slice_valid && shift_eff < load_len &&
                       (serial_mode || preload_mode == PRELOAD_BYPASS || filled);
  assign load_done   = chain_shift && (shift_eff == load_len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_q  <= '0;
      shift_q <= '0;
    end else begin
      if (slice_valid)
        fill_q <= filled ? fill_eff : fill_eff + 1'b1;
      else if (cube_start)
        fill_q <= '0;
      if (chain_shift)
        shift_q <= shift_eff + 1'b1;
      else if (cube_start)
        shift_q <= '0;
    end
  end

endmodule
