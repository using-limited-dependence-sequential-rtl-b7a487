// ldse_top: test-vector decompression path of a scan-tested chip.
//
// b tester channels feed the limited dependence sequential decompressor,
// which fills n scan chains of the circuit under test one scan slice per
// clock. A test cube the decompressor cannot encode is loaded in serial mode
// instead, straight from the tester channels through the concatenated chains.
// The logic of the circuit under test is outside this block: the scan cells
// are brought out as `scan_cells` (its pseudo-primary inputs) and its
// responses come back on `capture_data`.
//
// Operation, per test cube: hold `cfg`, `preload_mode` and `serial_mode`;
// present one tester slice per clock with `slice_valid`, the first one also
// with `cube_start`. `load_done` pulses with the last shift of the load
// (CHAIN_LEN slices in bypass mode, CHAIN_LEN + r in extra-shift mode,
// CHAIN_LEN * ceil(n/b) in serial mode). Then pulse `capture` and start the
// next cube; its load shifts the responses out on `scan_out`, where a
// response compactor (not part of this block) would take them.
//
// The default sizes are those of an 80 x 100 scan architecture driven from 8
// tester channels, with the 2-register, 3-input XOR decompressor. The way the
// chains are brought out and the capture port are this design's choices.
module ldse_top
  import ldse_pkg::*;
#(
  parameter int unsigned CHANNELS  = TESTER_CHANNELS,
  parameter int unsigned CHAINS    = SCAN_CHAINS,
  parameter int unsigned CHAIN_LEN = CHAIN_LENGTH,
  parameter int unsigned R         = SLICE_REGS,
  parameter int unsigned GATE_IN   = GATE_INPUTS,
  parameter int unsigned CONFIGS   = NUM_CONFIGS
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic [CHANNELS-1:0]                          tester_slice,
  input  logic                                         slice_valid,
  input  logic                                         cube_start,
  input  logic [(CONFIGS > 1 ? $clog2(CONFIGS) : 1)-1:0] cfg,
  input  logic                                         preload_mode,  // 0 bypass, 1 extra shifts
  input  logic                                         serial_mode,
  input  logic                                         capture,
  input  logic [CHAINS-1:0][CHAIN_LEN-1:0]             capture_data,
  output logic [CHAINS-1:0][CHAIN_LEN-1:0]             scan_cells,
  output logic [CHAINS-1:0]                            scan_out,
  output logic                                         load_done,
  output logic                                         bypass_active,
  output logic                                         chain_shift
);

  logic [CHAINS-1:0] dec_out;

  ldse_decompressor #(
    .CHANNELS(CHANNELS), .CHAINS(CHAINS), .R(R), .GATE_IN(GATE_IN),
    .CONFIGS(CONFIGS), .CHAIN_LEN(CHAIN_LEN)
  ) u_decomp (
    .clk, .rst_n, .tester_slice, .slice_valid, .cube_start, .cfg,
    .preload_mode(preload_mode_e'(preload_mode)), .serial_mode,
    .chain_in(dec_out), .chain_shift, .load_done, .bypass_active
  );

  scan_chains #(
    .CHAINS(CHAINS), .CHAIN_LEN(CHAIN_LEN), .CHANNELS(CHANNELS)
  ) u_chains (
    .clk, .shift(chain_shift), .serial_mode, .par_in(dec_out),
    .serial_in(tester_slice), .capture, .capture_data,
    .cells(scan_cells), .scan_out
  );

endmodule
