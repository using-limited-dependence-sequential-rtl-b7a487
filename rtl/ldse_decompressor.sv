// ldse_decompressor: limited dependence sequential linear decompressor.
//
// Expands a b-bit tester slice per clock into one bit for each of n scan
// chains. Each chain is driven by a q-input XOR whose inputs are drawn from
// the current tester slice and the r previous slices held in the slice
// registers, so every scan cell depends on exactly q free variables spread
// over up to r+1 clocks. Keeping q at 2 or 3 keeps the decompressor's
// constraints simple enough for an ATPG tool to justify values through them,
// while the registers give access to free variables across clocks.
//
// For the first r slices of a cube the registers do not yet hold free
// variables of that cube. In bypass mode a second, purely combinational
// q-input XOR network on the current slice drives the chains for those
// slices (a 2:1 mux per chain); in extra-shift mode the controller holds the
// chains for r slices while the registers fill. The registers are cleared at
// the start of every cube. `cfg` picks one of the static configurations of
// both networks and is held for the whole cube.
//
// Interface: `chain_in` is combinational from `tester_slice` (zero latency);
// the chains should sample it when `chain_shift` is high. `serial_mode` only
// changes the sequencing (the chain muxes for serial mode sit with the scan
// chains). With R = 0 the block degenerates into the combinational network.
//
// The register-plus-XOR structure, the per-cube clearing, both preload
// remedies and the static configurations follow the design description.
// The gates of the bypass network, the handshake, the reset and the
// assertions on the per-cube settings are this design's own choices.
module ldse_decompressor
  import ldse_pkg::*;
#(
  parameter int unsigned CHANNELS  = TESTER_CHANNELS,
  parameter int unsigned CHAINS    = SCAN_CHAINS,
  parameter int unsigned R         = SLICE_REGS,
  parameter int unsigned GATE_IN   = GATE_INPUTS,
  parameter int unsigned CONFIGS   = NUM_CONFIGS,
  parameter int unsigned CHAIN_LEN = CHAIN_LENGTH
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic [CHANNELS-1:0]                          tester_slice,
  input  logic                                         slice_valid,
  input  logic                                         cube_start,
  input  logic [(CONFIGS > 1 ? $clog2(CONFIGS) : 1)-1:0] cfg,
  input  preload_mode_e                                preload_mode,
  input  logic                                         serial_mode,
  output logic [CHAINS-1:0]                            chain_in,
  output logic                                         chain_shift,
  output logic                                         load_done,
  output logic                                         bypass_active
);

  localparam int unsigned CW = CONFIGS > 1 ? $clog2(CONFIGS) : 1;

  logic bypass, regs_shift, regs_clear;
  logic [CHAINS-1:0] seq_out;

  decomp_ctrl #(
    .R(R), .CHAIN_LEN(CHAIN_LEN), .CHAINS(CHAINS), .CHANNELS(CHANNELS)
  ) u_ctrl (
    .clk, .rst_n, .cube_start, .slice_valid, .preload_mode, .serial_mode,
    .bypass, .regs_shift, .regs_clear, .chain_shift, .load_done
  );

  if (R > 0) begin : g_seq
    logic [R-1:0][CHANNELS-1:0] held;
    logic [CHAINS-1:0]          byp_out;

    slice_regs #(.WIDTH(CHANNELS), .DEPTH(R)) u_regs (
      .clk, .rst_n, .clear(regs_clear), .shift(regs_shift),
      .slice_in(tester_slice), .held
    );

    // Domain bit d: slice (d / b) clocks old, channel (d mod b).
    xor_expander #(
      .DOMAIN(CHANNELS * (R + 1)), .SLICE_W(CHANNELS), .CHAINS(CHAINS), .GATE_IN(GATE_IN),
      .CONFIGS(CONFIGS)
    ) u_seq_net (
      .domain({held, tester_slice}), .cfg, .chain_in(seq_out)
    );

    xor_expander #(
      .DOMAIN(CHANNELS), .SLICE_W(CHANNELS), .CHAINS(CHAINS), .GATE_IN(GATE_IN),
      .CONFIGS(CONFIGS)
    ) u_bypass_net (
      .domain(tester_slice), .cfg, .chain_in(byp_out)
    );

    assign chain_in = bypass ? byp_out : seq_out;
  end else begin : g_comb
    xor_expander #(
      .DOMAIN(CHANNELS), .SLICE_W(CHANNELS), .CHAINS(CHAINS), .GATE_IN(GATE_IN),
      .CONFIGS(CONFIGS)
    ) u_comb_net (
      .domain(tester_slice), .cfg, .chain_in(seq_out)
    );
    assign chain_in = seq_out;
  end

  assign bypass_active = bypass && slice_valid && (R > 0);

  // Static reconfiguration: the configuration and modes are fixed per cube.
  logic [CW-1:0] cfg_q;
  logic          mode_q, serial_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q    <= '0;
      mode_q   <= 1'b0;
      serial_q <= 1'b0;
    end else if (slice_valid) begin
      cfg_q    <= cfg;
      mode_q   <= preload_mode;
      serial_q <= serial_mode;
    end
  end

  a_static_cfg : assert property (@(posedge clk) disable iff (!rst_n)
    (slice_valid && !cube_start && $past(slice_valid)) |->
      (cfg == cfg_q && preload_mode == preload_mode_e'(mode_q) && serial_mode == serial_q))
    else $error("configuration changed inside a test cube");

  a_cfg_range : assert property (@(posedge clk) disable iff (!rst_n)
    slice_valid |-> int'(cfg) < int'(CONFIGS))
    else $error("configuration index out of range");

endmodule
