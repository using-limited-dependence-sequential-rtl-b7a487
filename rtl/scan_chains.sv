// scan_chains: the scan chains of the circuit under test, with the input
// muxes that give them a parallel (decompressed) mode and a serial mode.
//
// CHAINS chains of CHAIN_LEN cells. On `shift` every chain moves one cell:
// cells[i][0] takes the chain's input and cells[i][CHAIN_LEN-1] leaves on
// scan_out[i]. After CHAIN_LEN shifts the bit shifted in first sits in the
// last cell. In parallel mode chain i takes par_in[i] from the decompressor.
// In serial mode the decompressor is bypassed for test cubes it cannot
// encode: chain i < b takes tester channel i directly and chain i >= b takes
// the scan-out of chain i-b, forming b long serial chains. `capture` loads
// the responses of the circuit's logic into all cells in one clock (a shift
// in the same clock takes priority).
//
// The serial mode is named, not detailed, in the design description; the
// concatenation order is this design's choice. The cells have no reset, as
// scan cells usually do not; they are defined after one complete load.
module scan_chains
  import ldse_pkg::*;
#(
  parameter int unsigned CHAINS    = SCAN_CHAINS,
  parameter int unsigned CHAIN_LEN = CHAIN_LENGTH,
  parameter int unsigned CHANNELS  = TESTER_CHANNELS
) (
  input  logic                                 clk,
  input  logic                                 shift,
  input  logic                                 serial_mode,
  input  logic [CHAINS-1:0]                    par_in,
  input  logic [CHANNELS-1:0]                  serial_in,
  input  logic                                 capture,
  input  logic [CHAINS-1:0][CHAIN_LEN-1:0]     capture_data,
  output logic [CHAINS-1:0][CHAIN_LEN-1:0]     cells,
  output logic [CHAINS-1:0]                    scan_out
);

  logic [CHAINS-1:0] chain_in;

  always_comb begin
    for (int i = 0; i < int'(CHAINS); i++) begin
      scan_out[i] = cells[i][CHAIN_LEN-1];
      if (!serial_mode)              chain_in[i] = par_in[i];
      else if (i < int'(CHANNELS))   chain_in[i] = serial_in[i % CHANNELS];
      else                           chain_in[i] = cells[(i + CHAINS - CHANNELS) % CHAINS][CHAIN_LEN-1];
    end
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int i = 0; i < int'(CHAINS); i++) begin
        cells[i] <= {cells[i][CHAIN_LEN-2:0], chain_in[i]};
      end
    end else if (capture) begin
      cells <= capture_data;
    end
  end

endmodule
