// chain_mux: the multiplexers in front of the scan chains.
//
// Scan chain i takes the fill value when bit i/K_SHARE of the chain select mask
// is 1 and the rectangle is at least MIN_WIDTH slices wide; otherwise it takes
// bit i of the slice from the linear decompressor. One mask bit thus fans out to
// K_SHARE multiplexers, and a less-than comparator on the width drives a second
// multiplexer level that bypasses mask and fill for narrow rectangles. Purely
// combinational. That a mask bit of 1 selects the fill value follows the
// worked example of the scheme; the threshold value MIN_WIDTH = 2 is this
// design's choice (the scheme leaves it to the user).
module chain_mux #(
  parameter int unsigned N_CHAINS  = rect_pkg::N_CHAINS_D,
  parameter int unsigned K_SHARE   = rect_pkg::K_SHARE_D,
  parameter int unsigned W_BITS    = rect_pkg::W_BITS_D,
  parameter int unsigned MIN_WIDTH = rect_pkg::MIN_WIDTH_D,
  localparam int unsigned C_BITS   = (N_CHAINS + K_SHARE - 1) / K_SHARE
) (
  input  logic [N_CHAINS-1:0] lin_slice,
  input  logic [W_BITS-1:0]   width,
  input  logic [C_BITS-1:0]   mask,
  input  logic                fill,
  output logic [N_CHAINS-1:0] scan_in,
  output logic                narrow
);

  // Less-than comparator: narrow rectangles are loaded from the decompressor only.
  assign narrow = 32'(width) < MIN_WIDTH;

  always_comb begin
    for (int unsigned i = 0; i < N_CHAINS; i++) begin
      if (!narrow && mask[i / K_SHARE]) scan_in[i] = fill;
      else                              scan_in[i] = lin_slice[i];
    end
  end

endmodule
