// rect_ctrl_reg: the rectangular control register.
//
// Holds the control word of the rectangle now being decoded and splits it into
// its three fields: the width (W_BITS, most significant), the chain select mask
// (C_BITS) and the fill value (least significant bit). load takes a new word at
// the clock edge; the fields are valid from the following cycle. Reset clears
// the register (width 0, no rectangle). Asynchronous active-low reset.
module rect_ctrl_reg #(
  parameter int unsigned W_BITS = rect_pkg::W_BITS_D,
  parameter int unsigned C_BITS = (rect_pkg::N_CHAINS_D + rect_pkg::K_SHARE_D - 1)
                                  / rect_pkg::K_SHARE_D,
  localparam int unsigned WORD_W = W_BITS + C_BITS + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [WORD_W-1:0] d,
  output logic [W_BITS-1:0] width,
  output logic [C_BITS-1:0] mask,
  output logic              fill
);

  logic [WORD_W-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

  assign width = q[WORD_W-1 -: W_BITS];
  assign mask  = q[C_BITS:1];
  assign fill  = q[0];

endmodule
