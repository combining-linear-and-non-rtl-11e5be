// width_counter: counts the scan slices of the rectangle being decoded.
//
// cnt holds how many slices of the current rectangle have been shifted. last is
// high while the slice now being shifted is the rectangle's final one, that is
// when cnt + 1 equals the rectangle width; on that slice (inc high) the counter
// returns to 0 for the next rectangle, otherwise inc adds one. clr forces 0, for
// the start of a cube. Widths are stored as plain binary numbers 1 .. 2^W_BITS-1;
// a width of 0 is not a valid rectangle. Asynchronous active-low reset.
module width_counter #(
  parameter int unsigned W_BITS = rect_pkg::W_BITS_D
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              inc,
  input  logic [W_BITS-1:0] width,
  output logic [W_BITS-1:0] cnt,
  output logic              last
);

  assign last = (cnt + 1'b1) == width;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (clr)        cnt <= '0;
    else if (inc & last) cnt <= '0;
    else if (inc)        cnt <= cnt + 1'b1;
  end

endmodule
