// tb_rect_ctrl_reg: self-checking test of the rectangular control register.
// Loads random words with random load enables and checks the width, mask and
// fill fields against a reference copy of the last word loaded.
module tb_rect_ctrl_reg;
  localparam int unsigned W_BITS = 4, C_BITS = 15, WORD_W = 20;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [WORD_W-1:0] d = '0, held = '0;
  logic [W_BITS-1:0] width;
  logic [C_BITS-1:0] mask;
  logic fill;
  int checks = 0, failures = 0;

  rect_ctrl_reg #(.W_BITS(W_BITS), .C_BITS(C_BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if ({width, mask, fill} !== '0) begin
      failures++;
      $display("register not cleared by reset");
    end
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load = ($urandom_range(1) == 1);
      d    = WORD_W'($urandom);
      @(posedge clk); #1;
      if (load) held = d;
      checks++;
      if (width !== held[19:16] || mask !== held[15:1] || fill !== held[0]) begin
        failures++;
        $display("fields %h %h %b, expected word %h", width, mask, fill, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
