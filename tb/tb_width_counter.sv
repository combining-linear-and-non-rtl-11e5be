// tb_width_counter: self-checking test of the width counter.
// Runs rectangles of every width 1..15 with random idle cycles between slices
// and checks that last rises exactly on the width-th slice, that the counter
// wraps to 0 after it, and that clr empties it.
module tb_width_counter;
  localparam int unsigned W_BITS = 4;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, inc = 1'b0;
  logic [W_BITS-1:0] width = 4'd1, cnt;
  logic last;
  int checks = 0, failures = 0;

  width_counter #(.W_BITS(W_BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int w = 1; w < 16; w++) begin
        @(negedge clk);
        width = W_BITS'(w);
        for (int s = 0; s < w; s++) begin
          inc = 1'b0;
          repeat ($urandom_range(2)) @(negedge clk);
          inc = 1'b1;
          #1;
          checks++;
          if (cnt !== W_BITS'(s) || last !== (s == w - 1)) begin
            failures++;
            $display("width %0d slice %0d: cnt %0d last %0b", w, s, cnt, last);
          end
          @(negedge clk);
        end
        inc = 1'b0;
        #1;
        checks++;
        if (cnt !== '0) begin
          failures++;
          $display("width %0d: counter did not wrap (%0d)", w, cnt);
        end
      end
      // partial rectangle, then clear
      width = 4'd9;
      inc = 1'b1;
      repeat (4) @(negedge clk);
      inc = 1'b0; clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      checks++;
      if (cnt !== '0) begin
        failures++;
        $display("clr did not empty the counter");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
