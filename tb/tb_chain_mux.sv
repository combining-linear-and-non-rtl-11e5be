// tb_chain_mux: self-checking test of the scan chain multiplexers.
// Applies random slices, masks, fill values and widths, including the worked
// example of the scheme (4 chains, k = 1, mask 1011, fill 1: all chains but
// chain 2 take the fill value), and checks every chain against the rule
// "fill if the rectangle is at least MIN_WIDTH wide and the chain's mask bit
// (bit i/k) is 1, else the decompressor bit".
module tb_chain_mux;
  localparam int unsigned N = 30, K = 2, W = 4, MINW = 2, C = 15;
  logic [N-1:0] lin_slice, scan_in;
  logic [W-1:0] width;
  logic [C-1:0] mask;
  logic fill, narrow;
  // small instance for the worked example
  logic [3:0] ex_lin, ex_scan;
  logic [3:0] ex_mask;
  logic ex_narrow;
  int checks = 0, failures = 0;

  chain_mux #(.N_CHAINS(N), .K_SHARE(K), .W_BITS(W), .MIN_WIDTH(MINW)) dut (.*);
  chain_mux #(.N_CHAINS(4), .K_SHARE(1), .W_BITS(W), .MIN_WIDTH(MINW)) dut_ex (
    .lin_slice(ex_lin), .width(4'd4), .mask(ex_mask), .fill(1'b1),
    .scan_in(ex_scan), .narrow(ex_narrow));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // example: mask bits listed sc1..sc4 = 1,0,1,1 -> chain index 0..3
    ex_mask = 4'b1101;
    ex_lin  = 4'b0000;
    #1;
    checks++;
    if (ex_scan !== 4'b1101 || ex_narrow) begin
      failures++;
      $display("worked example: scan %b", ex_scan);
    end
    for (int n = 0; n < 3000; n++) begin
      lin_slice = N'($urandom);
      mask      = C'($urandom);
      fill      = 1'($urandom);
      width     = W'($urandom_range(15));
      #1;
      for (int i = 0; i < N; i++) begin
        logic e;
        e = (width >= MINW && mask[i / K]) ? fill : lin_slice[i];
        checks++;
        if (scan_in[i] !== e) begin
          failures++;
          $display("chain %0d: got %b expected %b (w=%0d)", i, scan_in[i], e, width);
        end
      end
      checks++;
      if (narrow !== (width < MINW)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
