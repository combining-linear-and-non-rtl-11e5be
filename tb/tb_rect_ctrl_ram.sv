// tb_rect_ctrl_ram: self-checking test of the control-word RAM.
// Writes random words to every address, keeping a reference copy, then reads
// them back in random order, overwrites a few and checks that a write only
// changes its own address. The read port is combinational: data is checked in
// the same cycle the address is applied.
module tb_rect_ctrl_ram;
  localparam int unsigned DEPTH = 16, WORD_W = 20, AW = 4;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WORD_W-1:0] wdata = '0, rdata;
  logic [WORD_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  rect_ctrl_ram #(.DEPTH(DEPTH), .WORD_W(WORD_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [WORD_W-1:0] d);
    @(negedge clk); we = 1'b1; waddr = AW'(a); wdata = d;
    @(negedge clk); we = 1'b0;
    ref_mem[a] = d;
  endtask

  task automatic check_all();
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'((i * 7 + 3) % DEPTH); #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("addr %0d: got %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) write(i, WORD_W'($urandom));
    check_all();
    for (int n = 0; n < 20; n++) write($urandom_range(DEPTH - 1), WORD_W'($urandom));
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
